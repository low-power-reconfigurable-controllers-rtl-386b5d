// iso_cell: isolation cell bank for the boundary of a power-gated domain.
//
// When the domain is asleep its outputs float; the isolation cells hold every
// crossing signal at the clamp value so that always-on logic downstream sees a
// defined level. Here the clamp is logic 0 (AND-type isolation), which is what
// the OR-combining logic of the reconfigurable FSM and the adder need: a
// sleeping LUT cluster or adder slice then contributes nothing.
// Combinational: o = sleep ? '0 : i.
// Isolation cells are counted by the design in its leakage budget; the clamp
// polarity is this design's own choice.
module iso_cell #(
  parameter int unsigned W = 1
) (
  input  logic         sleep,  // 1: source domain is power-gated
  input  logic [W-1:0] i,      // signals from the gated domain
  output logic [W-1:0] o       // isolated signals
);
  always_comb o = sleep ? '0 : i;
endmodule
