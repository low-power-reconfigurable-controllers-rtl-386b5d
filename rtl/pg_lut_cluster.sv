// pg_lut_cluster: one power-gated LUT cluster of the reconfigurable FSM.
//
// A cluster is a K-input look-up table plus the AND gate that multiplies its
// output by its minterm m_k (one term f_i(.)_k * m_k of Eq. 1). The cluster
// sits in its own power domain whose sleep control is
//     SLEEP_k = power_gate + m_k'
// so the minterm decoder switches off every cluster whose minterm is 0 and the
// unit-level power_gate switches off all of them. The truth table 'cfg' comes
// from the always-on configuration memory. The output crosses into the
// always-on OR network through an isolation cell clamping to 0.
// Combinational; 'sleep' is exported so that the power state can be observed.
// The 0 clamp is this design's choice; the rest follows the design.
module pg_lut_cluster #(
  parameter int unsigned K = 6
) (
  input  logic              power_gate, // unit-level gate (1 = off)
  input  logic              minterm,    // m_k from the decoder
  input  logic [K-1:0]      lut_in,     // the K remaining variables
  input  logic [(1<<K)-1:0] cfg,        // truth table, bit r = f(r)
  output logic              sleep,      // SLEEP_k
  output logic              o           // isolated m_k & f(lut_in)
);
  logic raw;

  always_comb begin
    sleep = power_gate | ~minterm;
    raw   = cfg[lut_in] & minterm;
  end

  iso_cell #(.W(1)) u_iso (.sleep(sleep), .i(raw), .o(o));
endmodule
