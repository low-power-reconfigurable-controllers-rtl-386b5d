// minterm_decoder: the input selector-decoder of the reconfigurable FSM.
//
// The first D variables of the sequence (x_0 .. x_{n-1}, s_0 .. s_{N-1}) are
// decoded into the 2^D minterms m_k of the Shannon expansion (Eq. 1). Exactly
// one minterm is 1 when the decoder is enabled; the decoder outputs double as
// the wake-up controls of the LUT clusters (SLEEP_k = power_gate + m_k').
// With D = 0 the decoder degenerates to a single always-true minterm.
// A low 'en' (whole FSM in standby) forces all minterms to 0. Combinational.
module minterm_decoder #(
  parameter int unsigned D  = 5,
  parameter int unsigned SW = (D > 0) ? D : 1
) (
  input  logic              en,
  input  logic [SW-1:0]     sel,     // decoded variables (ignored when D = 0)
  output logic [(1<<D)-1:0] minterm  // one-hot minterms m_k
);
  always_comb begin
    minterm = '0;
    if (en) begin
      if (D == 0) minterm[0] = 1'b1;
      else        minterm[sel[D > 0 ? D-1 : 0 : 0]] = 1'b1;
    end
  end
endmodule
