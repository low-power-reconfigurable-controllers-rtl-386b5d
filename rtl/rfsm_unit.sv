// rfsm_unit: one function unit of the reconfigurable FSM.
//
// A unit realises one Boolean function (a next-state bit s_i(t+1) or an output
// y_l) in the Shannon-decomposed form of Eq. 1 / Eq. 2:
//     f = OR_k ( m_k & f_k(v_D .. v_{D+K-1}) ),  k = 0 .. 2^D-1
// with 2^D power-gated K-LUT clusters sharing the minterms of one decoder and
// one OR gate. Since only one minterm is true, only one cluster of the unit is
// awake at a time, and none when power_gate is set.
// Configuration word k of 'cfg' is the truth table of cluster k.
// Combinational.
module rfsm_unit #(
  parameter int unsigned D = 5,
  parameter int unsigned K = 6
) (
  input  logic                        power_gate,
  input  logic [(1<<D)-1:0]           minterm,
  input  logic [K-1:0]                lut_in,
  input  logic [(1<<D)-1:0][(1<<K)-1:0] cfg,
  output logic [(1<<D)-1:0]           sleep,
  output logic                        f
);
  localparam int unsigned NC = 1 << D;
  logic [NC-1:0] term;

  for (genvar k = 0; k < NC; k++) begin : g_cl
    pg_lut_cluster #(.K(K)) u_cl (
      .power_gate (power_gate),
      .minterm    (minterm[k]),
      .lut_in     (lut_in),
      .cfg        (cfg[k]),
      .sleep      (sleep[k]),
      .o          (term[k])
    );
  end

  always_comb f = |term;
endmodule
