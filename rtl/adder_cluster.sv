// adder_cluster: one power-gated 8-bit slice of the variable-precision adder.
//
// Input stage: the operands are isolated (forced to 0) while the slice sleeps,
// so no switching reaches the gated logic. Carry logic: bit generate and
// propagate signals are combined by a Kogge-Stone parallel-prefix tree into
// G[i:0] / P[i:0] for every bit i of the slice. The slice's group generate
// and propagate (G[CW-1:0], P[CW-1:0]) go to the adder-level prefix network,
// which returns the slice's carry in; the carries of the slice are then
//     c_0 = cin,  c_{i+1} = G[i:0] | P[i:0] & cin
// and sum_i = p_i ^ c_i. Output stage: sum, group G and group P pass through
// isolation cells that clamp to 0 while the slice sleeps.
// Combinational. The design specifies 8-bit parallel-prefix slices with input
// and output stages; Kogge-Stone and operand isolation are this design's
// choice of insides.
module adder_cluster #(
  parameter int unsigned CW = 8
) (
  input  logic          sleep,  // 1: slice power-gated
  input  logic [CW-1:0] a,
  input  logic [CW-1:0] b,
  input  logic          cin,    // carry into the slice
  output logic [CW-1:0] sum,
  output logic          gg,     // group generate
  output logic          gp      // group propagate
);
  localparam int unsigned LV = (CW > 1) ? $clog2(CW) : 1;

  // input stage
  logic [CW-1:0] ai, bi;
  always_comb begin
    ai = sleep ? '0 : a;
    bi = sleep ? '0 : b;
  end

  // Kogge-Stone prefix tree: level l combines spans 2^l apart
  logic [LV:0][CW-1:0] g, p;
  logic [CW-1:0]       c, sum_raw;
  always_comb begin
    g[0] = ai & bi;
    p[0] = ai ^ bi;
  end

  for (genvar l = 0; l < LV; l++) begin : g_lvl
    for (genvar i = 0; i < CW; i++) begin : g_bit
      if (i >= (1 << l)) begin : g_op
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i - (1 << l)]);
        assign p[l+1][i] = p[l][i] & p[l][i - (1 << l)];
      end else begin : g_pass
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  always_comb begin
    c[0] = cin;
    for (int i = 1; i < int'(CW); i++)
      c[i] = g[LV][i-1] | (p[LV][i-1] & cin);
    sum_raw = p[0] ^ c;
  end

  // output stage
  iso_cell #(.W(CW + 2)) u_iso (
    .sleep (sleep),
    .i     ({g[LV][CW-1], p[LV][CW-1], sum_raw}),
    .o     ({gg, gp, sum})
  );
endmodule
