// pg_prefix_adder: variable-precision, power-gated parallel-prefix adder.
//
// A W = 32-bit adder is split into CL = 4 clusters of CW = 8 bits, each with
// its own sleep domain (see adder_cluster). 'prec' selects how many clusters
// take part (prec_e: 8, 16, 24 or 32 bits); the clusters above the selected
// precision are power-gated and read as 0, and all are gated by 'power_gate'.
// The group generate/propagate of the clusters feed a Kogge-Stone prefix
// network over the clusters that returns each cluster's carry in:
//     C_0 = cin,  C_{j+1} = G[j:0] | P[j:0] & cin
// 'cout' is the carry out of the most significant active cluster, i.e. of an
// 8*(prec+1)-bit addition. Combinational.
// The 32-bit size, the 4 clusters and their power gating follow the design;
// the cluster-level carry network and the precision encoding are this
// design's choice.
module pg_prefix_adder
  import rwsn_pkg::*;
#(
  parameter int unsigned CL = ADD_CL,
  parameter int unsigned CW = CL_W,
  parameter int unsigned W  = CL * CW
) (
  input  logic                      power_gate,  // whole adder off
  input  logic [$clog2(CL)-1:0]     prec,        // active clusters - 1
  input  logic [W-1:0]              a,
  input  logic [W-1:0]              b,
  input  logic                      cin,
  output logic [W-1:0]              sum,
  output logic                      cout,
  output logic [CL-1:0]             cl_sleep     // sleep control per cluster
);
  localparam int unsigned LV = (CL > 1) ? $clog2(CL) : 1;

  logic [CL-1:0] gg, gp;
  logic [CL:0]   cc;          // carry into cluster j; cc[CL] out of the top

  always_comb
    for (int j = 0; j < int'(CL); j++)
      cl_sleep[j] = power_gate | (32'(j) > 32'(prec));

  // cluster-level Kogge-Stone prefix network
  logic [LV:0][CL-1:0] g, p;
  always_comb begin
    g[0] = gg;
    p[0] = gp;
  end

  for (genvar l = 0; l < LV; l++) begin : g_lvl
    for (genvar j = 0; j < CL; j++) begin : g_grp
      if (j >= (1 << l)) begin : g_op
        assign g[l+1][j] = g[l][j] | (p[l][j] & g[l][j - (1 << l)]);
        assign p[l+1][j] = p[l][j] & p[l][j - (1 << l)];
      end else begin : g_pass
        assign g[l+1][j] = g[l][j];
        assign p[l+1][j] = p[l][j];
      end
    end
  end

  always_comb begin
    cc[0] = cin & ~power_gate;
    for (int j = 1; j <= int'(CL); j++)
      cc[j] = g[LV][j-1] | (p[LV][j-1] & cc[0]);
    cout = cc[32'(prec) + 1];
  end

  for (genvar j = 0; j < CL; j++) begin : g_cl
    adder_cluster #(.CW(CW)) u_cl (
      .sleep (cl_sleep[j]),
      .a     (a[j*CW +: CW]),
      .b     (b[j*CW +: CW]),
      .cin   (cc[j]),
      .sum   (sum[j*CW +: CW]),
      .gg    (gg[j]),
      .gp    (gp[j])
    );
  end
endmodule
