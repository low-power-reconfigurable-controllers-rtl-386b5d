// reconfig_fsm: power-gated, LUT-based reconfigurable Moore FSM.
//
// The FSM (N state bits, NIN primary inputs, M outputs) computes every
// next-state bit by Shannon expansion over the first D = NIN+N-K variables of
// v = (x_0 .. x_{NIN-1}, s_0 .. s_{N-1}):
//     s_i(t+1) = OR_k m_k & f_i,k(v_D .. v_{NIN+N-1})             (Eq. 1)
// One shared D-to-2^D decoder builds the minterms m_k; each of the N next-state
// units holds 2^D K-LUT clusters. Each of the M output units works the same way
// on the state alone (Moore): with DO = N-KOP > 0 it decodes s_0 .. s_{DO-1}
// and has 2^DO LUTs of the remaining state bits; with KOP >= N it is a single
// LUT of the state (Eq. 2, cases 1 and 2).
// Every cluster is power-gated by SLEEP = power_gate_i + m_k', so at most one
// cluster per unit, N+M in all, is awake. 'power_gate' has one bit per unit:
// [N-1:0] the next-state units, [N+M-1:N] the output units; a gated unit
// yields 0. The configuration memory is always on.
// Configuration word layout (one 2^K-bit truth table per cluster):
//   next-state unit i, cluster k : address i*2^D + k
//   output unit l, cluster j     : address N*2^D + l*2^DO + j  (low 2^(N-DO) bits used)
// LUT bit r holds f for the LUT inputs r (v_D is the LSB of r).
// Timing: the state register updates on every rising clock edge; 'state_clr'
// loads state 0 synchronously. Outputs y are combinational from the state.
// The structure follows the design; the decoder for the output units decodes
// state bits only (Eq. 2), the word-wide configuration port and the synchronous
// state clear are this design's own choices.
module reconfig_fsm #(
  parameter int unsigned N   = rwsn_pkg::FSM_N,
  parameter int unsigned NIN = rwsn_pkg::FSM_NIN,
  parameter int unsigned M   = rwsn_pkg::FSM_M,
  parameter int unsigned K   = rwsn_pkg::LUT_K,
  parameter int unsigned KOP = rwsn_pkg::LUT_KOP,
  // derived sizes, not meant to be overridden
  parameter int unsigned D      = NIN + N - K,
  parameter int unsigned DO     = (N > KOP) ? N - KOP : 0,
  parameter int unsigned NLUT   = (N << D) + (M << DO),
  parameter int unsigned CFG_AW = $clog2(NLUT + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // configuration port (always-on domain)
  input  logic                          cfg_we,
  input  logic [CFG_AW-1:0]             cfg_addr,
  input  logic [(1<<K)-1:0]             cfg_wdata,
  output logic [(1<<K)-1:0]             cfg_rdata,
  // power control, one bit per unit
  input  logic [N+M-1:0]                power_gate,
  input  logic                          state_clr,
  // FSM
  input  logic [NIN-1:0]                x,
  output logic [M-1:0]                  y,
  output logic [N-1:0]                  state,
  // sleep signals of every cluster, for observation
  output logic [N-1:0][(1<<D)-1:0]      ns_sleep,
  output logic [M-1:0][(1<<DO)-1:0]     out_sleep
);
  localparam int unsigned WW  = 1 << K;
  localparam int unsigned NC  = 1 << D;
  localparam int unsigned NCO = 1 << DO;
  localparam int unsigned KO  = N - DO;          // output LUT inputs used
  localparam int unsigned NSL = N << D;          // next-state LUTs
  localparam int unsigned DS  = (D  > 0) ? D  : 1;
  localparam int unsigned DOS = (DO > 0) ? DO : 1;

  initial begin
    if (NIN + N < K) $error("reconfig_fsm: NIN+N must be at least K");
    if (KO > K)      $error("reconfig_fsm: output LUTs wider than the LUT word");
  end

  logic [NLUT-1:0][WW-1:0] words;

  rfsm_config_mem #(.NWORDS(NLUT), .WW(WW), .AW(CFG_AW)) u_cfg (
    .clk, .rst_n,
    .we    (cfg_we),
    .addr  (cfg_addr),
    .wdata (cfg_wdata),
    .rdata (cfg_rdata),
    .words (words)
  );

  // variable sequence v = (x, s)
  logic [NIN+N-1:0] v;
  logic [N-1:0]     s_q, s_d;
  always_comb v = {s_q, x};

  // ---------------- next-state logic ----------------
  logic [DS-1:0]  ns_sel;
  logic [NC-1:0]  ns_min;
  logic [K-1:0]   ns_lut_in;
  always_comb begin
    ns_sel = '0;
    for (int b = 0; b < int'(D); b++) ns_sel[b] = v[b];
    ns_lut_in = v[NIN+N-1 -: K];
  end

  minterm_decoder #(.D(D)) u_ns_dec (
    .en      (~&power_gate[N-1:0]),
    .sel     (ns_sel),
    .minterm (ns_min)
  );

  for (genvar i = 0; i < N; i++) begin : g_ns
    logic [NC-1:0][WW-1:0] ucfg;
    always_comb
      for (int k = 0; k < NC; k++) ucfg[k] = words[i*NC + k];

    rfsm_unit #(.D(D), .K(K)) u_unit (
      .power_gate (power_gate[i]),
      .minterm    (ns_min),
      .lut_in     (ns_lut_in),
      .cfg        (ucfg),
      .sleep      (ns_sleep[i]),
      .f          (s_d[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         s_q <= '0;
    else if (state_clr) s_q <= '0;
    else                s_q <= s_d;
  end
  always_comb state = s_q;

  // ---------------- output logic (Moore) ----------------
  logic [DOS-1:0] out_sel;
  logic [NCO-1:0] out_min;
  logic [KO-1:0]  out_lut_in;
  always_comb begin
    out_sel = '0;
    for (int b = 0; b < int'(DO); b++) out_sel[b] = s_q[b];
    out_lut_in = s_q[N-1 -: KO];
  end

  minterm_decoder #(.D(DO)) u_out_dec (
    .en      (~&power_gate[N+M-1:N]),
    .sel     (out_sel),
    .minterm (out_min)
  );

  for (genvar l = 0; l < M; l++) begin : g_out
    logic [NCO-1:0][(1<<KO)-1:0] ucfg;
    always_comb
      for (int j = 0; j < NCO; j++) ucfg[j] = words[NSL + l*NCO + j][(1<<KO)-1:0];

    rfsm_unit #(.D(DO), .K(KO)) u_unit (
      .power_gate (power_gate[N+l]),
      .minterm    (out_min),
      .lut_in     (out_lut_in),
      .cfg        (ucfg),
      .sleep      (out_sleep[l]),
      .f          (y[l])
    );
  end
endmodule
