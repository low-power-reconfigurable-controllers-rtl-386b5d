// recon_microtask: a reconfigurable microtask, an FSM controlling a datapath.
//
// A microtask executes one control task of the node. It consists of
//   - a reconfigurable FSM (reconfig_fsm) whose Moore outputs are the datapath
//     control word (rwsn_pkg::mt_ctrl_t) and whose primary inputs are the
//     datapath's carry flag and NIN-1 external status lines,
//   - a 32-bit variable-precision, power-gated adder (pg_prefix_adder), used
//     at the precision held in a configuration register (16 bits by default),
//   - a 16 x 16 register file (register_file).
// Each cycle the FSM's state selects registers ra and rb; the adder forms
// ra + rb + cin; if 'we' is set, register rw takes the sum (wsel = 0) or the
// external data 'din' (wsel = 1), and the carry flag takes the adder's carry
// out when the sum is written. 'dout' is always register ra.
// Power: with 'power_gate' high the FSM units and the adder sleep, the state is
// cleared so the task restarts at state 0 when it is woken, and the outputs
// read 0 (ra = 0, so 'dout' shows register 0). The register file and all
// configuration are retained (always on).
// Configuration: addresses 0 .. NLUT-1 hold the FSM's LUT words (see
// reconfig_fsm); address NLUT holds the adder precision in bits [1:0];
// address NLUT+1 holds the unit gate mask, one bit per FSM unit (bits [N-1:0]
// state bits, [N+M-1:N] outputs): a task that maps fewer state bits or outputs
// than the fabric has keeps the unused units power-gated. Reset: 16-bit
// precision, all units in use.
// The components follow the design; the control-word layout, the FSM input
// assignment, register retention and the configuration map are this design's
// own choices.
module recon_microtask
  import rwsn_pkg::*;
#(
  parameter int unsigned N   = FSM_N,
  parameter int unsigned NIN = FSM_NIN,
  parameter int unsigned M   = FSM_M,
  parameter int unsigned K   = LUT_K,
  parameter int unsigned KOP = LUT_KOP,
  // derived sizes, not meant to be overridden
  parameter int unsigned D      = NIN + N - K,
  parameter int unsigned DO     = (N > KOP) ? N - KOP : 0,
  parameter int unsigned NLUT   = (N << D) + (M << DO),
  parameter int unsigned CFG_AW = $clog2(NLUT + 2)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration
  input  logic                 cfg_we,
  input  logic [CFG_AW-1:0]    cfg_addr,
  input  logic [(1<<K)-1:0]    cfg_wdata,
  output logic [(1<<K)-1:0]    cfg_rdata,
  // control from the system monitor
  input  logic                 power_gate,
  // node side
  input  logic [NIN-2:0]       ext_in,
  input  logic [DATA_W-1:0]    din,
  output logic [EXT_W-1:0]     ext_out,
  output logic [DATA_W-1:0]    dout,
  output logic                 done,
  // observation
  output logic [N-1:0]         state,
  output logic [ADD_CL-1:0]    adder_sleep,
  output logic [31:0]          fsm_awake      // LUT clusters awake now
);
  initial if (M < CTRL_W) $error("recon_microtask: M must hold the control word");

  localparam int unsigned FSM_AW = $clog2(NLUT + 1);
  localparam int unsigned WW     = 1 << K;
  initial if (N + M > WW) $error("recon_microtask: unit gate mask wider than a word");

  // precision register (address NLUT) and unit gate mask (address NLUT+1)
  prec_e          prec_q;
  logic [N+M-1:0] unit_gate_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prec_q      <= PREC_16;
      unit_gate_q <= '0;
    end else if (cfg_we) begin
      if (32'(cfg_addr) == NLUT)     prec_q      <= prec_e'(cfg_wdata[1:0]);
      if (32'(cfg_addr) == NLUT + 1) unit_gate_q <= cfg_wdata[N+M-1:0];
    end
  end

  logic [WW-1:0] fsm_rdata;
  logic          fsm_we;
  always_comb begin
    fsm_we = cfg_we && (32'(cfg_addr) < NLUT);
    if (32'(cfg_addr) == NLUT)          cfg_rdata = WW'(prec_q);
    else if (32'(cfg_addr) == NLUT + 1) cfg_rdata = WW'(unit_gate_q);
    else                                cfg_rdata = fsm_rdata;
  end

  // FSM
  logic [M-1:0]               y;
  logic [N-1:0][(1<<D)-1:0]   ns_sleep;
  logic [M-1:0][(1<<DO)-1:0]  out_sleep;
  logic                       cflag_q;
  mt_ctrl_t                   ctrl;

  reconfig_fsm #(.N(N), .NIN(NIN), .M(M), .K(K), .KOP(KOP)) u_fsm (
    .clk, .rst_n,
    .cfg_we     (fsm_we),
    .cfg_addr   (cfg_addr[FSM_AW-1:0]),
    .cfg_wdata  (cfg_wdata),
    .cfg_rdata  (fsm_rdata),
    .power_gate ({(N+M){power_gate}} | unit_gate_q),
    .state_clr  (power_gate),
    .x          ({cflag_q, ext_in}),
    .y          (y),
    .state      (state),
    .ns_sleep   (ns_sleep),
    .out_sleep  (out_sleep)
  );

  always_comb begin
    ctrl = mt_ctrl_t'(y[CTRL_W-1:0]);
    fsm_awake = '0;
    for (int i = 0; i < int'(N); i++)
      for (int k = 0; k < (1 << D); k++) fsm_awake += 32'(!ns_sleep[i][k]);
    for (int l = 0; l < int'(M); l++)
      for (int j = 0; j < (1 << DO); j++) fsm_awake += 32'(!out_sleep[l][j]);
  end

  // datapath
  logic [DATA_W-1:0] rd_a, rd_b, wdata;
  logic [ADD_W-1:0]  sum;
  logic              cout;
  logic              we;

  register_file #(.DEPTH(RF_DEPTH), .W(DATA_W)) u_rf (
    .clk, .rst_n,
    .ra_addr (ctrl.ra),
    .ra_data (rd_a),
    .rb_addr (ctrl.rb),
    .rb_data (rd_b),
    .we      (we),
    .w_addr  (ctrl.rw),
    .w_data  (wdata)
  );

  pg_prefix_adder #(.CL(ADD_CL), .CW(CL_W)) u_add (
    .power_gate (power_gate),
    .prec       (prec_q),
    .a          (ADD_W'(rd_a)),
    .b          (ADD_W'(rd_b)),
    .cin        (ctrl.cin),
    .sum        (sum),
    .cout       (cout),
    .cl_sleep   (adder_sleep)
  );

  always_comb begin
    we    = ctrl.we & ~power_gate;
    wdata = ctrl.wsel ? din : sum[DATA_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 cflag_q <= 1'b0;
    else if (we && !ctrl.wsel)  cflag_q <= cout;
  end

  always_comb begin
    ext_out = ctrl.ext;
    done    = ctrl.done;
    dout    = rd_a;
  end
endmodule
