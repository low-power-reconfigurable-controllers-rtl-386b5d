// wsn_controller: low-power reconfigurable controller of a sensor node.
//
// The controller runs a task flow graph of control tasks. Each task runs on a
// reconfigurable microtask (recon_microtask: a power-gated LUT-based FSM
// driving a 16-bit datapath of adder and register file); the system monitor
// (system_monitor) starts the tasks in graph order and keeps every microtask
// but the running one power-gated. NT microtasks sit side by side; each is
// configured through the shared configuration port, selected by 'cfg_sel'.
// Node side: the external status lines and the data input are broadcast to
// all microtasks; since a gated microtask's outputs are clamped to 0, the
// control lines 'ext_out' are the OR of all microtasks' lines. Each
// microtask's register 0 appears on 'dout' while it is gated (its result).
// Timing: see system_monitor; configuration writes take effect at the next
// clock edge. NT = 4 microtasks (one per evaluated benchmark task) and the
// node-side wiring are this design's choices.
module wsn_controller
  import rwsn_pkg::*;
#(
  parameter int unsigned NT  = 4,
  parameter int unsigned N   = FSM_N,
  parameter int unsigned NIN = FSM_NIN,
  parameter int unsigned M   = FSM_M,
  parameter int unsigned K   = LUT_K,
  parameter int unsigned KOP = LUT_KOP,
  // derived sizes, not meant to be overridden
  parameter int unsigned TW     = (NT > 1) ? $clog2(NT) : 1,
  parameter int unsigned D      = NIN + N - K,
  parameter int unsigned DO     = (N > KOP) ? N - KOP : 0,
  parameter int unsigned NLUT   = (N << D) + (M << DO),
  parameter int unsigned CFG_AW = $clog2(NLUT + 2)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // microtask configuration
  input  logic                          cfg_we,
  input  logic [TW-1:0]                 cfg_sel,
  input  logic [CFG_AW-1:0]             cfg_addr,
  input  logic [(1<<K)-1:0]             cfg_wdata,
  output logic [(1<<K)-1:0]             cfg_rdata,
  // task flow graph
  input  logic                          tfg_we,
  input  logic [TW-1:0]                 tfg_addr,
  input  logic [TW:0]                   tfg_wdata,
  input  logic                          run,
  input  logic [TW-1:0]                 first_task,
  output logic                          busy,
  output logic                          graph_done,
  output logic [TW-1:0]                 cur_task,
  output logic [NT-1:0]                 mt_power_gate,
  // node side
  input  logic [NIN-2:0]                ext_in,
  input  logic [DATA_W-1:0]             din,
  output logic [EXT_W-1:0]              ext_out,
  output logic [NT-1:0][DATA_W-1:0]     dout,
  // observation
  output logic [NT-1:0][N-1:0]          mt_state,
  output logic [NT-1:0][31:0]           mt_fsm_awake,
  output logic [NT-1:0][ADD_CL-1:0]     mt_adder_sleep
);
  logic [NT-1:0]                  done;
  logic [NT-1:0][EXT_W-1:0]       ext;
  logic [NT-1:0][(1<<K)-1:0]      rdata;

  system_monitor #(.NT(NT), .TW(TW)) u_mon (
    .clk, .rst_n,
    .tfg_we, .tfg_addr, .tfg_wdata,
    .run, .first_task,
    .mt_done       (done),
    .mt_power_gate (mt_power_gate),
    .busy, .cur_task, .graph_done
  );

  for (genvar t = 0; t < NT; t++) begin : g_mt
    recon_microtask #(.N(N), .NIN(NIN), .M(M), .K(K), .KOP(KOP)) u_mt (
      .clk, .rst_n,
      .cfg_we      (cfg_we && cfg_sel == TW'(t)),
      .cfg_addr    (cfg_addr),
      .cfg_wdata   (cfg_wdata),
      .cfg_rdata   (rdata[t]),
      .power_gate  (mt_power_gate[t]),
      .ext_in      (ext_in),
      .din         (din),
      .ext_out     (ext[t]),
      .dout        (dout[t]),
      .done        (done[t]),
      .state       (mt_state[t]),
      .adder_sleep (mt_adder_sleep[t]),
      .fsm_awake   (mt_fsm_awake[t])
    );
  end

  always_comb begin
    ext_out = '0;
    for (int t = 0; t < int'(NT); t++) ext_out |= ext[t];
    cfg_rdata = rdata[cfg_sel];
  end
endmodule
