// rfsm_fsm_check: checker used by tb_reconfig_fsm. It instantiates a
// reconfigurable FSM of the given (N, n, m, K, K_op), configures it as a random
// FSM over all 2^N states and 2^n input values (configuration computed by
// rfsm_prog from the FSM tables), loads and reads back the configuration and
// compares state and outputs with the tables for 2000 random input cycles.
// Power checks: exactly N+m clusters awake, a gated next-state unit forces its
// state bit to 0 and a gated output unit its output, full gating puts every
// cluster to sleep, and state_clr returns to state 0. 'finished' rises when
// done; checks and failures are counted.
module rfsm_fsm_check #(
  parameter int N = 7, NIN = 4, M = 23, K = 6, KOP = 6
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  import rfsm_prog_pkg::*;
  localparam int D = NIN + N - K, DO = (N > KOP) ? N - KOP : 0, NLUT = (N << D) + (M << DO);
  localparam int AW = $clog2(NLUT + 1);

  logic cfg_we = 0;
  logic [AW-1:0] cfg_addr = '0;
  logic [63:0] cfg_wdata = '0, cfg_rdata;
  logic [N+M-1:0] power_gate = '0;
  logic state_clr = 0;
  logic [NIN-1:0] x = '0;
  logic [M-1:0] y;
  logic [N-1:0] state, exp_s;
  logic [N-1:0][(1<<D)-1:0] ns_sleep;
  logic [M-1:0][(1<<DO)-1:0] out_sleep;
  int awake;

  rfsm_prog #(N, NIN, M, K, KOP) prog;

  reconfig_fsm #(.N(N), .NIN(NIN), .M(M), .K(K), .KOP(KOP)) dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .power_gate, .state_clr, .x, .y, .state, .ns_sleep, .out_sleep
  );

  function automatic int count_awake();
    int c = 0;
    for (int i = 0; i < N; i++) for (int k = 0; k < (1 << D); k++) c += int'(!ns_sleep[i][k]);
    for (int l = 0; l < M; l++) for (int j = 0; j < (1 << DO); j++) c += int'(!out_sleep[l][j]);
    return c;
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL (%0d,%0d,%0d) %s (state=%0d y=%h)", N, NIN, M, what, state, y);
    end
  endtask

  initial begin
    checks = 0; failures = 0; finished = 0;
    prog = new();
    prog.fill_random();
    @(posedge clk iff rst_n);
    // load the configuration
    for (int a = 0; a < NLUT; a++) begin
      cfg_we <= 1; cfg_addr <= AW'(a); cfg_wdata <= prog.word(a);
      @(posedge clk);
    end
    cfg_we <= 0;
    for (int a = 0; a < NLUT; a += 7) begin
      cfg_addr <= AW'(a);
      @(posedge clk);
      check("config read-back", cfg_rdata === prog.word(a));
    end
    // restart from state 0
    state_clr <= 1;
    @(posedge clk);
    state_clr <= 0;
    #1;
    check("state_clr", state === '0);
    // random run
    exp_s = '0;
    for (int t = 0; t < 2000; t++) begin
      x = NIN'($urandom);
      #1;
      check("outputs", y === prog.outputs(exp_s));
      awake = count_awake();
      check("N+m clusters awake", awake == N + M);
      exp_s = prog.next_state(exp_s, x);
      @(posedge clk);
      #1;
      check("next state", state === exp_s);
    end
    // gate one next-state unit and one output unit
    power_gate = '0;
    power_gate[2] = 1'b1;
    power_gate[N + 5] = 1'b1;
    for (int t = 0; t < 200; t++) begin
      x = NIN'($urandom);
      #1;
      check("gated output unit is 0", y[5] == 1'b0);
      check("gated output cluster count", count_awake() == N + M - 2);
      exp_s = prog.next_state(exp_s, x);
      exp_s[2] = 1'b0;
      @(posedge clk);
      #1;
      check("gated state bit", state === exp_s);
    end
    // standby: everything gated
    power_gate = '1;
    #1;
    check("standby: no cluster awake", count_awake() == 0);
    check("standby: outputs 0", y === '0);
    @(posedge clk);
    #1;
    check("standby: next state 0", state === '0);
    finished = 1;
  end
endmodule
