// tb_benchmark_fsms: maps FSMs of the four benchmark sizes onto one
// reconfigurable FSM of the default size (N, n, m) = (7, 4, 23) and runs each
// for the benchmark's number of state transitions:
//   Crc8 (6,3,16) 71, receiveData (6,3,23) 332, Crc16 (7,4,19) 73,
//   firBasic (7,3,21) 168.
// The benchmarks' own state tables are not available, so each is replaced by a
// random FSM of the same size. Unused state bits and outputs are power-gated
// through the per-unit gates; unused inputs are driven with random values and
// must not matter. Checks each cycle: state and used outputs against the mapped
// FSM's tables, unused outputs 0, and exactly one awake cluster per used unit.
module tb_benchmark_fsms;
  import rfsm_prog_pkg::*;
  localparam int N = 7, NIN = 4, M = 23, K = 6, KOP = 6;
  localparam int D = NIN + N - K, DO = N - KOP, NLUT = (N << D) + (M << DO);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [8:0] cfg_addr = '0;
  logic [63:0] cfg_wdata = '0, cfg_rdata;
  logic [N+M-1:0] power_gate = '1;
  logic state_clr = 0;
  logic [NIN-1:0] x = '0;
  logic [M-1:0] y;
  logic [N-1:0] state;
  logic [N-1:0][(1<<D)-1:0] ns_sleep;
  logic [M-1:0][(1<<DO)-1:0] out_sleep;

  reconfig_fsm dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .power_gate, .state_clr, .x, .y, .state, .ns_sleep, .out_sleep
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int count_awake();
    int c = 0;
    for (int i = 0; i < N; i++) for (int k = 0; k < (1 << D); k++) c += int'(!ns_sleep[i][k]);
    for (int l = 0; l < M; l++) for (int j = 0; j < (1 << DO); j++) c += int'(!out_sleep[l][j]);
    return c;
  endfunction

  task automatic run_benchmark(string name, int nb, int ib, int mb, int nst);
    rfsm_prog #(N, NIN, M, K, KOP) tgt, fab;
    logic [N-1:0] exp_s;
    logic [M-1:0] used;
    int sm, xm;
    tgt = new();
    fab  = new();
    tgt.fill_random();
    sm = (1 << nb) - 1;
    xm = (1 << ib) - 1;
    used = (M'(1) << mb) - 1;
    // embed: the mapped FSM sees only its own state bits and inputs
    for (int s = 0; s < (1 << N); s++) begin
      fab.out_tab[s] = tgt.out_tab[s & sm] & used;
      for (int xi = 0; xi < (1 << NIN); xi++)
        fab.ns_tab[s][xi] = tgt.ns_tab[s & sm][xi & xm] & N'(sm);
    end
    power_gate = '1;
    for (int a = 0; a < NLUT; a++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = 9'(a); cfg_wdata = fab.word(a);
    end
    @(negedge clk);
    cfg_we = 0;
    // gate the units the benchmark does not use
    power_gate = '0;
    for (int i = nb; i < N; i++) power_gate[i] = 1'b1;
    for (int l = mb; l < M; l++) power_gate[N + l] = 1'b1;
    state_clr = 1;
    @(negedge clk);
    state_clr = 0;
    exp_s = '0;
    for (int t = 0; t < nst; t++) begin
      x = NIN'($urandom);
      #1;
      check({name, ": used outputs"}, (y & used) === (tgt.out_tab[exp_s] & used));
      check({name, ": unused outputs gated to 0"}, (y & ~used) === '0);
      check({name, ": one awake cluster per used unit"}, count_awake() == nb + mb);
      exp_s = tgt.ns_tab[exp_s][x & NIN'(xm)] & N'(sm);
      @(negedge clk);
      check({name, ": state"}, state === exp_s);
    end
    $display("%s (%0d,%0d,%0d): %0d transitions checked", name, nb, ib, mb, nst);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run_benchmark("Crc8",        6, 3, 16, 71);
    run_benchmark("receiveData", 6, 3, 23, 332);
    run_benchmark("Crc16",       7, 4, 19, 73);
    run_benchmark("firBasic",    7, 3, 21, 168);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
