// tb_recon_microtask: a reconfigurable microtask at its default size running
// the 'accumulate' program (see rfsm_prog_pkg): it sums a stream of 16-bit
// samples into r0 and counts the additions that carry in r2. The expected sums,
// carry counts and cycle counts (4 cycles per sample, 5 with a carry) come
// from a model in this testbench. The first run uses the 16-bit precision
// (two adder clusters asleep), the second switches to 8-bit precision through
// the configuration port (three asleep). It also checks standby (everything
// asleep, outputs 0, state 0), that N+m = 30 LUT clusters are awake while
// running (29 once an unused output unit is masked off for the second run),
// register retention across power gating, and configuration read-back.
module tb_recon_microtask;
  import rwsn_pkg::*;
  import rfsm_prog_pkg::*;
  localparam int NLUT = (FSM_N << (FSM_NIN + FSM_N - LUT_K)) + (FSM_M << (FSM_N - LUT_KOP));

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [8:0]  cfg_addr = '0;
  logic [63:0] cfg_wdata = '0, cfg_rdata;
  logic power_gate = 1;
  logic [FSM_NIN-2:0] ext_in;
  logic [15:0] din, dout;
  logic [EXT_W-1:0] ext_out;
  logic done;
  logic [FSM_N-1:0] state;
  logic [3:0] adder_sleep;
  logic [31:0] fsm_awake;

  recon_microtask dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata, .power_gate,
    .ext_in, .din, .ext_out, .dout, .done, .state, .adder_sleep, .fsm_awake
  );

  always #5 clk = ~clk;

  rfsm_prog prog;
  logic [15:0] samples [64];
  int nsamp, idx;
  logic [15:0] m_r0, m_r2;
  int exp_awake = FSM_N + FSM_M;

  // sample stream: din is the next sample, ext_in[0] says more are coming
  always_comb begin
    ext_in    = '0;
    ext_in[0] = idx < nsamp;
    din       = samples[idx[5:0]];
  end
  always_ff @(posedge clk) if (!power_gate && state == FSM_N'(S_A0)) idx <= idx + 1;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t state=%0d)", what, $time, state);
    end
  endtask

  task automatic run_task(int n, int bits, string tag);
    int exp_cycles = 0, cycles = 0;
    logic [16:0] s;
    logic [15:0] mask = (bits == 16) ? 16'hffff : 16'h00ff;
    nsamp = n;
    idx = 0;
    for (int i = 0; i < n; i++) begin
      samples[i] = (i % 3 == 0) ? 16'($urandom) | 16'hc0c0 : 16'($urandom);
      s = 17'(m_r0 & mask) + 17'(samples[i] & mask);
      m_r0 = s[15:0] & mask;
      exp_cycles += 4;
      if (s[bits]) begin
        m_r2++;
        exp_cycles++;
      end
    end
    @(negedge clk);
    power_gate = 0;
    while (!done && cycles < 2000) begin
      #1;
      check({tag, ": one LUT cluster awake per mapped unit"}, fsm_awake == 32'(exp_awake));
      check({tag, ": adder precision gating"}, adder_sleep == ((bits == 16) ? 4'b1100 : 4'b1110));
      @(negedge clk);
      cycles++;
    end
    check({tag, ": cycle count"}, cycles == exp_cycles);
    if (cycles != exp_cycles) $display("  cycles %0d expected %0d", cycles, exp_cycles);
    check({tag, ": done lines"}, ext_out == 7'h55);
    check({tag, ": sum on dout"}, dout == m_r0);
    if (dout != m_r0) $display("  dout %h expected %h", dout, m_r0);
    check({tag, ": carry count"}, dut.u_rf.mem[2] == m_r2);
    power_gate = 1;
    #1;
    check({tag, ": gated outputs 0"}, ext_out == '0 && !done);
    check({tag, ": gated clusters asleep"}, fsm_awake == 0 && adder_sleep == 4'hf);
    @(negedge clk);
    check({tag, ": state back to 0"}, state == '0);
    check({tag, ": result retained"}, dout == m_r0);
  endtask

  initial begin
    prog = new();
    build_accumulate(prog);
    idx = 0; nsamp = 0; m_r0 = 0; m_r2 = 0;
    for (int i = 0; i < 64; i++) samples[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int a = 0; a < NLUT; a++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = 9'(a); cfg_wdata = prog.word(a);
    end
    @(negedge clk);
    cfg_we = 0;
    cfg_addr = 9'(NLUT);
    #1;
    check("default precision 16", cfg_rdata == 64'(PREC_16));
    cfg_addr = 9'd100;
    #1;
    check("LUT word read-back", cfg_rdata == prog.word(100));
    check("standby: no cluster awake", fsm_awake == 0 && adder_sleep == 4'hf && state == 0);

    run_task(20, 16, "16-bit");

    // switch the adder to 8-bit precision
    @(negedge clk);
    cfg_we = 1; cfg_addr = 9'(NLUT); cfg_wdata = 64'(PREC_8);
    @(negedge clk);
    cfg_we = 0;
    #1;
    check("precision read-back", cfg_rdata == 64'(PREC_8));
    // output y[20] (ext line 5) is not used by the program: gate its unit
    @(negedge clk);
    cfg_we = 1; cfg_addr = 9'(NLUT + 1); cfg_wdata = 64'(1) << (FSM_N + 20);
    @(negedge clk);
    cfg_we = 0;
    #1;
    check("unit mask read-back", cfg_rdata == (64'(1) << (FSM_N + 20)));
    exp_awake = FSM_N + FSM_M - 1;
    run_task(25, 8, "8-bit");

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
