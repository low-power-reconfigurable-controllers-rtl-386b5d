// tb_wsn_controller: end-to-end test of the controller at its default size
// (4 microtasks, each an (N, n, m) = (7, 4, 23) reconfigurable FSM with a
// 16-bit datapath). Four programs from rfsm_prog_pkg are loaded:
//   task 0: accumulate at 16-bit precision      task 1: accumulate at 8-bit precision
//   task 2: triple (r0 += 3 * din)               task 3: signal (ext lines, waits for ext_in[1])
// The task flow graph 0 -> 1 -> 2 -> 3 (last) is run from task 0, then again
// from task 2. The testbench feeds the sample streams, models the expected
// results and cycle counts, and checks the results on dout, the ext line
// sequence and the task order. It counts how often each mechanism happened:
// power gating of idle microtasks, the gap between tasks, LUT-cluster gating
// (30 clusters awake in the running microtask, none in the others), both adder
// precisions, the carry-flag branch, waiting on an input, register retention
// across gating, configuration read-back, and the gating of FSM units a task
// does not use (the 'triple' task's seven ext output units); one that never
// happened fails.
module tb_wsn_controller;
  import rwsn_pkg::*;
  import rfsm_prog_pkg::*;
  localparam int NT = 4;
  localparam int NLUT = (FSM_N << (FSM_NIN + FSM_N - LUT_K)) + (FSM_M << (FSM_N - LUT_KOP));

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [1:0]  cfg_sel = 0;
  logic [8:0]  cfg_addr = 0;
  logic [63:0] cfg_wdata = 0, cfg_rdata;
  logic tfg_we = 0;
  logic [1:0] tfg_addr = 0, first_task = 0, cur_task;
  logic [2:0] tfg_wdata = 0;
  logic run = 0, busy, graph_done;
  logic [NT-1:0] mt_power_gate;
  logic [FSM_NIN-2:0] ext_in;
  logic [15:0] din;
  logic [EXT_W-1:0] ext_out;
  logic [NT-1:0][15:0] dout;
  logic [NT-1:0][FSM_N-1:0] mt_state;
  logic [NT-1:0][31:0] mt_fsm_awake;
  logic [NT-1:0][3:0] mt_adder_sleep;

  wsn_controller dut (
    .clk, .rst_n, .cfg_we, .cfg_sel, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .tfg_we, .tfg_addr, .tfg_wdata, .run, .first_task, .busy, .graph_done,
    .cur_task, .mt_power_gate, .ext_in, .din, .ext_out, .dout,
    .mt_state, .mt_fsm_awake, .mt_adder_sleep
  );

  always #5 clk = ~clk;

  // ---------------- stimulus and models ----------------
  logic [15:0] samples [2][32];
  int nsamp [2];
  int idx [2];
  logic [15:0] exp_r0 [NT];
  logic [15:0] exp_r2 [2];
  int exp_cycles [NT];
  logic [15:0] tri_val;
  int wait_cnt;
  int run_cycles [NT];
  logic [EXT_W-1:0] sig_seq [$];

  // mechanism counters
  int n_idle_gated, n_gap, n_lut_gating, n_prec16, n_prec8, n_carry_branch;
  int n_input_wait, n_task_switch, n_retained, n_readback, n_unit_masked;
  int exp_awake [NT];

  logic running;
  logic [FSM_N-1:0] cs;
  always_comb begin
    running = busy && !mt_power_gate[cur_task];
    cs      = mt_state[cur_task];
    ext_in  = '0;
    din     = '0;
    if (running) begin
      unique case (cur_task)
        2'd0, 2'd1: begin
          ext_in[0] = idx[cur_task[0]] < nsamp[cur_task[0]];
          din       = samples[cur_task[0]][idx[cur_task[0]][4:0]];
        end
        2'd2: din = tri_val;
        default: ext_in[1] = wait_cnt >= 3;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (running && cur_task <= 2'd1 && cs == FSM_N'(S_A0)) idx[cur_task[0]] <= idx[cur_task[0]] + 1;
    if (running && cur_task == 2'd3 && cs == FSM_N'(70)) wait_cnt <= wait_cnt + 1;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // per-cycle monitor of the power state
  always @(negedge clk) if (rst_n) begin
    if (busy) begin
      if (running) begin
        for (int t = 0; t < NT; t++) begin
          if (t == int'(cur_task)) begin
            check("running microtask: one cluster awake per mapped unit", mt_fsm_awake[t] == 32'(exp_awake[t]));
            if (exp_awake[t] < FSM_N + FSM_M) n_unit_masked++;
            if (mt_adder_sleep[t] == 4'b1100) n_prec16++;
            if (mt_adder_sleep[t] == 4'b1110) n_prec8++;
          end else begin
            check("idle microtask fully asleep", mt_fsm_awake[t] == 0 && mt_adder_sleep[t] == 4'hf);
            n_idle_gated++;
          end
        end
        n_lut_gating++;
        run_cycles[cur_task]++;
        if (cur_task <= 2'd1 && cs == FSM_N'(S_A3)) n_carry_branch++;
        if (cur_task == 2'd3 && cs == FSM_N'(70) && !ext_in[1]) n_input_wait++;
        if (cur_task == 2'd3 && (sig_seq.size() == 0 || sig_seq[$] != ext_out)) sig_seq.push_back(ext_out);
      end else begin
        check("gap: all gated", mt_power_gate == '1);
        n_gap++;
      end
    end
  end

  // load one microtask's program and precision
  task automatic load(int t, rfsm_prog p, prec_e prec, logic [FSM_N+FSM_M-1:0] mask);
    for (int a = 0; a < NLUT; a++) begin
      @(negedge clk);
      cfg_we = 1; cfg_sel = 2'(t); cfg_addr = 9'(a); cfg_wdata = p.word(a);
    end
    @(negedge clk);
    cfg_addr = 9'(NLUT); cfg_wdata = 64'(prec);
    @(negedge clk);
    cfg_addr = 9'(NLUT + 1); cfg_wdata = 64'(mask);
    @(negedge clk);
    cfg_we = 0;
    exp_awake[t] = FSM_N + FSM_M - $countones(mask);
    cfg_addr = 9'(NLUT);
    #1;
    check("precision read-back", cfg_rdata == 64'(prec));
    cfg_addr = 9'(t * 50 + 3);
    #1;
    check("LUT read-back", cfg_rdata == p.word(t * 50 + 3));
    n_readback++;
  endtask

  // model of an accumulate run
  task automatic plan_accumulate(int k, int n, int bits);
    logic [16:0] s;
    logic [15:0] mask = (bits == 16) ? 16'hffff : 16'h00ff;
    nsamp[k] = n;
    idx[k] = 0;
    exp_cycles[k] = 0;
    for (int i = 0; i < n; i++) begin
      samples[k][i] = (i % 2 == 0) ? 16'($urandom) | 16'h8080 : 16'($urandom);
      s = 17'(exp_r0[k] & mask) + 17'(samples[k][i] & mask);
      exp_r0[k] = s[15:0] & mask;
      exp_cycles[k] += 4;
      if (s[bits]) begin exp_r2[k]++; exp_cycles[k]++; end
    end
  endtask

  task automatic write_tfg(int t, bit last, int succ);
    @(negedge clk);
    tfg_we = 1; tfg_addr = 2'(t); tfg_wdata = {last, 2'(succ)};
    @(negedge clk);
    tfg_we = 0;
  endtask

  task automatic run_graph(int first, int exp_order[$]);
    int order[$];
    int prev = -1, cyc = 0;
    for (int t = 0; t < NT; t++) run_cycles[t] = 0;
    sig_seq.delete();
    wait_cnt = 0;
    @(negedge clk);
    run = 1; first_task = 2'(first);
    @(negedge clk);
    run = 0;
    while (!graph_done && cyc < 5000) begin
      if (running && int'(cur_task) != prev) begin
        order.push_back(int'(cur_task));
        prev = int'(cur_task);
        n_task_switch++;
      end
      if (!running) prev = -1;
      @(negedge clk);
      cyc++;
    end
    check("graph completed", graph_done);
    check("task order", order == exp_order);
    if (order != exp_order) $display("  order %p expected %p", order, exp_order);
    foreach (exp_order[i]) begin
      int t = exp_order[i];
      // run cycles include the cycle in which done is raised
      check($sformatf("task %0d cycle count", t), run_cycles[t] == exp_cycles[t] + 1);
      if (run_cycles[t] != exp_cycles[t] + 1)
        $display("  task %0d ran %0d cycles, expected %0d", t, run_cycles[t], exp_cycles[t] + 1);
      check($sformatf("task %0d result", t), t == 3 || dout[t] == exp_r0[t]);
      if (t != 3 && dout[t] != exp_r0[t]) $display("  task %0d dout %h expected %h", t, dout[t], exp_r0[t]);
    end
  endtask

  rfsm_prog p_acc, p_tri, p_sig;

  initial begin
    p_acc = new(); p_tri = new(); p_sig = new();
    build_accumulate(p_acc);
    build_triple(p_tri);
    build_signal(p_sig);
    for (int t = 0; t < NT; t++) exp_r0[t] = '0;
    exp_r2[0] = 0; exp_r2[1] = 0;
    nsamp[0] = 0; nsamp[1] = 0; idx[0] = 0; idx[1] = 0;
    wait_cnt = 0;
    n_idle_gated = 0; n_gap = 0; n_lut_gating = 0; n_prec16 = 0; n_prec8 = 0;
    n_carry_branch = 0; n_input_wait = 0; n_task_switch = 0; n_retained = 0; n_readback = 0;
    n_unit_masked = 0;
    for (int k = 0; k < 2; k++) for (int i = 0; i < 32; i++) samples[k][i] = '0;

    repeat (2) @(posedge clk);
    rst_n <= 1;
    load(0, p_acc, PREC_16, '0);
    load(1, p_acc, PREC_8, '0);
    // 'triple' drives no ext lines: its 7 ext output units stay gated
    load(2, p_tri, PREC_16, (FSM_N + FSM_M)'(7'h7f) << (FSM_N + 15));
    load(3, p_sig, PREC_16, '0);
    write_tfg(0, 0, 1);
    write_tfg(1, 0, 2);
    write_tfg(2, 0, 3);
    write_tfg(3, 1, 0);

    // first pass: all four tasks
    plan_accumulate(0, 24, 16);
    plan_accumulate(1, 18, 8);
    tri_val = 16'h1234;
    exp_r0[2] = 16'(3 * tri_val);
    exp_cycles[2] = 4;
    exp_cycles[3] = 2 + 4;      // two states, three wait cycles plus the exit
    run_graph(0, '{0, 1, 2, 3});
    check("carry count task 0", dut.g_mt[0].u_mt.u_rf.mem[2] == exp_r2[0]);
    check("carry count task 1", dut.g_mt[1].u_mt.u_rf.mem[2] == exp_r2[1]);
    check("signal sequence", sig_seq.size() == 4 && sig_seq[0] == 7'd1 && sig_seq[1] == 7'd2 &&
                             sig_seq[2] == 7'd4 && sig_seq[3] == 7'd8);
    if (sig_seq.size() != 4) $display("  ext sequence %p", sig_seq);

    // second pass from task 2: results accumulate in retained registers
    tri_val = 16'h0f0f;
    exp_r0[2] = 16'(exp_r0[2] + 3 * tri_val);
    run_graph(2, '{2, 3});
    if (dout[2] == exp_r0[2]) n_retained++;
    check("results of tasks 0 and 1 kept while gated", dout[0] == exp_r0[0] && dout[1] == exp_r0[1]);

    $display("mechanisms: idle-gated=%0d gaps=%0d lut-gating=%0d prec16=%0d prec8=%0d carry-branch=%0d",
             n_idle_gated, n_gap, n_lut_gating, n_prec16, n_prec8, n_carry_branch);
    $display("            input-wait=%0d task-switch=%0d retained=%0d readback=%0d unit-masked=%0d",
             n_input_wait, n_task_switch, n_retained, n_readback, n_unit_masked);
    check("mechanism: unused FSM units gated", n_unit_masked > 0);
    check("mechanism: idle microtasks gated", n_idle_gated > 0);
    check("mechanism: gap between tasks", n_gap > 0);
    check("mechanism: LUT cluster gating", n_lut_gating > 0);
    check("mechanism: 16-bit precision", n_prec16 > 0);
    check("mechanism: 8-bit precision", n_prec8 > 0);
    check("mechanism: carry-flag branch", n_carry_branch > 0);
    check("mechanism: wait on input", n_input_wait > 0);
    check("mechanism: task switches", n_task_switch == 6);
    check("mechanism: register retention", n_retained > 0);
    check("mechanism: configuration read-back", n_readback == 4);
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
