// tb_system_monitor: four microtasks are modelled by the testbench: each
// raises 'done' a random number of cycles after its gate opens. The task flow
// graph 2 -> 0 -> 3 -> 1 (last) is written into the monitor and run twice,
// then a graph that runs one task only. Checks: the order of the tasks, that
// only the running task's gate is open, the one-cycle all-gated gap between
// tasks, busy, and the graph_done pulse.
module tb_system_monitor;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic tfg_we = 0;
  logic [1:0] tfg_addr = 0, first_task = 0, cur_task;
  logic [2:0] tfg_wdata = 0;
  logic run = 0, busy, graph_done;
  logic [3:0] mt_done, mt_power_gate;
  int remaining [4];
  int order [$];
  int gaps;

  system_monitor #(.NT(4)) dut (
    .clk, .rst_n, .tfg_we, .tfg_addr, .tfg_wdata, .run, .first_task,
    .mt_done, .mt_power_gate, .busy, .cur_task, .graph_done
  );

  always #5 clk = ~clk;

  // microtask models: done while awake and the countdown has expired
  always_comb for (int t = 0; t < 4; t++) mt_done[t] = !mt_power_gate[t] && remaining[t] == 0;
  always_ff @(posedge clk) begin
    for (int t = 0; t < 4; t++) begin
      if (mt_power_gate[t]) remaining[t] <= 1 + int'($urandom_range(0, 6));
      else if (remaining[t] > 0) remaining[t] <= remaining[t] - 1;
    end
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic write_tfg(int t, bit last, int succ);
    @(negedge clk);
    tfg_we = 1; tfg_addr = 2'(t); tfg_wdata = {last, 2'(succ)};
    @(negedge clk);
    tfg_we = 0;
  endtask

  task automatic run_graph(int first, int exp[$]);
    int prev_awake = -1, cyc = 0;
    order.delete();
    gaps = 0;
    @(negedge clk);
    run = 1; first_task = 2'(first);
    @(negedge clk);
    run = 0;
    while (!graph_done && cyc < 500) begin
      check("one microtask awake at most", $countones(~mt_power_gate) <= 1);
      check("busy while running", busy);
      if ($countones(~mt_power_gate) == 1) begin
        for (int t = 0; t < 4; t++)
          if (!mt_power_gate[t] && t != prev_awake) begin order.push_back(t); prev_awake = t; end
      end else begin
        gaps++;
        prev_awake = -1;
      end
      @(negedge clk);
      cyc++;
    end
    check("graph_done pulse", graph_done);
    check("task order", order == exp);
    if (order != exp) $display("  order %p expected %p", order, exp);
    check("one gap after each task", gaps == exp.size());
    @(negedge clk);
    check("graph_done is one cycle", !graph_done && !busy);
  endtask

  initial begin
    for (int t = 0; t < 4; t++) remaining[t] = 3;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    check("idle after reset", mt_power_gate == 4'hf && !busy);
    write_tfg(2, 0, 0);
    write_tfg(0, 0, 3);
    write_tfg(3, 0, 1);
    write_tfg(1, 1, 0);
    run_graph(2, '{2, 0, 3, 1});
    run_graph(2, '{2, 0, 3, 1});
    run_graph(1, '{1});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
