// tb_reconfig_fsm: the reconfigurable FSM at two sizes, each configured as a
// random FSM and checked cycle by cycle against its tables (see
// rfsm_fsm_check):
//   (N, n, m) = (7, 4, 23), 6-LUTs: the default fabric, which decodes 5
//     variables for the next state and one state bit for the outputs;
//   (N, n, m) = (6, 3, 16), 6-LUTs: the size of the Crc8 benchmark, where each
//     output is a single LUT of the whole state (no output decoder).
module tb_reconfig_fsm;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic fin_a, fin_b;
  int ca, fa, cb, fb;

  rfsm_fsm_check #(.N(7), .NIN(4), .M(23), .K(6), .KOP(6)) u_a (
    .clk, .rst_n, .finished(fin_a), .checks(ca), .failures(fa));
  rfsm_fsm_check #(.N(6), .NIN(3), .M(16), .K(6), .KOP(6)) u_b (
    .clk, .rst_n, .finished(fin_b), .checks(cb), .failures(fb));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    wait (fin_a && fin_b);
    checks = ca + cb;
    failures = fa + fb;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    checks = ca + cb;
    failures = fa + fb + 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
