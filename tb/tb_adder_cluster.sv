// tb_adder_cluster: exhaustive over carry in and random over operands, checks
// an 8-bit slice's sum, group generate (carry out with carry in 0), group
// propagate (all bits propagate), and the 0 clamp while asleep.
module tb_adder_cluster;
  int checks = 0, failures = 0;
  logic sleep, cin, gg, gp;
  logic [7:0] a, b, sum;
  logic [8:0] full;

  adder_cluster #(.CW(8)) dut (.sleep, .a, .b, .cin, .sum, .gg, .gp);

  initial begin
    for (int t = 0; t < 3000; t++) begin
      a = 8'($urandom); b = 8'($urandom);
      if (t % 5 == 0) b = ~a;       // exercise the propagate chain
      cin = $urandom_range(0, 1) == 1;
      sleep = (t % 7 == 0);
      #1;
      full = 9'(a) + 9'(b) + 9'(cin);
      checks++;
      if (sleep) begin
        if ({sum, gg, gp} !== '0) begin failures++; $display("FAIL sleeping slice not clamped"); end
      end else if (sum !== full[7:0] || gg !== ((9'(a) + 9'(b)) > 9'd255) || gp !== ((a ^ b) == 8'hff)) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%0b sum=%h gg=%0b gp=%0b", a, b, cin, sum, gg, gp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
