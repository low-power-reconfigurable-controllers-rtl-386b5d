// tb_pg_prefix_adder: the 32-bit adder at every precision (8, 16, 24, 32 bits).
// For random operands (with long carry chains forced often) it checks that the
// result is the sum modulo 2^(8p), that bits above the precision are 0, that
// cout is the carry out of bit 8p-1, that the clusters above the precision
// sleep, and that power_gate puts all clusters to sleep with a 0 result.
module tb_pg_prefix_adder;
  int checks = 0, failures = 0;
  logic        power_gate, cin, cout;
  logic [1:0]  prec;
  logic [31:0] a, b, sum;
  logic [3:0]  cl_sleep;
  logic [32:0] full;
  logic [31:0] mask;
  int          bits;
  logic        exp_cout;

  pg_prefix_adder dut (.power_gate, .prec, .a, .b, .cin, .sum, .cout, .cl_sleep);

  initial begin
    for (int t = 0; t < 4000; t++) begin
      a = $urandom; b = $urandom;
      if (t % 4 == 0) b = ~a;
      cin  = $urandom_range(0, 1) == 1;
      prec = 2'(t % 4);
      power_gate = (t % 11 == 0);
      #1;
      bits = 8 * (int'(prec) + 1);
      mask = (bits == 32) ? 32'hffff_ffff : (32'd1 << bits) - 1;
      full = 33'(a & mask) + 33'(b & mask) + 33'(cin);
      exp_cout = full[bits];
      checks++;
      if (power_gate) begin
        if (sum !== '0 || cl_sleep !== 4'hf || cout !== 1'b0) begin
          failures++; $display("FAIL gated adder sum=%h sleep=%b", sum, cl_sleep);
        end
      end else begin
        if (sum !== (full[31:0] & mask) || cout !== exp_cout || cl_sleep !== ~((4'b0010 << prec) - 4'd1)) begin
          failures++;
          $display("FAIL prec=%0d a=%h b=%h cin=%0b sum=%h cout=%0b sleep=%b", prec, a, b, cin, sum, cout, cl_sleep);
        end
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
