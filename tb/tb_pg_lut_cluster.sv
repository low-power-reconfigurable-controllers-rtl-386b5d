// tb_pg_lut_cluster: random truth tables and inputs on a 6-LUT cluster; checks
// SLEEP = power_gate | ~minterm and o = minterm & LUT(lut_in) while awake,
// o = 0 while asleep.
module tb_pg_lut_cluster;
  int checks = 0, failures = 0;
  logic        power_gate, minterm, sleep, o;
  logic [5:0]  lut_in;
  logic [63:0] cfg;
  logic        exp_sleep, exp_o;

  pg_lut_cluster #(.K(6)) dut (.power_gate, .minterm, .lut_in, .cfg, .sleep, .o);

  initial begin
    for (int t = 0; t < 500; t++) begin
      cfg        = {$urandom, $urandom};
      lut_in     = 6'($urandom);
      power_gate = $urandom_range(0, 3) == 0;
      minterm    = $urandom_range(0, 3) != 0;
      #1;
      exp_sleep = power_gate || !minterm;
      exp_o     = exp_sleep ? 1'b0 : ((cfg >> lut_in) & 64'd1) != 0;
      checks++;
      if (sleep !== exp_sleep || o !== exp_o) begin
        failures++;
        $display("FAIL pg=%0b m=%0b in=%0d sleep=%0b o=%0b", power_gate, minterm, lut_in, sleep, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
