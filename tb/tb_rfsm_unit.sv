// tb_rfsm_unit: one function unit with 32 clusters of 6-LUTs. For random
// configurations, minterm index and LUT inputs it checks f against the
// selected truth-table bit, that exactly one cluster is awake (none when the
// unit is power-gated) and that a gated unit yields 0.
module tb_rfsm_unit;
  int checks = 0, failures = 0;
  logic                   power_gate, f;
  logic [31:0]            minterm, sleep;
  logic [5:0]             lut_in;
  logic [31:0][63:0]      cfg;
  int                     k;
  logic                   exp_f;

  rfsm_unit #(.D(5), .K(6)) dut (.power_gate, .minterm, .lut_in, .cfg, .sleep, .f);

  initial begin
    for (int t = 0; t < 400; t++) begin
      for (int c = 0; c < 32; c++) cfg[c] = {$urandom, $urandom};
      k          = $urandom_range(0, 31);
      minterm    = 32'd1 << k;
      lut_in     = 6'($urandom);
      power_gate = $urandom_range(0, 4) == 0;
      #1;
      exp_f = power_gate ? 1'b0 : cfg[k][lut_in];
      checks++;
      if (f !== exp_f) begin
        failures++;
        $display("FAIL k=%0d in=%0d pg=%0b f=%0b exp=%0b", k, lut_in, power_gate, f, exp_f);
      end
      checks++;
      if (sleep !== (power_gate ? 32'hffff_ffff : ~minterm)) begin
        failures++;
        $display("FAIL sleep=%h minterm=%h pg=%0b", sleep, minterm, power_gate);
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
