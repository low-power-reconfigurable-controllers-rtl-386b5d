// tb_minterm_decoder: exhaustive check of the 5-to-32 minterm decoder (the
// default next-state decoder for (N, n, K) = (7, 4, 6)) and of its disable,
// plus the degenerate D = 0 decoder.
module tb_minterm_decoder;
  int checks = 0, failures = 0;
  logic        en, en0;
  logic [4:0]  sel;
  logic [31:0] mt;
  logic [0:0]  sel0, mt0;

  minterm_decoder #(.D(5)) dut  (.en(en), .sel(sel), .minterm(mt));
  minterm_decoder #(.D(0)) dut0 (.en(en0), .sel(sel0), .minterm(mt0));

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int s = 0; s < 32; s++) begin
        en = e[0]; sel = 5'(s);
        #1;
        checks++;
        if (mt !== (e ? (32'd1 << s) : 32'd0)) begin
          failures++;
          $display("FAIL en=%0d sel=%0d mt=%h", e, s, mt);
        end
      end
      en0 = e[0]; sel0 = 1'b1;
      #1;
      checks++;
      if (mt0 !== 1'(e)) begin
        failures++;
        $display("FAIL D=0 en=%0d mt=%b", e, mt0);
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
