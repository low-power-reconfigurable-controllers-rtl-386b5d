// tb_iso_cell: checks that the isolation cells pass data while awake and clamp
// to 0 while asleep, for random 16-bit data.
module tb_iso_cell;
  int checks = 0, failures = 0;
  logic sleep;
  logic [15:0] i, o;

  iso_cell #(.W(16)) dut (.sleep, .i, .o);

  initial begin
    for (int t = 0; t < 200; t++) begin
      i = 16'($urandom);
      sleep = $urandom_range(0, 1) == 1;
      #1;
      checks++;
      if (o !== (sleep ? 16'h0 : i)) begin
        failures++;
        $display("FAIL sleep=%0b i=%h o=%h", sleep, i, o);
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
