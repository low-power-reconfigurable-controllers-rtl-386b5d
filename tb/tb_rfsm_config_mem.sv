// tb_rfsm_config_mem: fills the 270-word configuration memory with random
// words, checks read-back and the parallel word outputs against a model, and
// checks that out-of-range writes change nothing. One write per clock.
module tb_rfsm_config_mem;
  localparam int NW = 270;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0;
  logic [8:0]  addr = '0;
  logic [63:0] wdata = '0, rdata;
  logic [NW-1:0][63:0] words;
  logic [63:0] model [NW];

  rfsm_config_mem #(.NWORDS(NW), .WW(64)) dut (.clk, .rst_n, .we, .addr, .wdata, .rdata, .words);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    checks++;
    if (words !== '0) begin failures++; $display("FAIL not cleared by reset"); end
    for (int a = 0; a < NW; a++) begin
      model[a] = {$urandom, $urandom};
      we <= 1; addr <= 9'(a); wdata <= model[a];
      @(posedge clk);
    end
    // out-of-range write
    addr <= 9'(NW + 3); wdata <= '1;
    @(posedge clk);
    we <= 0;
    for (int a = 0; a < NW; a++) begin
      addr <= 9'(a);
      @(posedge clk);
      checks++;
      if (rdata !== model[a] || words[a] !== model[a]) begin
        failures++;
        $display("FAIL addr %0d rdata=%h words=%h exp=%h", a, rdata, words[a], model[a]);
      end
    end
    // rewrite one word
    we <= 1; addr <= 9'd17; wdata <= 64'h0123_4567_89ab_cdef;
    @(posedge clk);
    we <= 0;
    @(posedge clk);
    checks++;
    if (words[17] !== 64'h0123_4567_89ab_cdef || words[16] !== model[16]) begin
      failures++; $display("FAIL rewrite");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
