// tb_register_file: random writes and reads of the 16 x 16 register file
// against a model; checks both read ports, reset to 0, and read-before-write
// within one cycle.
module tb_register_file;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0]  ra_addr = 0, rb_addr = 0, w_addr = 0;
  logic [15:0] ra_data, rb_data, w_data = 0;
  logic [15:0] model [16];

  register_file dut (.clk, .rst_n, .ra_addr, .ra_data, .rb_addr, .rb_data, .we, .w_addr, .w_data);

  always #5 clk = ~clk;

  initial begin
    for (int r = 0; r < 16; r++) model[r] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      ra_addr = 4'($urandom); rb_addr = 4'($urandom);
      w_addr = 4'($urandom); w_data = 16'($urandom);
      we = $urandom_range(0, 2) != 0;
      #1;
      checks++;
      if (ra_data !== model[ra_addr] || rb_data !== model[rb_addr]) begin
        failures++;
        $display("FAIL ra[%0d]=%h rb[%0d]=%h exp %h %h", ra_addr, ra_data, rb_addr, rb_data,
                 model[ra_addr], model[rb_addr]);
      end
      @(posedge clk);
      if (we) model[w_addr] = w_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
