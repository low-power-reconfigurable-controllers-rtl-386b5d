// register_file: the 16 x 16-bit register file of the microtask datapath.
//
// Two combinational read ports (operands A and B of the adder) and one write
// port written on the rising clock edge when 'we' is high. A write and a read
// of the same register in one cycle return the old value. Reset clears all
// registers. Size follows the design; port count and reset are this design's
// choice.
module register_file #(
  parameter int unsigned DEPTH = rwsn_pkg::RF_DEPTH,
  parameter int unsigned W     = rwsn_pkg::DATA_W,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] ra_addr,
  output logic [W-1:0]  ra_data,
  input  logic [AW-1:0] rb_addr,
  output logic [W-1:0]  rb_data,
  input  logic          we,
  input  logic [AW-1:0] w_addr,
  input  logic [W-1:0]  w_data
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(DEPTH); r++) mem[r] <= '0;
    end else if (we) begin
      mem[w_addr] <= w_data;
    end
  end

  always_comb begin
    ra_data = mem[ra_addr];
    rb_data = mem[rb_addr];
  end
endmodule
