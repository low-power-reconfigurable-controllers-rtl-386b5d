// rfsm_config_mem: configuration memory of the reconfigurable FSM.
//
// Holds one truth-table word of 2^K bits for every LUT cluster (Table I gives
// N x 2^(n+N) bits for the next-state logic and m x 2^N for the outputs). The
// memory lies in the always-on power domain so that power gating the LUT
// clusters never loses the configuration; all words are read in parallel by
// the clusters. It is written one word per cycle through a simple
// address/data port and can be read back through the same address.
// Timing: a write with 'we' high is visible on 'words' after the next rising
// clock edge; 'rdata' is combinational. Reset clears all words.
// Word-wide loading, read-back and reset are this design's own choices.
module rfsm_config_mem #(
  parameter int unsigned NWORDS = 270,
  parameter int unsigned WW     = 64,
  parameter int unsigned AW     = (NWORDS > 1) ? $clog2(NWORDS) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         we,
  input  logic [AW-1:0]                addr,
  input  logic [WW-1:0]                wdata,
  output logic [WW-1:0]                rdata,
  output logic [NWORDS-1:0][WW-1:0]    words
);
  // one register per word, loaded when its address is written
  for (genvar w = 0; w < NWORDS; w++) begin : g_word
    logic [WW-1:0] q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                     q <= '0;
      else if (we && addr == AW'(w))  q <= wdata;
    end
    assign words[w] = q;
  end

  always_comb rdata = (32'(addr) < NWORDS) ? words[addr] : '0;
endmodule
