// codeword_memory: storage for the code words (data plus check bits) between
// encoder and decoder.
//
// A simple synchronous RAM of 2**ADDR_W words of WIDTH bits with one write
// port and one read port. A read request (re) returns the word at raddr one
// clock later, with rvalid high for that cycle. Besides the normal write (we)
// the write port has a flip command: with flip high the stored word at waddr
// is XORed with flip_mask, which models radiation-induced cell upsets (soft
// errors) so that the error correction path can be exercised. we has
// priority over flip. Only rvalid is reset; the array is not.
//
// The source only names the memory in its block diagram; depth, ports,
// latency and the upset port are this design's choices.
module codeword_memory #(
  parameter int unsigned WIDTH  = 64,
  parameter int unsigned ADDR_W = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic              flip,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic [WIDTH-1:0]  flip_mask,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata,
  output logic              rvalid
);

  logic [WIDTH-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we)
      mem[waddr] <= wdata;
    else if (flip)
      mem[waddr] <= mem[waddr] ^ flip_mask;
    if (re)
      rdata <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid <= 1'b0;
    else        rvalid <= re;
  end

endmodule
