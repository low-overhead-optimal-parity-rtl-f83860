// opc_edac_top: memory error detection and correction path with the four
// optimal parity codes side by side.
//
// Data written to the memory passes through a parity encoder, which appends
// check bits, and the stored code word passes through the matching parity
// decoder on the way out, which corrects a burst of adjacent upset bits lying
// in one 32-bit half of the word. This top holds one such channel per code:
//
//   datain -> opcN_encoder -> codeword_memory ({h, v, data}) -> opcN_decoder -> dataout_opcN
//
// with N = 1..4 (check bits 68, 66, 44 and 34). All channels share the write,
// upset and read controls, so one test stores the same word under all four
// codes. upset flips the stored data bits selected by upset_mask (check bits
// are left alone), modelling a multiple-cell upset.
//
// Timing: a write takes effect at the clock edge with we high; a read
// request re at raddr gives rvalid and the four corrected words one clock
// later (memory read latency; encoder and decoder are combinational). en is
// the Enable of all encoders and decoders: while low the memory is written
// with zero check bits and every dataout is zero.
//
// The encode / store / decode order follows the source's block diagram. The
// horizontal vector Hamming stages that the diagram places next to the
// memory are not part of this design; running four codes side by side, the
// memory organisation and the upset port are this design's choices.
module opc_edac_top
  import opc_pkg::*;
#(
  parameter int unsigned ADDR_W = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              we,
  input  logic              upset,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] datain,
  input  logic [DATA_W-1:0] upset_mask,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic              rvalid,
  output logic [DATA_W-1:0] dataout_opc1,
  output logic [DATA_W-1:0] dataout_opc2,
  output logic [DATA_W-1:0] dataout_opc3,
  output logic [DATA_W-1:0] dataout_opc4
);

  localparam int unsigned W1 = H1_W + V_W + DATA_W;
  localparam int unsigned W2 = H2_W + V_W + DATA_W;
  localparam int unsigned W3 = H3_W + V_W + DATA_W;
  localparam int unsigned W4 = H4_W + V_W + DATA_W;

  // ---------------- code 1 ----------------
  logic [H1_W-1:0] h1_w, h1_r;
  logic [V_W-1:0]  v1_w, v1_r;
  logic [DATA_W-1:0] d1_r;
  logic rvalid1;

  opc1_encoder u_enc1 (.en(en), .datain(datain), .h(h1_w), .v(v1_w));
  codeword_memory #(.WIDTH(W1), .ADDR_W(ADDR_W)) u_mem1 (
    .clk(clk), .rst_n(rst_n), .we(we), .flip(upset), .waddr(waddr),
    .wdata({h1_w, v1_w, datain}), .flip_mask({{(H1_W + V_W){1'b0}}, upset_mask}),
    .re(re), .raddr(raddr), .rdata({h1_r, v1_r, d1_r}), .rvalid(rvalid1));
  opc1_decoder u_dec1 (.en(en), .h(h1_r), .v(v1_r), .dataread(d1_r), .dataout(dataout_opc1));

  // ---------------- code 2 ----------------
  logic [H2_W-1:0] h2_w, h2_r;
  logic [V_W-1:0]  v2_w, v2_r;
  logic [DATA_W-1:0] d2_r;
  logic rvalid2;

  opc2_encoder u_enc2 (.en(en), .datain(datain), .h(h2_w), .v(v2_w));
  codeword_memory #(.WIDTH(W2), .ADDR_W(ADDR_W)) u_mem2 (
    .clk(clk), .rst_n(rst_n), .we(we), .flip(upset), .waddr(waddr),
    .wdata({h2_w, v2_w, datain}), .flip_mask({{(H2_W + V_W){1'b0}}, upset_mask}),
    .re(re), .raddr(raddr), .rdata({h2_r, v2_r, d2_r}), .rvalid(rvalid2));
  opc2_decoder u_dec2 (.en(en), .h(h2_r), .v(v2_r), .dataread(d2_r), .dataout(dataout_opc2));

  // ---------------- code 3 ----------------
  logic [H3_W-1:0] h3_w, h3_r;
  logic [V_W-1:0]  v3_w, v3_r;
  logic [DATA_W-1:0] d3_r;
  logic rvalid3;

  opc3_encoder u_enc3 (.en(en), .datain(datain), .h(h3_w), .v(v3_w));
  codeword_memory #(.WIDTH(W3), .ADDR_W(ADDR_W)) u_mem3 (
    .clk(clk), .rst_n(rst_n), .we(we), .flip(upset), .waddr(waddr),
    .wdata({h3_w, v3_w, datain}), .flip_mask({{(H3_W + V_W){1'b0}}, upset_mask}),
    .re(re), .raddr(raddr), .rdata({h3_r, v3_r, d3_r}), .rvalid(rvalid3));
  opc3_decoder u_dec3 (.en(en), .h(h3_r), .v(v3_r), .dataread(d3_r), .dataout(dataout_opc3));

  // ---------------- code 4 ----------------
  logic [H4_W-1:0] h4_w, h4_r;
  logic [V_W-1:0]  v4_w, v4_r;
  logic [DATA_W-1:0] d4_r;
  logic rvalid4;

  opc4_encoder u_enc4 (.en(en), .datain(datain), .h(h4_w), .v(v4_w));
  codeword_memory #(.WIDTH(W4), .ADDR_W(ADDR_W)) u_mem4 (
    .clk(clk), .rst_n(rst_n), .we(we), .flip(upset), .waddr(waddr),
    .wdata({h4_w, v4_w, datain}), .flip_mask({{(H4_W + V_W){1'b0}}, upset_mask}),
    .re(re), .raddr(raddr), .rdata({h4_r, v4_r, d4_r}), .rvalid(rvalid4));
  opc4_decoder u_dec4 (.en(en), .h(h4_r), .v(v4_r), .dataread(d4_r), .dataout(dataout_opc4));

  // The four memories see the same controls, so their valid flags agree.
  assign rvalid = rvalid1 & rvalid2 & rvalid3 & rvalid4;

endmodule
