// opc2_encoder: encoder of optimal parity code 2 (66 check bits for 64 data bits).
//
// Code 2 is code 1 with 16-bit instead of 8-bit additions. Each 32-bit row of
// the 2 x 32 matrix contributes one 17-bit sum of its two 16-bit halves:
//   H[16:0]  = d[15:0]  + d[31:16]   (row 0)
//   H[33:17] = d[47:32] + d[63:48]   (row 1)
// The 32 vertical bits are V[i] = d[i] ^ d[i+32]. With en low both outputs
// are zero.
//
// Purely combinational. The source gives the 16-bit addition and the 34 H
// bits; which halves are added is this design's choice, by analogy with code 1.
module opc2_encoder
  import opc_pkg::*;
(
  input  logic              en,
  input  logic [DATA_W-1:0] datain,
  output logic [H2_W-1:0]   h,
  output logic [V_W-1:0]    v
);

  always_comb begin
    if (en) begin
      h[16:0]  = 17'(datain[15:0])  + 17'(datain[31:16]);
      h[33:17] = 17'(datain[47:32]) + 17'(datain[63:48]);
      v        = vertical_bits(datain);
    end else begin
      h = '0;
      v = '0;
    end
  end

endmodule
