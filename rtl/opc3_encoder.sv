// opc3_encoder: encoder of optimal parity code 3 (44 check bits for 64 data bits).
//
// Code 3 replaces the adders of codes 1 and 2 by Hamming parity. Each 32-bit
// row of the 2 x 32 matrix gets the six check bits of a Hamming(38,32) code:
// check bit k is the XOR of the row's data bits whose code-word position
// (data bits fill positions 3, 5, 6, 7, 9, ... skipping powers of two) has
// bit k set. Check bit 0 therefore covers data bits
// 0,1,3,4,6,8,10,11,13,15,17,19,21,23,25,26,28,30, as the source lists.
//   H[5:0]  = Hamming bits of d[31:0]     H[11:6] = Hamming bits of d[63:32]
// The 32 vertical bits are V[i] = d[i] ^ d[i+32]. With en low both outputs
// are zero.
//
// Purely combinational. Check bits 1 to 5 and the order of the rows in H are
// this design's completion of the standard construction.
module opc3_encoder
  import opc_pkg::*;
(
  input  logic              en,
  input  logic [DATA_W-1:0] datain,
  output logic [H3_W-1:0]   h,
  output logic [V_W-1:0]    v
);

  always_comb begin
    if (en) begin
      h[HAM_P-1:0]     = hamming_row(datain[ROW_W-1:0]);
      h[2*HAM_P-1:HAM_P] = hamming_row(datain[DATA_W-1:ROW_W]);
      v                = vertical_bits(datain);
    end else begin
      h = '0;
      v = '0;
    end
  end

endmodule
