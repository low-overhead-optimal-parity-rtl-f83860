// opc1_encoder: encoder of optimal parity code 1 (68 check bits for 64 data bits).
//
// The 64-bit word is a 2 x 32 matrix. The 36 horizontal bits are four 9-bit
// sums of byte pairs that lie 16 bits apart in the same row:
//   H[8:0]   = d[7:0]   + d[23:16]     H[17:9]  = d[15:8]  + d[31:24]   (row 0)
//   H[26:18] = d[39:32] + d[55:48]     H[35:27] = d[47:40] + d[63:56]   (row 1)
// The 32 vertical bits are the column parities V[i] = d[i] ^ d[i+32].
// With en low both outputs are zero, as the source describes.
//
// Purely combinational: the check bits follow datain in the same cycle.
// The sums, the vertical bits and the enable behaviour follow the published
// code; the bit order inside H is as listed above.
module opc1_encoder
  import opc_pkg::*;
(
  input  logic              en,
  input  logic [DATA_W-1:0] datain,
  output logic [H1_W-1:0]   h,
  output logic [V_W-1:0]    v
);

  always_comb begin
    if (en) begin
      h[8:0]   = 9'(datain[7:0])   + 9'(datain[23:16]);
      h[17:9]  = 9'(datain[15:8])  + 9'(datain[31:24]);
      h[26:18] = 9'(datain[39:32]) + 9'(datain[55:48]);
      h[35:27] = 9'(datain[47:40]) + 9'(datain[63:56]);
      v        = vertical_bits(datain);
    end else begin
      h = '0;
      v = '0;
    end
  end

endmodule
