// opc4_encoder: encoder of optimal parity code 4 (34 check bits for 64 data
// bits, code rate 64/98 = 65.3 %).
//
// Each 32-bit row of the 2 x 32 matrix gets one even-parity bit:
//   H[0] = ^d[31:0]     H[1] = ^d[63:32]
// The 32 vertical bits are V[i] = d[i] ^ d[i+32]. With en low both outputs
// are zero.
//
// Purely combinational. The source gives the 2 + 32 check bits and an example
// in which a burst in the upper row yields H syndrome 2'b10; reading H as row
// parity is this design's interpretation of that.
module opc4_encoder
  import opc_pkg::*;
(
  input  logic              en,
  input  logic [DATA_W-1:0] datain,
  output logic [H4_W-1:0]   h,
  output logic [V_W-1:0]    v
);

  always_comb begin
    if (en) begin
      h[0] = ^datain[ROW_W-1:0];
      h[1] = ^datain[DATA_W-1:ROW_W];
      v    = vertical_bits(datain);
    end else begin
      h = '0;
      v = '0;
    end
  end

endmodule
