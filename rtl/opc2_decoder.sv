// opc2_decoder: decoder of optimal parity code 2 (H = two 17-bit half-row sums, 34 bits).
//
// The decoder reuses the encoder: opc2_encoder recomputes the horizontal and
// vertical check bits HD and VD of the word read from memory. Their
// differences from the stored bits are the syndromes
//   Hdiff = HD ^ h   (lower half of Hdiff belongs to row d[31:0], upper half
//                     to row d[63:32])
//   S     = VD ^ v   (32 bits, one per column of the 2 x 32 matrix)
// If both are zero the word is passed on unchanged. Otherwise S is placed on
// the row that Hdiff points at (S moved to bits 63:32 for the upper row, to
// bits 31:0 for the lower row) and XORed onto the word. This corrects a burst
// of up to 31 adjacent errors that lies within one row, provided it changes
// that row's H bits. When Hdiff points at both rows, or at neither, the word
// is passed on unchanged. With en low dataout is zero.
//
// Purely combinational: dataout follows dataread in the same cycle.
// Syndromes, encoder reuse and vector adjustment follow the source; the
// handling of the both-rows and no-row cases is this design's choice.
module opc2_decoder
  import opc_pkg::*;
(
  input  logic              en,
  input  logic [H2_W-1:0]   h,
  input  logic [V_W-1:0]    v,
  input  logic [DATA_W-1:0] dataread,
  output logic [DATA_W-1:0] dataout
);

  localparam int unsigned HALF = H2_W / 2;

  logic [H2_W-1:0] hd, hdiff;
  logic [V_W-1:0]  vd, s;
  logic            hi_err, lo_err;

  opc2_encoder u_reenc (
    .en     (en),
    .datain (dataread),
    .h      (hd),
    .v      (vd)
  );

  assign hdiff  = hd ^ h;
  assign s      = vd ^ v;
  assign lo_err = |hdiff[HALF-1:0];
  assign hi_err = |hdiff[H2_W-1:HALF];

  always_comb begin
    if (!en)
      dataout = '0;
    else if (hdiff == '0 && s == '0)
      dataout = dataread;
    else
      dataout = dataread ^ adjust_syndrome(s, hi_err, lo_err);
  end

endmodule
