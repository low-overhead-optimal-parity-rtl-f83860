// opc_pkg: constants and helper functions shared by the optimal parity code
// (OPC) encoders and decoders.
//
// A 64-bit data word is viewed as a 2 x 32 matrix: row 0 is data[31:0], row 1
// is data[63:32]. Every code has the same 32 vertical check bits,
// V[i] = data[i] ^ data[i+32], and differs only in its horizontal check bits H,
// which tell the decoder which row holds the error. The decoders then XOR the
// vertical syndrome onto that row ("vector adjustment").
//
// Followed from the source description: the 2 x 32 view, V, the H widths
// (36, 34, 12, 2) and the correction rule dataout = dataread ^ {S,32'b0} or
// {32'b0,S}. This design's own choices: how the row is picked when the H
// syndrome points at both rows or at none (no correction), and the Hamming
// position numbering used for code 3.
package opc_pkg;

  localparam int unsigned DATA_W = 64;
  localparam int unsigned ROW_W  = DATA_W / 2;   // 32 bits per matrix row
  localparam int unsigned V_W    = ROW_W;        // vertical check bits

  localparam int unsigned H1_W = 36;  // code 1: four 9-bit byte sums
  localparam int unsigned H2_W = 34;  // code 2: two 17-bit half-row sums
  localparam int unsigned H3_W = 12;  // code 3: six Hamming bits per row
  localparam int unsigned H4_W = 2;   // code 4: one parity bit per row

  localparam int unsigned HAM_P = 6;  // Hamming(38,32) check bits per row

  // Vertical check bits: column parity of the 2 x 32 matrix.
  function automatic logic [V_W-1:0] vertical_bits(input logic [DATA_W-1:0] d);
    return d[ROW_W-1:0] ^ d[DATA_W-1:ROW_W];
  endfunction

  // The six Hamming check bits of one 32-bit row. The row's data bits fill
  // the positions 3, 5, 6, 7, 9, ... (1-based, skipping the powers of two
  // 1, 2, 4, 8, 16, 32 where check bits sit) of a 38-bit code word; check
  // bit k is the XOR of the data bits whose position has bit k set.
  function automatic logic [HAM_P-1:0] hamming_row(input logic [ROW_W-1:0] r);
    logic [HAM_P-1:0] p;
    int unsigned      j;
    p = '0;
    j = 0;
    for (int unsigned pos = 1; pos <= ROW_W + HAM_P; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        for (int unsigned k = 0; k < HAM_P; k++) begin
          if (((pos >> k) & 1) != 0) p[k] ^= r[j];
        end
        j++;
      end
    end
    return p;
  endfunction

  // Vector adjustment: place the 32-bit syndrome on the row that the
  // horizontal syndrome points at. hi_err / lo_err say whether the H
  // syndrome of the upper / lower row is non-zero. When both or neither are
  // set, the error cannot be placed and the word passes unchanged.
  function automatic logic [DATA_W-1:0] adjust_syndrome(input logic [V_W-1:0] s,
                                                        input logic hi_err,
                                                        input logic lo_err);
    unique case ({hi_err, lo_err})
      2'b10:   return {s, {ROW_W{1'b0}}};
      2'b01:   return {{ROW_W{1'b0}}, s};
      default: return '0;
    endcase
  endfunction

endpackage
