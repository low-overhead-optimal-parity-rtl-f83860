// tb_opc_ref_pkg: reference models of the four optimal parity codes, written
// independently of the RTL for the self-checking testbenches.
//
// ref_h(code, d) gives the horizontal check bits of a 64-bit word (zero
// extended to 36 bits), ref_v(d) the 32 vertical check bits, and ref_decode
// the corrected word. ref_h computes the sums with integer arithmetic and the
// Hamming bits of code 3 from a position table built with $clog2, rather than
// with the RTL's bit loops.
package tb_opc_ref_pkg;

  localparam int HMAX = 36;

  function automatic int h_width(input int code);
    case (code)
      1: return 36;
      2: return 34;
      3: return 12;
      default: return 2;
    endcase
  endfunction

  function automatic logic [31:0] ref_v(input logic [63:0] d);
    logic [31:0] v;
    for (int i = 0; i < 32; i++) v[i] = d[i] ^ d[i+32];
    return v;
  endfunction

  // Code-word position of data bit j of a Hamming(38,32) row.
  function automatic int ham_pos(input int j);
    int p, n;
    n = -1;
    p = 0;
    while (n < j) begin
      p++;
      if ((1 << $clog2(p)) != p) n++;
    end
    return p;
  endfunction

  function automatic logic [5:0] ref_ham(input logic [31:0] r);
    logic [5:0] c;
    int p;
    c = '0;
    for (int j = 0; j < 32; j++) begin
      p = ham_pos(j);
      for (int k = 0; k < 6; k++)
        if (p % (2 << k) >= (1 << k)) c[k] = c[k] ^ r[j];
    end
    return c;
  endfunction

  function automatic logic [HMAX-1:0] ref_h(input int code, input logic [63:0] d);
    logic [HMAX-1:0] h;
    int unsigned a, b;
    h = '0;
    case (code)
      1: begin
        for (int g = 0; g < 4; g++) begin
          // byte pairs (0,2), (1,3), (4,6), (5,7)
          int lo_byte;
          lo_byte = (g / 2) * 4 + (g % 2);
          a = int'(d[lo_byte*8 +: 8]);
          b = int'(d[(lo_byte+2)*8 +: 8]);
          h[g*9 +: 9] = 9'(a + b);
        end
      end
      2: begin
        a = int'(d[15:0]);  b = int'(d[31:16]); h[16:0]  = 17'(a + b);
        a = int'(d[47:32]); b = int'(d[63:48]); h[33:17] = 17'(a + b);
      end
      3: begin
        h[5:0]  = ref_ham(d[31:0]);
        h[11:6] = ref_ham(d[63:32]);
      end
      default: begin
        h[0] = ^d[31:0];
        h[1] = ^d[63:32];
      end
    endcase
    return h;
  endfunction

  function automatic logic [63:0] ref_decode(input int code, input logic en,
                                             input logic [HMAX-1:0] h,
                                             input logic [31:0] v,
                                             input logic [63:0] dr);
    logic [HMAX-1:0] hdiff;
    logic [31:0] s;
    int half;
    logic lo, hi;
    if (!en) return '0;
    hdiff = ref_h(code, dr) ^ h;
    s     = ref_v(dr) ^ v;
    half  = h_width(code) / 2;
    lo = 1'b0;
    hi = 1'b0;
    for (int i = 0; i < h_width(code); i++) begin
      if (i < half) lo = lo | hdiff[i];
      else          hi = hi | hdiff[i];
    end
    if (hi && !lo) return dr ^ {s, 32'h0};
    if (lo && !hi) return dr ^ {32'h0, s};
    return dr;
  endfunction

  // A burst of len adjacent ones starting at bit pos.
  function automatic logic [63:0] burst(input int pos, input int len);
    logic [63:0] m;
    m = '0;
    for (int i = 0; i < len; i++) if (pos + i < 64) m[pos+i] = 1'b1;
    return m;
  endfunction

  function automatic logic [63:0] rand64();
    return {$urandom(), $urandom()};
  endfunction

endpackage
