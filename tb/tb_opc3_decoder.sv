// tb_opc3_decoder: self-checking testbench of opc3_decoder.
//
// Builds valid code words with the reference encoder of tb_opc_ref_pkg,
// corrupts them and checks the combinational decoder output in the same
// cycle (zero latency):
//  - clean words come out unchanged;
//  - the example of the source (zero word read back with its upper 31 bits
//    set) comes out as zero;
//  - a burst of 1..31 adjacent errors inside one 32-bit row comes out
//    corrected exactly when it changes that row's H bits, and unchanged
//    otherwise (the expectation is the original or the corrupted word, not a
//    model of the decoder); corrections must occur in both rows;
//  - bursts that cross the row boundary, random error patterns and upsets of
//    the check bits are compared with the reference decoder;
//  - with en low the output is zero.
// A watchdog ends the run after WATCHDOG cycles with a failure.
module tb_opc3_decoder;
  import tb_opc_ref_pkg::*;

  localparam int HW       = 12;
  localparam int WATCHDOG = 200000;

  logic          clk = 1'b0;
  logic          en;
  logic [HW-1:0] h;
  logic [31:0]   v;
  logic [63:0]   dataread, dataout;
  int            checks = 0, failures = 0, cycles = 0;
  int            fixed_lo = 0, fixed_hi = 0, kept_lo = 0, kept_hi = 0;

  opc3_decoder dut (.en(en), .h(h), .v(v), .dataread(dataread), .dataout(dataout));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    wait (cycles >= WATCHDOG);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic dec(input logic e, input logic [HW-1:0] hh, input logic [31:0] vv,
                     input logic [63:0] dr);
    @(negedge clk);
    en = e;
    h = hh;
    v = vv;
    dataread = dr;
    @(posedge clk);
  endtask

  task automatic check_out(input logic [63:0] exp, input string what);
    checks++;
    if (dataout !== exp) begin
      failures++;
      $display("FAIL %s: dataread=%h h=%h v=%h dataout=%h exp %h", what, dataread, h, v, dataout, exp);
    end
  endtask

  initial begin
    logic [63:0]   d, e;
    logic [HW-1:0] hc;
    logic [31:0]   vc;
    int            pos, len, upper;
    logic          changed;

    // Example of the source: zero word stored, upper 31 bits read back as ones.
    dec(1'b1, '0, '0, 64'hFFFF_FFFE_0000_0000);
    check_out('0, "MSB burst of 31");

    for (int i = 0; i < 4000; i++) begin
      d  = rand64();
      hc = HW'(ref_h(3, d));
      vc = ref_v(d);
      // Clean word.
      dec(1'b1, hc, vc, d);
      check_out(d, "clean");
      // Burst inside one row.
      upper = int'($urandom_range(1));
      len   = int'($urandom_range(31, 1));
      pos   = int'($urandom_range(32 - len)) + 32 * upper;
      e     = burst(pos, len);
      changed = (ref_h(3, d ^ e) != ref_h(3, d));
      dec(1'b1, hc, vc, d ^ e);
      check_out(changed ? d : d ^ e, "burst in one row");
      if (changed) begin if (upper == 1) fixed_hi++; else fixed_lo++; end
      else         begin if (upper == 1) kept_hi++;  else kept_lo++;  end
      // Burst across the row boundary, random pattern, check-bit upsets.
      len = int'($urandom_range(31, 2));
      e   = burst(32 - int'($urandom_range(len - 1, 1)), len);
      dec(1'b1, hc, vc, d ^ e);
      check_out(ref_decode(3, 1'b1, 36'(hc), vc, d ^ e), "boundary burst");
      e = rand64() & rand64();
      dec(1'b1, hc, vc, d ^ e);
      check_out(ref_decode(3, 1'b1, 36'(hc), vc, d ^ e), "random pattern");
      dec(1'b1, hc ^ HW'($urandom()), vc ^ $urandom(), d);
      check_out(ref_decode(3, 1'b1, 36'(h), v, d), "check-bit upset");
    end
    // Enable low: output is zero.
    for (int i = 0; i < 20; i++) begin
      d = rand64();
      dec(1'b0, HW'(ref_h(3, d)), ref_v(d), d ^ burst(3, 5));
      check_out('0, "disabled");
    end
    $display("row bursts: corrected lower %0d upper %0d, passed lower %0d upper %0d",
             fixed_lo, fixed_hi, kept_lo, kept_hi);
    checks++;
    if (fixed_lo == 0 || fixed_hi == 0) begin
      failures++;
      $display("FAIL no corrected burst in one of the rows");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
