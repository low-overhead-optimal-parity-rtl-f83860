// tb_opc_burst_sweep: correction-capability sweep of all four optimal parity
// codes.
//
// For a set of stored words (all zeros, all ones, alternating bits and random
// words), every burst of 1..31 adjacent errors that lies inside one 32-bit
// row (1054 position/length pairs) is applied to the word read back, and the
// four decoders (fed by their own encoders' check bits) are checked in the
// same cycle:
//  - the output is the original word when the burst changes that row's H
//    bits under the reference model, and the corrupted word otherwise;
//  - code 4 corrects exactly the bursts of odd length.
// The share of bursts each code corrects is printed. A watchdog ends the run
// after WATCHDOG cycles with a failure.
module tb_opc_burst_sweep;
  import tb_opc_ref_pkg::*;

  localparam int WORDS    = 12;
  localparam int WATCHDOG = 100000;

  logic        clk = 1'b0;
  logic [63:0] d, dr;
  logic [35:0] h1;
  logic [33:0] h2;
  logic [11:0] h3;
  logic [1:0]  h4;
  logic [31:0] v1, v2, v3, v4;
  logic [63:0] out [1:4];
  int          checks = 0, failures = 0, cycles = 0;
  int          fixed [1:4];
  int          total = 0;
  int          ncodes = 4;       // run-time bound: keeps the code loop rolled
  logic [35:0] h_clean [1:4];

  opc1_encoder e1 (.en(1'b1), .datain(d), .h(h1), .v(v1));
  opc2_encoder e2 (.en(1'b1), .datain(d), .h(h2), .v(v2));
  opc3_encoder e3 (.en(1'b1), .datain(d), .h(h3), .v(v3));
  opc4_encoder e4 (.en(1'b1), .datain(d), .h(h4), .v(v4));
  opc1_decoder d1 (.en(1'b1), .h(h1), .v(v1), .dataread(dr), .dataout(out[1]));
  opc2_decoder d2 (.en(1'b1), .h(h2), .v(v2), .dataread(dr), .dataout(out[2]));
  opc3_decoder d3 (.en(1'b1), .h(h3), .v(v3), .dataread(dr), .dataout(out[3]));
  opc4_decoder d4 (.en(1'b1), .h(h4), .v(v4), .dataread(dr), .dataout(out[4]));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    wait (cycles >= WATCHDOG);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] e, exp;
    logic        changed;
    for (int c = 1; c <= 4; c++) fixed[c] = 0;
    for (int w = 0; w < WORDS; w++) begin
      case (w)
        0:       d = '0;
        1:       d = '1;
        2:       d = 64'h5555_5555_5555_5555;
        3:       d = 64'hAAAA_AAAA_AAAA_AAAA;
        default: d = rand64();
      endcase
      for (int c = 1; c <= ncodes; c++) h_clean[c] = ref_h(c, d);
      for (int row = 0; row < 2; row++) begin
        for (int len = 1; len <= 31; len++) begin
          for (int pos = 0; pos + len <= 32; pos++) begin
            e = burst(pos + 32 * row, len);
            @(negedge clk);
            dr = d ^ e;
            @(posedge clk);
            total++;
            for (int c = 1; c <= ncodes; c++) begin
              changed = (ref_h(c, d ^ e) != h_clean[c]);
              exp = changed ? d : d ^ e;
              checks++;
              if (out[c] !== exp) begin
                failures++;
                $display("FAIL code %0d word %h burst pos %0d len %0d: got %h exp %h",
                         c, d, pos + 32 * row, len, out[c], exp);
              end
              if (out[c] === d) fixed[c]++;
            end
            checks++;
            if ((out[4] === d) != (len % 2 == 1)) begin
              failures++;
              $display("FAIL code 4 odd-length rule: len %0d", len);
            end
          end
        end
      end
    end
    for (int c = 1; c <= 4; c++)
      $display("code %0d corrected %0d of %0d in-row bursts (%0d.%01d %%)", c, fixed[c], total,
               fixed[c] * 100 / total, (fixed[c] * 1000 / total) % 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
