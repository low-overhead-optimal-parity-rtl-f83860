// tb_opc_edac_top: end-to-end testbench of opc_edac_top at its default size
// (64 words), all four codes at once.
//
// Sequence: reset; write a random word to every address and read all back
// clean; the example of the source (zero word, upper 31 bits upset) and the
// odd/even LSB bursts of the published simulation (lengths 23..27); then random
// rounds of write, upset with a burst of 1..31 adjacent bits in one row (or,
// every fourth round, across the row boundary), and read. Expected outputs
// are worked out from the reference check bits of tb_opc_ref_pkg: a burst in
// one row is corrected exactly when it changes that row's H bits, otherwise
// the corrupted word is read. Every read must answer with rvalid one clock
// after re. Finally en is dropped and all outputs must read zero.
//
// Mechanisms counted, each must occur at least once: write, upset, read,
// correction in the upper row, correction in the lower row, a burst passed
// uncorrected (even-length burst under code 4), a cross-row burst, and a read
// with en low. A watchdog ends the run after WATCHDOG cycles with a failure.
module tb_opc_edac_top;
  import tb_opc_ref_pkg::*;

  localparam int AW       = 6;
  localparam int WATCHDOG = 100000;
  localparam int ROUNDS   = 3000;

  logic          clk = 1'b0;
  logic          rst_n, en, we, upset, re;
  logic [AW-1:0] waddr, raddr;
  logic [63:0]   datain, upset_mask;
  logic          rvalid;
  logic [63:0]   dout [1:4];
  logic [63:0]   stored [2**AW];
  int            checks = 0, failures = 0, cycles = 0;
  int            n_write = 0, n_upset = 0, n_read = 0, n_fix_hi = 0, n_fix_lo = 0;
  int            n_kept = 0, n_cross = 0, n_disabled = 0;

  opc_edac_top dut (
    .clk(clk), .rst_n(rst_n), .en(en), .we(we), .upset(upset), .waddr(waddr),
    .datain(datain), .upset_mask(upset_mask), .re(re), .raddr(raddr), .rvalid(rvalid),
    .dataout_opc1(dout[1]), .dataout_opc2(dout[2]), .dataout_opc3(dout[3]),
    .dataout_opc4(dout[4]));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    wait (cycles >= WATCHDOG);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  task automatic idle();
    we = 1'b0; upset = 1'b0; re = 1'b0;
  endtask

  task automatic write(input logic [AW-1:0] a, input logic [63:0] d);
    @(negedge clk);
    idle();
    we = 1'b1; waddr = a; datain = d;
    stored[a] = d;
    n_write++;
    @(negedge clk);
    idle();
  endtask

  task automatic hit(input logic [AW-1:0] a, input logic [63:0] m);
    @(negedge clk);
    idle();
    upset = 1'b1; waddr = a; upset_mask = m;
    n_upset++;
    @(negedge clk);
    idle();
  endtask

  // Read address a; check rvalid one cycle later and every code's output.
  task automatic read(input logic [AW-1:0] a, input logic [63:0] exp [1:4], input string what);
    @(negedge clk);
    idle();
    re = 1'b1; raddr = a;
    n_read++;
    @(negedge clk);
    idle();
    check(rvalid == 1'b1, "rvalid one cycle after re");
    for (int c = 1; c <= 4; c++) begin
      checks++;
      if (dout[c] !== exp[c]) begin
        failures++;
        $display("FAIL %s code %0d addr %0d: got %h exp %h", what, c, a, dout[c], exp[c]);
      end
    end
    @(negedge clk);
    check(rvalid == 1'b0, "rvalid drops without re");
  endtask

  // Expected output of code c for stored word d read back as d ^ e, where e
  // is a burst inside one row.
  function automatic logic [63:0] row_burst_exp(int c, logic [63:0] d, logic [63:0] e);
    return (ref_h(c, d ^ e) != ref_h(c, d)) ? d : d ^ e;
  endfunction

  initial begin
    logic [63:0] exp [1:4];
    logic [63:0] d, e, dr;
    logic [AW-1:0] a;
    int len, pos, upper;

    rst_n = 1'b0; en = 1'b1; idle();
    waddr = '0; raddr = '0; datain = '0; upset_mask = '0;
    repeat (3) @(posedge clk);
    check(rvalid == 1'b0, "rvalid low in reset");
    @(negedge clk) rst_n = 1'b1;

    // Fill and read back clean.
    for (int i = 0; i < 2**AW; i++) write(AW'(i), rand64());
    for (int i = 0; i < 2**AW; i++) begin
      for (int c = 1; c <= 4; c++) exp[c] = stored[i];
      read(AW'(i), exp, "clean");
    end

    // Example of the source: zero word, upper 31 bits upset, all codes correct.
    write(5, '0);
    hit(5, 64'hFFFF_FFFE_0000_0000);
    for (int c = 1; c <= 4; c++) exp[c] = '0;
    read(5, exp, "MSB burst of 31");
    n_fix_hi++;

    // LSB bursts of lengths 23..27 on a zero word, as in the published
    // simulation: code 4 corrects the odd lengths and passes the even ones.
    for (int l = 23; l <= 27; l++) begin
      e = burst(0, l);
      write(7, '0);
      hit(7, e);
      for (int c = 1; c <= 4; c++) exp[c] = row_burst_exp(c, '0, e);
      check(exp[4] == ((l % 2 == 1) ? 64'h0 : e), "LSB burst expectation");
      read(7, exp, "LSB burst");
      if (l % 2 == 0) n_kept++; else n_fix_lo++;
    end

    // Random rounds.
    for (int r = 0; r < ROUNDS; r++) begin
      a = AW'($urandom());
      d = rand64();
      write(a, d);
      if (r % 4 == 3) begin
        // Burst across the row boundary.
        len = int'($urandom_range(31, 2));
        e   = burst(32 - int'($urandom_range(len - 1, 1)), len);
        hit(a, e);
        for (int c = 1; c <= 4; c++)
          exp[c] = ref_decode(c, 1'b1, ref_h(c, d), ref_v(d), d ^ e);
        read(a, exp, "cross-row burst");
        n_cross++;
      end else begin
        upper = int'($urandom_range(1));
        len   = int'($urandom_range(31, 1));
        pos   = int'($urandom_range(32 - len)) + 32 * upper;
        e     = burst(pos, len);
        hit(a, e);
        // A second upset of the same word adds to the first (flip twice = clean).
        if (r % 16 == 5) begin
          hit(a, e);
          for (int c = 1; c <= 4; c++) exp[c] = d;
          read(a, exp, "double upset");
        end else begin
          for (int c = 1; c <= 4; c++) exp[c] = row_burst_exp(c, d, e);
          read(a, exp, "row burst");
          if (exp[4] == (d ^ e)) n_kept++;
          if (exp[4] == d && upper == 1) n_fix_hi++;
          if (exp[4] == d && upper == 0) n_fix_lo++;
        end
      end
    end

    // Enable low: decoders output zero.
    @(negedge clk) en = 1'b0;
    for (int i = 0; i < 4; i++) begin
      for (int c = 1; c <= 4; c++) exp[c] = '0;
      read(AW'(i), exp, "disabled");
      n_disabled++;
    end

    $display("writes %0d upsets %0d reads %0d corrected upper %0d lower %0d passed %0d cross-row %0d disabled %0d",
             n_write, n_upset, n_read, n_fix_hi, n_fix_lo, n_kept, n_cross, n_disabled);
    check(n_write > 0, "write happened");
    check(n_upset > 0, "upset happened");
    check(n_read > 0, "read happened");
    check(n_fix_hi > 0, "upper-row correction happened");
    check(n_fix_lo > 0, "lower-row correction happened");
    check(n_kept > 0, "uncorrected even burst happened");
    check(n_cross > 0, "cross-row burst happened");
    check(n_disabled > 0, "disabled read happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
