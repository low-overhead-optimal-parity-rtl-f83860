// tb_codeword_memory: self-checking testbench of codeword_memory.
//
// Uses a small instance (WIDTH 40, ADDR_W 4) and a scoreboard array. Random
// cycles mix writes, upsets (flip) and reads, including a write and a flip in
// the same cycle (write wins) and a read of the address being written (old
// word returned). Every read is checked one clock later, with rvalid, against
// the scoreboard: one cycle of read latency. rvalid must also be low after
// reset and in cycles without a read. A watchdog ends the run after WATCHDOG
// cycles with a failure.
module tb_codeword_memory;

  localparam int W        = 40;
  localparam int AW       = 4;
  localparam int WATCHDOG = 20000;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          we, flip, re;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0]  wdata, flip_mask, rdata;
  logic          rvalid;
  logic [W-1:0]  model [2**AW];
  int            checks = 0, failures = 0, cycles = 0;
  int            n_wr = 0, n_flip = 0, n_rd = 0;

  codeword_memory #(.WIDTH(W), .ADDR_W(AW)) dut (.*);

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

  initial begin
    logic [W-1:0] exp;
    logic         exp_valid;
    rst_n = 1'b0; we = 1'b0; flip = 1'b0; re = 1'b0;
    waddr = '0; raddr = '0; wdata = '0; flip_mask = '0;
    repeat (2) @(posedge clk);
    #1 check(rvalid == 1'b0, "rvalid low in reset");
    @(negedge clk) rst_n = 1'b1;
    // Fill the array.
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = {$urandom(), $urandom()} >> (64 - W);
      model[a] = wdata;
      @(posedge clk);
    end
    @(negedge clk) we = 1'b0;
    exp_valid = 1'b0;
    exp = '0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // Check the result of the previous cycle's read.
      check(rvalid == exp_valid, "rvalid timing");
      if (exp_valid) check(rdata == exp, "read data");
      we    = ($urandom_range(3) == 0);
      flip  = ($urandom_range(3) == 0);
      re    = ($urandom_range(1) == 1);
      waddr = AW'($urandom());
      raddr = ($urandom_range(3) == 0) ? waddr : AW'($urandom());
      wdata = {$urandom(), $urandom()} >> (64 - W);
      flip_mask = {$urandom(), $urandom()} >> (64 - W);
      exp_valid = re;
      if (re) exp = model[raddr];
      if (we) begin model[waddr] = wdata; n_wr++; end
      else if (flip) begin model[waddr] = model[waddr] ^ flip_mask; n_flip++; end
      if (re) n_rd++;
    end
    @(negedge clk);
    check(rvalid == exp_valid, "rvalid timing");
    if (exp_valid) check(rdata == exp, "read data");
    $display("writes %0d flips %0d reads %0d", n_wr, n_flip, n_rd);
    check(n_wr > 0 && n_flip > 0 && n_rd > 0, "all operations used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
