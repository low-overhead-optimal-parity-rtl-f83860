// tb_opc3_encoder: self-checking testbench of opc3_encoder.
//
// Drives the combinational encoder once per clock and compares H and V in the
// same cycle (zero latency) with hand-worked vectors (zero word, all ones,
// the burst example of the source, carries / single bits) and with the
// reference model of tb_opc_ref_pkg for random words. Also checks that the
// outputs are zero while en is low. A watchdog ends the run after
// WATCHDOG cycles with a failure.
module tb_opc3_encoder;
  import tb_opc_ref_pkg::*;

  localparam int HW       = 12;
  localparam int WATCHDOG = 100000;
  localparam int H0_LIST[18] = '{0, 1, 3, 4, 6, 8, 10, 11, 13, 15, 17, 19, 21, 23, 25, 26, 28, 30};

  logic          clk = 1'b0;
  logic          en;
  logic [63:0]   datain;
  logic [HW-1:0] h;
  logic [31:0]   v;
  int            checks = 0, failures = 0, cycles = 0;

  opc3_encoder dut (.en(en), .datain(datain), .h(h), .v(v));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    wait (cycles >= WATCHDOG);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input logic e, input logic [63:0] d);
    @(negedge clk);
    en = e;
    datain = d;
    @(posedge clk);
  endtask

  task automatic check_hv(input logic [HW-1:0] eh, input logic [31:0] ev, input string what);
    checks++;
    if (h !== eh || v !== ev) begin
      failures++;
      $display("FAIL %s: d=%h h=%h (exp %h) v=%h (exp %h)", what, datain, h, eh, v, ev);
    end
  endtask

  task automatic check_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: d=%h got %b exp %b", what, datain, got, exp);
    end
  endtask

  initial begin
    logic [63:0] d;
    // Example of the source: an all-zero word has all-zero check bits.
    drive(1'b1, '0);
    check_hv('0, '0, "zero word");
    // Check bit 0 of each row covers exactly the data bits listed in the source.
    for (int j = 0; j < 32; j++) begin
      logic in_list;
      in_list = 1'b0;
      foreach (H0_LIST[i]) if (H0_LIST[i] == j) in_list = 1'b1;
      drive(1'b1, 64'(1) << j);
      check_bit(h[0], in_list, "H(0) lower row");
      check_bit(h[6], 1'b0, "upper row untouched");
      drive(1'b1, 64'(1) << (j + 32));
      check_bit(h[6], in_list, "H(0) upper row");
      check_bit(h[0], 1'b0, "lower row untouched");
    end
    // Data bit 0 sits at position 3 = 0b000011, data bit 31 at 38 = 0b100110.
    drive(1'b1, 64'h1);
    check_hv(12'b000000_000011, 32'h1, "bit 0");
    drive(1'b1, 64'h8000_0000);
    check_hv(12'b000000_100110, 32'h8000_0000, "bit 31");
    // Random words against the reference model.
    for (int i = 0; i < 3000; i++) begin
      d = rand64();
      drive(1'b1, d);
      check_hv(HW'(ref_h(3, d)), ref_v(d), "random");
    end
    // Enable low: both outputs are zero.
    for (int i = 0; i < 20; i++) begin
      drive(1'b0, rand64());
      check_hv('0, '0, "disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
