// tb_opc2_encoder: self-checking testbench of opc2_encoder.
//
// Drives the combinational encoder once per clock and compares H and V in the
// same cycle (zero latency) with hand-worked vectors (zero word, all ones,
// the burst example of the source, carries / single bits) and with the
// reference model of tb_opc_ref_pkg for random words. Also checks that the
// outputs are zero while en is low. A watchdog ends the run after
// WATCHDOG cycles with a failure.
module tb_opc2_encoder;
  import tb_opc_ref_pkg::*;

  localparam int HW       = 34;
  localparam int WATCHDOG = 100000;

  logic          clk = 1'b0;
  logic          en;
  logic [63:0]   datain;
  logic [HW-1:0] h;
  logic [31:0]   v;
  int            checks = 0, failures = 0, cycles = 0;

  opc2_encoder dut (.en(en), .datain(datain), .h(h), .v(v));

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
    drive(1'b1, '1);
    check_hv({17'h1FFFE, 17'h1FFFE}, 32'h0, "all ones");
    drive(1'b1, 64'hFFFF_FFFE_0000_0000);
    check_hv({17'h1FFFD, 17'h00000}, 32'hFFFF_FFFE, "MSB burst of 31");
    drive(1'b1, 64'h8000_8000_0001_FFFF);
    check_hv({17'h10000, 17'h10000}, 32'h8001_7FFF, "carry");
    // Random words against the reference model.
    for (int i = 0; i < 3000; i++) begin
      d = rand64();
      drive(1'b1, d);
      check_hv(HW'(ref_h(2, d)), ref_v(d), "random");
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
