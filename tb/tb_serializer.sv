// tb_serializer: sends random bytes through the serializer and decodes the
// line independently, sampling each bit in its middle.  Checks start and stop
// bits, the data bits, and that each frame occupies exactly 10 bit times.
module tb_serializer;
  localparam int CPB = 8;
  logic clk = 0, rst = 1;
  logic [7:0] data;
  logic valid, ready, txd;
  int checks = 0, failures = 0;

  serializer #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .data, .valid, .ready, .txd);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b, got;
    int t0, t1;
    valid = 0; data = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk);
    check(txd == 1'b1 && ready, "idle line high and ready");
    for (int n = 0; n < 40; n++) begin
      b = 8'($urandom);
      @(negedge clk);
      data = b; valid = 1;
      @(posedge clk);           // accepted at this edge
      t0 = $time;
      @(negedge clk);
      valid = 0;
      data = 8'($urandom);       // must not matter any more
      // middle of the start bit
      #(CPB * 10 / 2 - 10);
      check(txd == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        #(CPB * 10);
        got[i] = txd;
      end
      #(CPB * 10);
      check(txd == 1'b1, "stop bit");
      check(got == b, $sformatf("byte %02x sent as %02x", b, got));
      while (!ready) @(negedge clk);
      t1 = $time - 5;             // ready rose at the preceding edge
      check((t1 - t0) / 10 == 10 * CPB, $sformatf("frame took %0d cycles", (t1 - t0) / 10));
      // random idle gap
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
