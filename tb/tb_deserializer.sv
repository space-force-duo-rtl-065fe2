// tb_deserializer: drives RS-232 frames onto the line (with a small clock
// offset between sender and receiver) and checks every received byte, the
// one-cycle valid pulse, that a short glitch is not taken as a start bit and
// that a frame with a bad stop bit is reported and not delivered.
module tb_deserializer;
  localparam int CPB = 16;
  logic clk = 0, rst = 1;
  logic rxd = 1;
  logic [7:0] data;
  logic valid, frame_err;
  int checks = 0, failures = 0;
  int nvalid = 0, nerr = 0;
  logic [7:0] last;

  deserializer #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .rxd, .data, .valid, .frame_err);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (!rst && valid) begin nvalid++; last = data; end
    if (!rst && frame_err) nerr++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // bit period slightly off the receiver's (3% fast or slow)
  task automatic send(input logic [7:0] b, input logic stop, input int bit_ps);
    rxd = 0; #(bit_ps);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; #(bit_ps); end
    rxd = stop; #(bit_ps);
    rxd = 1; #(bit_ps);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    int n0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    for (int n = 0; n < 60; n++) begin
      b = 8'($urandom);
      n0 = nvalid;
      send(b, 1'b1, (n % 2) ? CPB * 10 * 103 / 100 : CPB * 10 * 97 / 100);
      check(nvalid == n0 + 1, "one valid per frame");
      check(last == b, $sformatf("sent %02x got %02x", b, last));
    end
    // a glitch of a quarter bit must not start a frame
    n0 = nvalid;
    rxd = 0; #(CPB * 10 / 4); rxd = 1;
    #(CPB * 10 * 12);
    check(nvalid == n0 && nerr == 0, $sformatf("glitch ignored %0d %0d %0d", nvalid, n0, nerr));
    // stop bit low: framing error, nothing delivered
    n0 = nvalid;
    send(8'h5A, 1'b0, CPB * 10);
    #(CPB * 10 * 2);
    check(nvalid == n0, "bad frame not delivered");
    check(nerr == 1, $sformatf("framing error flagged %0d", nerr));
    // recovers afterwards
    send(8'hC3, 1'b1, CPB * 10);
    check(last == 8'hC3, "recovers after framing error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
