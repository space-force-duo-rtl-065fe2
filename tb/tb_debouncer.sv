// tb_debouncer: bounces two buttons independently and checks that the
// debounced level follows only inputs that held still for STABLE_CYCLES,
// that it changes exactly 2 (synchroniser) + STABLE_CYCLES cycles after the
// last bounce, and that `rise` pulses once per press.
module tb_debouncer;
  localparam int N = 20;
  logic clk = 0, rst = 1;
  logic [1:0] btn_raw = '0, btn, rise;
  int checks = 0, failures = 0;
  int rises [2] = '{0, 0};

  debouncer #(.WIDTH(2), .STABLE_CYCLES(N)) dut (.clk, .rst, .btn_raw, .btn, .rise);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) for (int i = 0; i < 2; i++) if (rise[i]) rises[i]++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Bounce button `i` towards level `lv`, then hold it; check the timing.
  task automatic press(input int i, input logic lv);
    int settle, k;
    for (k = 0; k < 6; k++) begin
      @(negedge clk) btn_raw[i] = (k % 2 == 0) ? lv : !lv;
      repeat ($urandom_range(1, N - 2)) begin
        @(negedge clk);
        check(btn[i] == !lv, "no change while bouncing");
      end
    end
    @(negedge clk) btn_raw[i] = lv;
    settle = 0;
    while (btn[i] != lv && settle < 3 * N) begin
      @(negedge clk); settle++;
    end
    check(settle == N + 2, $sformatf("settled after %0d cycles", settle));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (3) @(posedge clk);
    check(btn == 2'b00, "released after reset");
    for (int r = 0; r < 5; r++) begin
      press(0, 1'b1);
      check(btn[1] == 1'b0, "other button untouched");
      press(1, 1'b1);
      press(0, 1'b0);
      press(1, 1'b0);
    end
    repeat (5) @(negedge clk);
    check(rises[0] == 5 && rises[1] == 5, $sformatf("rise pulses %0d %0d", rises[0], rises[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
