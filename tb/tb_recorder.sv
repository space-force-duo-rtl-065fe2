// tb_recorder: feeds microphone samples at a fixed spacing, drains the
// 16-byte buffer the way the packet parser does, and compares every sample
// with a low-pass reference computed here (windowed-sinc taps, real
// arithmetic).  Also fills the buffer without draining it and checks that it
// holds exactly 16 samples, flags each dropped one, and keeps the oldest.
module tb_recorder;
  logic clk = 0, rst = 1;
  logic signed [7:0] mic_sample = 0;
  logic mic_valid = 0, aud_pop = 0, overflow;
  logic [7:0] aud_data;
  logic [4:0] aud_count;
  int checks = 0, failures = 0, novf = 0;
  int h [32], hist [32];
  int expq [$];

  recorder dut (.clk, .rst, .mic_sample, .mic_valid, .aud_data, .aud_count, .aud_pop, .overflow);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && overflow) novf++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(input int x);
    int acc = 0, r;
    for (int i = 31; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = x;
    for (int i = 0; i < 32; i++) acc += hist[i] * h[i];
    r = (acc + 512) >>> 10;
    return (r > 127) ? 127 : (r < -128) ? -128 : r;
  endfunction

  task automatic mic(input int x);
    @(negedge clk);
    mic_sample = 8'(x); mic_valid = 1;
    expq.push_back(model(x) & 255);
    @(negedge clk);
    mic_valid = 0;
    repeat (40) @(negedge clk);
  endtask

  task automatic drain(input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      check(aud_count != 0, "sample available");
      check(int'(aud_data) == expq[0], $sformatf("sample %02x want %02x", aud_data, expq[0]));
      void'(expq.pop_front());
      aud_pop = 1;
      @(negedge clk);
      aud_pop = 0;
    end
  endtask

  initial begin
    real s[32], sum, fc, m, pi;
    pi = 3.14159265358979; fc = 3000.0 / 48000.0; sum = 0;
    for (int n = 0; n < 32; n++) begin
      m = n - 15.5;
      s[n] = 2.0 * fc * $sin(2.0 * pi * fc * m) / (2.0 * pi * fc * m)
             * (0.54 - 0.46 * $cos(2.0 * pi * n / 31.0));
      sum += s[n];
    end
    for (int n = 0; n < 32; n++) begin h[n] = int'(s[n] / sum * 1024.0); hist[n] = 0; end

    repeat (3) @(posedge clk);
    rst = 0;
    // steady operation: 15 samples in, 15 out, several times
    for (int r = 0; r < 6; r++) begin
      for (int k = 0; k < 15; k++) mic(int'($signed(8'($urandom))) / 2);
      check(aud_count == 15, $sformatf("count %0d after 15 samples", aud_count));
      drain(15);
    end
    // overflow: 20 samples, nobody draining
    for (int k = 0; k < 20; k++) mic(60);
    check(aud_count == 16, $sformatf("full buffer holds %0d", aud_count));
    check(novf == 4, $sformatf("%0d overflows flagged", novf));
    repeat (4) void'(expq.pop_back());     // the four newest were dropped
    drain(16);
    check(aud_count == 0, "empty after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
