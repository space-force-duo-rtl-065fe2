// tb_fir_filter: feeds impulses, a DC level and random samples into the
// filter and compares each output with a reference computed here in real
// arithmetic: the Hamming-windowed sinc for a 3 kHz cut-off at 48 kHz,
// normalised to 1024 and rounded.  Also checks the NTAPS+1 cycle latency and
// that a 12 kHz tone is strongly attenuated while DC passes.
module tb_fir_filter;
  logic clk = 0, rst = 1;
  logic signed [7:0] in_sample = 0, out_sample;
  logic in_valid = 0, out_valid;
  int checks = 0, failures = 0;
  int h [32];
  int hist [32];

  fir_filter dut (.clk, .rst, .in_sample, .in_valid, .out_sample, .out_valid);

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

  function automatic int model();
    int acc = 0, r;
    for (int i = 0; i < 32; i++) acc += hist[i] * h[i];
    r = (acc + 512) >>> 10;
    return (r > 127) ? 127 : (r < -128) ? -128 : r;
  endfunction

  task automatic push(input int x, output int y, output int lat);
    for (int i = 31; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = x;
    @(negedge clk);
    in_sample = 8'(x); in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    lat = 1;
    while (!out_valid && lat < 100) begin @(negedge clk); lat++; end
    y = out_sample;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    real s[32], sum, fc, m, pi;
    int y, lat, peak;
    pi = 3.14159265358979;
    fc = 3000.0 / 48000.0;
    sum = 0;
    for (int n = 0; n < 32; n++) begin
      m = n - 15.5;
      s[n] = 2.0 * fc * $sin(2.0 * pi * fc * m) / (2.0 * pi * fc * m)
             * (0.54 - 0.46 * $cos(2.0 * pi * n / 31.0));
      sum += s[n];
    end
    for (int n = 0; n < 32; n++) h[n] = int'(s[n] / sum * 1024.0);
    for (int n = 0; n < 32; n++) hist[n] = 0;

    repeat (3) @(posedge clk);
    rst = 0;
    // impulse response
    push(100, y, lat);
    // lat counts negedges from the one before the in_valid edge: 34 means
    // out_valid is high 33 (NTAPS+1) cycles after the in_valid cycle
    check(lat == 34, $sformatf("latency %0d", lat));
    check(y == model(), "impulse tap 0");
    for (int k = 1; k < 32; k++) begin
      push(0, y, lat);
      check(y == model(), $sformatf("impulse tap %0d: got %0d want %0d", k, y, model()));
    end
    // DC passes with gain 1
    for (int k = 0; k < 40; k++) begin
      push(80, y, lat);
      check(y == model(), "dc step");
    end
    check(y == 80, $sformatf("dc gain: %0d", y));
    // 12 kHz tone (period 4 samples) is rejected
    peak = 0;
    for (int k = 0; k < 64; k++) begin
      push((k % 4 == 0) ? 100 : (k % 4 == 2) ? -100 : 0, y, lat);
      check(y == model(), "tone");
      if (k > 32 && (y > peak || -y > peak)) peak = (y > 0) ? y : -y;
    end
    check(peak <= 4, $sformatf("12 kHz residue %0d", peak));
    // random samples, including saturation cases
    for (int k = 0; k < 200; k++) begin
      push(int'($signed(8'($urandom))), y, lat);
      check(y == model(), $sformatf("random: got %0d want %0d", y, model()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
