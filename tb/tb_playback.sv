// tb_playback: hands received audio payloads to the playback path, requests
// samples at a codec-like rate, and compares the filtered headphone samples
// with a low-pass reference of the expected sample stream (payload bytes in
// order, silence when the buffer is empty).  Checks underrun and overflow
// flags and that every request gives exactly one output.
module tb_playback;
  import sfd_pkg::*;
  logic clk = 0, rst = 1;
  payload_t pkt_payload = '0;
  logic pkt_valid = 0, hp_req = 0, hp_valid, underrun, overflow;
  logic signed [7:0] hp_sample;
  int checks = 0, failures = 0, nund = 0, novf = 0, nout = 0;
  int h [32], hist [32];
  int fifo [$];

  playback dut (.clk, .rst, .pkt_payload, .pkt_valid, .hp_req, .hp_sample, .hp_valid,
                .underrun, .overflow);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    if (underrun) nund++;
    if (overflow) novf++;
    if (hp_valid) nout++;
  end

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

  task automatic packet(input int first);
    @(negedge clk);
    for (int i = 0; i < 15; i++) begin
      pkt_payload[(14 - i) * 8 +: 8] = 8'(first + 7 * i);
      if (fifo.size() < 16) fifo.push_back(int'($signed(8'(first + 7 * i))));
    end
    pkt_valid = 1;
    @(negedge clk);
    pkt_valid = 0;
    repeat (20) @(negedge clk);
  endtask

  task automatic request();
    int x, want, wait_n;
    x = (fifo.size() != 0) ? fifo.pop_front() : 0;
    want = model(x);
    @(negedge clk);
    hp_req = 1;
    @(negedge clk);
    hp_req = 0;
    wait_n = 0;
    while (!hp_valid && wait_n < 100) begin @(negedge clk); wait_n++; end
    check(hp_valid, "output produced");
    check(int'(hp_sample) == want, $sformatf("headphone %0d want %0d", hp_sample, want));
    repeat (10) @(negedge clk);
  endtask

  initial begin
    real s[32], sum, fc, m, pi;
    int n0;
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
    repeat (3) @(posedge clk);
    // codec asks before anything arrived: silence and underrun
    for (int k = 0; k < 3; k++) request();
    check(nund == 3, $sformatf("underruns %0d", nund));
    for (int r = 0; r < 4; r++) begin
      packet(r * 40 - 60);
      for (int k = 0; k < 17; k++) request();   // 15 samples, then 2 silent
    end
    check(nund == 3 + 4 * 2, $sformatf("underruns %0d", nund));
    // two packets without playback: 16 kept, 14 dropped
    packet(10);
    packet(90);
    check(novf == 14, $sformatf("overflows %0d", novf));
    for (int k = 0; k < 16; k++) request();
    n0 = nund;
    request();
    check(nund == n0 + 1, "empty again");
    check(nout == 3 + 4 * 17 + 17, $sformatf("outputs %0d", nout));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
