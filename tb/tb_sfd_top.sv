// tb_sfd_top: two complete terminals joined by a crossed serial link, each
// with its two ZBT frame-buffer chips, codec-side audio stimulus and a
// player pressing buttons.  Runs at a reduced screen (160x120), bit time
// (8 clocks) and debounce time (4 clocks) so a whole game fits in a short
// simulation.
//
// It checks, end to end: a stray byte and a broken frame on the line are
// discarded; the first START makes that terminal host and the other client;
// game messages flow both ways; the host scores a hit; voice samples recorded
// on the host arrive unchanged in the client's playback path and come out of
// its filter; the client's VGA output shows both ships; the camera view
// switch changes the transformed picture.  Each mechanism is counted and one
// that never happened counts as a failure.
module tb_sfd_top;
  import sfd_pkg::*;
  localparam int HA = 160, VA = 120, HT = 200, VT = 130;

  logic clk = 0, rst = 1;
  logic [6:0] btn_h = 0, btn_c = 0;
  logic h_txd, c_txd, inj = 1;
  logic signed [7:0] mic_h = 0, mic_c = 0, hp_h, hp_c;
  logic mic_v = 0, hp_req = 0, hpv_h, hpv_c;
  logic [ZBT_AW-1:0] a0h, a1h, a0c, a1c;
  logic we0h, we1h, we0c, we1c;
  logic [ZBT_DW-1:0] wd0h, wd1h, rd0h, rd1h, wd0c, wd1c, rd0c, rd1c;
  logic [7:0] r_h, g_h, b_h, r_c, g_c, b_c;
  logic hs_h, vs_h, bl_h, hs_c, vs_c, bl_c;
  game_state_e st_h, st_c;
  logic host_h, host_c, xd_h, xd_c;
  logic [7:0] score_h, score_c;
  logic [1:0] vw_h, vw_c;
  logic hit_h, hit_c, fe_h, fe_c, rs_h, rs_c, ro_h, ro_c, pu_h, pu_c, po_h, po_c;
  int checks = 0, failures = 0;

  sfd_top #(.CLKS_PER_BIT(8), .STABLE_CYCLES(4),
            .H_ACTIVE(HA), .H_FP(8), .H_SYNC(16), .H_BP(16),
            .V_ACTIVE(VA), .V_FP(2), .V_SYNC(2), .V_BP(6)) u_host (
    .clk, .rst, .btn_raw(btn_h), .rs232_rxd(c_txd), .rs232_txd(h_txd),
    .mic_sample(mic_h), .mic_valid(mic_v), .hp_req, .hp_sample(hp_h), .hp_valid(hpv_h),
    .zbt0_addr(a0h), .zbt0_we(we0h), .zbt0_wdata(wd0h), .zbt0_rdata(rd0h),
    .zbt1_addr(a1h), .zbt1_we(we1h), .zbt1_wdata(wd1h), .zbt1_rdata(rd1h),
    .vga_r(r_h), .vga_g(g_h), .vga_b(b_h), .vga_hsync(hs_h), .vga_vsync(vs_h), .vga_blank(bl_h),
    .game_state(st_h), .is_host(host_h), .score(score_h), .view_sel(vw_h), .xform_frame_done(xd_h),
    .hit(hit_h), .rx_frame_err(fe_h), .rx_resync(rs_h), .rec_overflow(ro_h),
    .pb_underrun(pu_h), .pb_overflow(po_h));

  sfd_top #(.CLKS_PER_BIT(8), .STABLE_CYCLES(4),
            .H_ACTIVE(HA), .H_FP(8), .H_SYNC(16), .H_BP(16),
            .V_ACTIVE(VA), .V_FP(2), .V_SYNC(2), .V_BP(6)) u_client (
    .clk, .rst, .btn_raw(btn_c), .rs232_rxd(h_txd & inj), .rs232_txd(c_txd),
    .mic_sample(mic_c), .mic_valid(mic_v), .hp_req, .hp_sample(hp_c), .hp_valid(hpv_c),
    .zbt0_addr(a0c), .zbt0_we(we0c), .zbt0_wdata(wd0c), .zbt0_rdata(rd0c),
    .zbt1_addr(a1c), .zbt1_we(we1c), .zbt1_wdata(wd1c), .zbt1_rdata(rd1c),
    .vga_r(r_c), .vga_g(g_c), .vga_b(b_c), .vga_hsync(hs_c), .vga_vsync(vs_c), .vga_blank(bl_c),
    .game_state(st_c), .is_host(host_c), .score(score_c), .view_sel(vw_c), .xform_frame_done(xd_c),
    .hit(hit_c), .rx_frame_err(fe_c), .rx_resync(rs_c), .rec_overflow(ro_c),
    .pb_underrun(pu_c), .pb_overflow(po_c));

  zbt_sram_model m0h (.clk, .addr(a0h), .we(we0h), .wdata(wd0h), .rdata(rd0h));
  zbt_sram_model m1h (.clk, .addr(a1h), .we(we1h), .wdata(wd1h), .rdata(rd1h));
  zbt_sram_model m0c (.clk, .addr(a0c), .we(we0c), .wdata(wd0c), .rdata(rd0c));
  zbt_sram_model m1c (.clk, .addr(a1c), .we(we1c), .wdata(wd1c), .rdata(rd1c));

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- event counters
  int n_resync = 0, n_ferr = 0, n_game_h = 0, n_game_c = 0, n_audio = 0, n_audio_ok = 0;
  int n_hit = 0, n_rec_ovf = 0, n_pb_und = 0, n_pb_ovf = 0, n_hp_loud = 0, n_xframes = 0;
  int n_xframes_v1 = 0;
  logic [7:0] sentq [$];

  always @(posedge clk) if (!rst) begin
    if (rs_c) n_resync++;
    if (fe_c) n_ferr++;
    if (u_host.game_rx_valid) n_game_h++;
    if (u_client.game_rx_valid) n_game_c++;
    if (hit_h) n_hit++;
    if (ro_h) n_rec_ovf++;
    if (pu_c) n_pb_und++;
    if (po_c) n_pb_ovf++;
    if (hpv_c && (hp_c > 8'sd8 || hp_c < -8'sd8)) n_hp_loud++;
    if (xd_c) begin n_xframes++; if (u_client.u_xform.m.h21 != 0) n_xframes_v1++; end
    // voice bytes leaving the host's recorder ...
    if (u_host.aud_pop) sentq.push_back(u_host.aud_data);
    // ... must arrive in the client's playback path unchanged and in order
    if (u_client.audio_rx_valid) begin
      bit ok = 1;
      n_audio++;
      for (int i = 0; i < 15; i++) begin
        if (sentq.size() == 0 || sentq[0] != u_client.audio_rx[(14 - i) * 8 +: 8]) ok = 0;
        if (sentq.size() != 0) void'(sentq.pop_front());
      end
      if (ok) n_audio_ok++;
    end
  end

  // codec: a 48 kHz-like sample stream (every 64 clocks) and playback requests
  int tick = 0;
  always @(negedge clk) begin
    tick++;
    mic_v  = (tick % 64 == 0);
    if (mic_v) begin
      mic_h = 8'($rtoi(90.0 * $sin(tick / 64 * 0.2)));
      mic_c = 8'($rtoi(60.0 * $sin(tick / 64 * 0.3)));
    end
    hp_req = (tick % 200 == 100);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hold(ref logic [6:0] b, input int i, input int cycles);
    @(negedge clk) b[i] = 1;
    repeat (cycles) @(negedge clk);
    b[i] = 0;
    repeat (12) @(negedge clk);
  endtask

  task automatic inject(input logic [7:0] d, input logic stop);
    logic [9:0] f;
    f = {stop, d, 1'b0};
    for (int i = 0; i < 10; i++) begin
      inj = f[i];
      repeat (8) @(negedge clk);
    end
    inj = 1;
    repeat (16) @(negedge clk);
  endtask

  task automatic frames(input int n);
    repeat (n * HT * VT) @(negedge clk);
  endtask

  // count ship-coloured pixels on the client's screen over one frame
  task automatic screen(output int green, output int cyan);
    green = 0; cyan = 0;
    repeat (HT * VT) begin
      @(negedge clk);
      if (!bl_c && r_c == 0 && g_c == 8'hFF && b_c == 0) green++;
      if (!bl_c && r_c == 0 && g_c == 8'hFF && b_c == 8'hFF) cyan++;
    end
  endtask

  initial begin
    int green, cyan, t;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (20) @(negedge clk);
    // line noise before anyone logs in
    inject(8'h55, 1'b1);           // no sync nibble: discarded
    inject(8'hA1, 1'b0);           // stop bit low: framing error
    check(st_h == G_IDLE && st_c == G_IDLE, "both in the lobby");

    // host logs in first
    hold(btn_h, 0, 10);
    check(st_h == G_HOST && host_h, "first START makes host");
    t = 0;
    while (st_c != G_CLIENT && t < 5000) begin @(negedge clk); t++; end
    check(st_c == G_CLIENT && !host_c, "other terminal becomes client");
    hold(btn_c, 0, 10);
    t = 0;
    while (st_h != G_PLAY && t < 5000) begin @(negedge clk); t++; end
    check(st_h == G_PLAY && st_c == G_PLAY, "both playing");

    // client moves right a bit, both fire repeatedly until the host scores
    btn_c[3] = 1;
    frames(3);
    btn_c[3] = 0;
    t = 0;
    while (n_hit == 0 && t < 150) begin
      hold(btn_h, 1, 8);
      hold(btn_c, 1, 8);
      frames(2);
      t++;
    end
    check(score_h >= 1, $sformatf("host score %0d", score_h));
    frames(2);
    check(score_c == score_h, "client shows the host's score");

    // the picture reaches the client's VGA port through render, transform, display
    frames(12);
    screen(green, cyan);
    check(green > 0, $sformatf("local ship on screen (%0d pixels)", green));
    check(cyan > 0, $sformatf("remote ship on screen (%0d pixels)", cyan));

    // camera view switch
    hold(btn_c, 6, 10);
    check(vw_c == 2'd1, "view switched");
    frames(14);
    $display("events: resync=%0d ferr=%0d game_h=%0d game_c=%0d audio=%0d/%0d hit=%0d rec_ovf=%0d pb_und=%0d pb_ovf=%0d loud=%0d xframes=%0d/%0d",
             n_resync, n_ferr, n_game_h, n_game_c, n_audio_ok, n_audio, n_hit, n_rec_ovf, n_pb_und,
             n_pb_ovf, n_hp_loud, n_xframes, n_xframes_v1);
    check(n_resync > 0, "stray byte discarded");
    check(n_ferr > 0, "framing error seen");
    check(n_game_h > 0 && n_game_c > 0, "game messages both ways");
    check(n_audio > 0 && n_audio_ok == n_audio, "voice packets intact");
    check(n_hit > 0, "hit scored");
    check(n_rec_ovf > 0, "recorder overflow");
    check(n_pb_und > 0, "playback underrun");
    check(n_pb_ovf > 0, "playback overflow");
    check(n_hp_loud > 0, "voice heard on the client");
    check(n_xframes > 2, "transformer frames");
    check(n_xframes_v1 > 0, "transformed with the new view");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
