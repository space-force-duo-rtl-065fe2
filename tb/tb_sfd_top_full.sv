// tb_sfd_top_full: two terminals at their default sizes (640x480 at the
// 25.175 MHz pixel clock, 19,200 bit/s link, 10 ms debounce), joined by a
// crossed serial link, taken through one complete operation: the host
// player presses START, the login crosses the link, the client player
// presses START, both enter play, the first game messages are exchanged,
// and a full frame goes through render, perspective transform and display.
// Checks the roles, the serial bit time, the message exchange and that the
// client's VGA port shows both ships over a full frame.
module tb_sfd_top_full;
  import sfd_pkg::*;
  logic clk = 0, rst = 1;
  logic [6:0] btn_h = 0, btn_c = 0;
  logic h_txd, c_txd;
  logic signed [7:0] mic = 0, hp_h, hp_c;
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
  logic [5:0] flags_h, flags_c;
  int checks = 0, failures = 0;

  sfd_top u_host (
    .clk, .rst, .btn_raw(btn_h), .rs232_rxd(c_txd), .rs232_txd(h_txd),
    .mic_sample(mic), .mic_valid(mic_v), .hp_req, .hp_sample(hp_h), .hp_valid(hpv_h),
    .zbt0_addr(a0h), .zbt0_we(we0h), .zbt0_wdata(wd0h), .zbt0_rdata(rd0h),
    .zbt1_addr(a1h), .zbt1_we(we1h), .zbt1_wdata(wd1h), .zbt1_rdata(rd1h),
    .vga_r(r_h), .vga_g(g_h), .vga_b(b_h), .vga_hsync(hs_h), .vga_vsync(vs_h), .vga_blank(bl_h),
    .game_state(st_h), .is_host(host_h), .score(score_h), .view_sel(vw_h), .xform_frame_done(xd_h),
    .hit(flags_h[0]), .rx_frame_err(flags_h[1]), .rx_resync(flags_h[2]), .rec_overflow(flags_h[3]),
    .pb_underrun(flags_h[4]), .pb_overflow(flags_h[5]));

  sfd_top u_client (
    .clk, .rst, .btn_raw(btn_c), .rs232_rxd(h_txd), .rs232_txd(c_txd),
    .mic_sample(mic), .mic_valid(mic_v), .hp_req, .hp_sample(hp_c), .hp_valid(hpv_c),
    .zbt0_addr(a0c), .zbt0_we(we0c), .zbt0_wdata(wd0c), .zbt0_rdata(rd0c),
    .zbt1_addr(a1c), .zbt1_we(we1c), .zbt1_wdata(wd1c), .zbt1_rdata(rd1c),
    .vga_r(r_c), .vga_g(g_c), .vga_b(b_c), .vga_hsync(hs_c), .vga_vsync(vs_c), .vga_blank(bl_c),
    .game_state(st_c), .is_host(host_c), .score(score_c), .view_sel(vw_c), .xform_frame_done(xd_c),
    .hit(flags_c[0]), .rx_frame_err(flags_c[1]), .rx_resync(flags_c[2]), .rec_overflow(flags_c[3]),
    .pb_underrun(flags_c[4]), .pb_overflow(flags_c[5]));

  zbt_sram_model m0h (.clk, .addr(a0h), .we(we0h), .wdata(wd0h), .rdata(rd0h));
  zbt_sram_model m1h (.clk, .addr(a1h), .we(we1h), .wdata(wd1h), .rdata(rd1h));
  zbt_sram_model m0c (.clk, .addr(a0c), .we(we0c), .wdata(wd0c), .rdata(rd0c));
  zbt_sram_model m1c (.clk, .addr(a1c), .we(we1c), .wdata(wd1c), .rdata(rd1c));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    check(nruns > 100 && min_run == CLKS_PER_BIT && bad_runs == 0,
          $sformatf("bit time: %0d low runs, shortest %0d, %0d not whole bits", nruns, min_run, bad_runs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  // bit time on the client's line: every low run must be a whole number of
  // bit times, and the shortest one exactly one bit
  int run = 0, min_run = 1 << 30, bad_runs = 0, nruns = 0;
  always @(posedge clk) if (!rst) begin
    if (!c_txd) run++;
    else if (run != 0) begin
      nruns++;
      if (run < min_run) min_run = run;
      if (run % CLKS_PER_BIT != 0) bad_runs++;
      run = 0;
    end
  end

  // codec requests a sample every 524 clocks (48 kHz at 25.175 MHz)
  always @(negedge clk) begin
    hp_req = (cyc % 524 == 7);
    mic_v  = (cyc % 524 == 11);
    if (mic_v) mic = 8'($urandom_range(0, 60)) - 8'sd30;
  end

  initial begin
    int t, green, cyan, xd0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (100) @(negedge clk);

    // host player holds START for 12 ms
    btn_h[0] = 1;
    repeat (302_100) @(negedge clk);
    btn_h[0] = 0;
    check(st_h == G_HOST && host_h, "host after START");
    // measure the start bit of the login packet on the wire... it has gone
    // out already; wait for the client to see the whole packet
    t = 0;
    while (st_c != G_CLIENT && t < 400_000) begin @(negedge clk); t++; end
    check(st_c == G_CLIENT, $sformatf("client after login (%0d cycles)", t));

    // client player holds START for 12 ms
    btn_c[0] = 1;
    repeat (302_100) @(negedge clk);
    btn_c[0] = 0;
    t = 0;
    // a voice packet may be on the wire ahead of the login
    while (st_h != G_PLAY && t < 1_000_000) begin @(negedge clk); t++; end
    check(st_h == G_PLAY && st_c == G_PLAY, $sformatf("both playing (%s %s)", st_h.name(), st_c.name()));

    // wait for the client to receive a game message, then for one whole
    // transformed frame that started after it
    t = 0;
    while (!u_client.game_rx_valid && t < 1_000_000) begin @(negedge clk); t++; end
    repeat (2) @(negedge clk);
    check(u_client.u_fsm.rpres, "game message received by the client");
    repeat (2) begin
      while (!xd_c) @(negedge clk);
      @(negedge clk);
    end
    // the next full displayed frame
    while (!(u_client.hcount == 0 && u_client.vcount == 0)) @(negedge clk);
    repeat (10) @(negedge clk);
    green = 0; cyan = 0;
    repeat (800 * 525) begin
      @(negedge clk);
      if (!bl_c && r_c == 0 && g_c == 8'hFF && b_c == 0) green++;
      if (!bl_c && r_c == 0 && g_c == 8'hFF && b_c == 8'hFF) cyan++;
    end
    $display("client screen: %0d local-ship pixels, %0d remote-ship pixels, at cycle %0d", green, cyan, cyc);
    check(green == SHIP_W * SHIP_H, $sformatf("local ship fully shown (%0d)", green));
    check(cyan == SHIP_W * SHIP_H, $sformatf("remote ship fully shown (%0d)", cyan));
    check(nruns > 100 && min_run == CLKS_PER_BIT && bad_runs == 0,
          $sformatf("bit time: %0d low runs, shortest %0d, %0d not whole bits", nruns, min_run, bad_runs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
