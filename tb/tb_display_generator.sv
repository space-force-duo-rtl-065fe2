// tb_display_generator: fills a ZBT model with a picture, lets the display
// generator show two full 640x480 frames while a second client keeps asking
// the same bank for reads, and checks every output cycle: colour, sync and
// blank must equal what the VGA counters showed 5 clocks earlier, with the
// pixel widened from RRRGGGBB and black while blanked.
module tb_display_generator;
  import sfd_pkg::*;
  logic clk = 0, rst = 1;
  logic [9:0] hcount, vcount;
  logic hsync, vsync, blank, frame_start;
  zbt_req_t dg_req, c1_req;
  zbt_rsp_t dg_rsp, c1_rsp;
  logic [ZBT_AW-1:0] zaddr;
  logic zwe;
  logic [ZBT_DW-1:0] zwd, zrd;
  logic [7:0] vga_r, vga_g, vga_b;
  logic vga_hsync, vga_vsync, vga_blank;
  int checks = 0, failures = 0, c1_granted = 0;

  vga_generator u_vga (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank, .frame_start);
  display_generator dut (.clk, .rst, .hcount, .vcount, .hsync_in(hsync), .vsync_in(vsync),
                         .blank_in(blank), .mem_req(dg_req), .mem_rsp(dg_rsp),
                         .vga_r, .vga_g, .vga_b, .vga_hsync, .vga_vsync, .vga_blank);
  zbt_arbiter u_arb (.clk, .rst, .c0_req(dg_req), .c0_rsp(dg_rsp), .c1_req, .c1_rsp,
                     .zbt_addr(zaddr), .zbt_we(zwe), .zbt_wdata(zwd), .zbt_rdata(zrd));
  zbt_sram_model u_mem (.clk, .addr(zaddr), .we(zwe), .wdata(zwd), .rdata(zrd));

  always #5 clk = ~clk;

  // competing reader on the same bank
  always @(negedge clk) begin
    c1_req.req   = ($urandom_range(0, 1) == 1);
    c1_req.we    = 1'b0;
    c1_req.addr  = ZBT_AW'($urandom_range(0, 76799));
    c1_req.wdata = '0;
  end
  always @(posedge clk) if (!rst && c1_rsp.gnt) c1_granted++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pic(int x, y);
    return 8'((x * 7) ^ (y * 13) ^ (x >> 3));
  endfunction

  initial begin
    int hq [$], vq [$], bq [$], hsq [$], vsq [$];
    int bad_sync, bad_pix, nvis;
    logic [7:0] p, er, eg, eb;
    #1;
    for (int y = 0; y < 480; y++)
      for (int x = 0; x < 640; x += 4)
        u_mem.mem[y * 160 + x / 4] = {4'h0, pic(x + 3, y), pic(x + 2, y), pic(x + 1, y), pic(x, y)};
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    bad_sync = 0; bad_pix = 0; nvis = 0;
    for (int c = 0; c < 2 * 420000 + 10; c++) begin
      @(negedge clk);
      hq.push_back(hcount); vq.push_back(vcount); bq.push_back(blank);
      hsq.push_back(hsync); vsq.push_back(vsync);
      if (hq.size() > 6) begin
        void'(hq.pop_front()); void'(vq.pop_front()); void'(bq.pop_front());
        void'(hsq.pop_front()); void'(vsq.pop_front());
        // entries [0] are from 5 clocks before the current outputs
        if (vga_hsync != hsq[0][0] || vga_vsync != vsq[0][0] || vga_blank != bq[0][0]) bad_sync++;
        if (bq[0][0]) begin
          if ({vga_r, vga_g, vga_b} != 24'h0) bad_pix++;
        end else begin
          nvis++;
          p  = pic(hq[0], vq[0]);
          er = {p[7:5], p[7:5], p[7:6]};
          eg = {p[4:2], p[4:2], p[4:3]};
          eb = {4{p[1:0]}};
          if (vga_r != er || vga_g != eg || vga_b != eb) begin
            bad_pix++;
            if (bad_pix < 4) $display("pixel (%0d,%0d) %02x%02x%02x want %02x%02x%02x", hq[0], vq[0],
                                      vga_r, vga_g, vga_b, er, eg, eb);
          end
        end
      end
    end
    check(bad_sync == 0, $sformatf("%0d cycles with wrong sync/blank", bad_sync));
    check(bad_pix == 0, $sformatf("%0d wrong pixels", bad_pix));
    check(nvis >= 2 * 307200 - 1000, $sformatf("%0d visible pixels seen", nvis));
    check(c1_granted > 100000, $sformatf("second client granted %0d times", c1_granted));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
