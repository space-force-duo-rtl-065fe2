// tb_matrix_transformer: loads a 640x480 test picture into the source ZBT
// model, runs one frame of the transformer for each of the four camera views
// while real-time clients on both banks take priority about half the time,
// and compares the whole output frame with a reference mapping computed here
// with 64-bit integers from the same matrix definition:
//   w = H21*v + H22, r = floor(2^32 / w),
//   xs = floor((H00*u + H01*v + H02) * r / 2^32), likewise ys,
// source pixel if inside the picture, black otherwise.  Also checks that
// views 1-3 really narrow the picture towards one edge and that the
// transformer waited for grants.
module tb_matrix_transformer;
  import sfd_pkg::*;
  logic clk = 0, rst = 1;
  logic enable = 0;
  logic [1:0] view_sel = 0;
  zbt_req_t src_req, dst_req, s0_req, d0_req;
  zbt_rsp_t src_rsp, dst_rsp, s0_rsp, d0_rsp;
  logic [ZBT_AW-1:0] a0, a1;
  logic we0, we1;
  logic [ZBT_DW-1:0] wd0, wd1, rd0, rd1;
  logic frame_done, busy;
  int checks = 0, failures = 0, held_off = 0, ndone = 0;

  matrix_transformer dut (.clk, .rst, .enable, .view_sel, .src_req, .src_rsp, .dst_req, .dst_rsp,
                          .frame_done, .busy);
  zbt_arbiter u_arb0 (.clk, .rst, .c0_req(s0_req), .c0_rsp(s0_rsp), .c1_req(src_req), .c1_rsp(src_rsp),
                      .zbt_addr(a0), .zbt_we(we0), .zbt_wdata(wd0), .zbt_rdata(rd0));
  zbt_arbiter u_arb1 (.clk, .rst, .c0_req(d0_req), .c0_rsp(d0_rsp), .c1_req(dst_req), .c1_rsp(dst_rsp),
                      .zbt_addr(a1), .zbt_we(we1), .zbt_wdata(wd1), .zbt_rdata(rd1));
  zbt_sram_model u_src (.clk, .addr(a0), .we(we0), .wdata(wd0), .rdata(rd0));
  zbt_sram_model u_dst (.clk, .addr(a1), .we(we1), .wdata(wd1), .rdata(rd1));

  always #5 clk = ~clk;

  // priority clients: read-only, busy about half the time
  always @(negedge clk) begin
    s0_req = '{req: ($urandom_range(0, 1) == 1), we: 1'b0, addr: ZBT_AW'($urandom_range(0, 76799)), wdata: '0};
    d0_req = '{req: ($urandom_range(0, 1) == 1), we: 1'b0, addr: ZBT_AW'($urandom_range(0, 76799)), wdata: '0};
  end
  always @(posedge clk) if (!rst) begin
    if ((src_req.req && !src_rsp.gnt) || (dst_req.req && !dst_rsp.gnt)) held_off++;
    if (frame_done) ndone++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pic(int x, y);
    return 8'((x / 5) ^ (y * 3)) | 8'h01;    // never black
  endfunction

  function automatic logic [7:0] ref_out(view_mtx_t m, int u, int v);
    longint w, r, nx, ny, xs, ys;
    w = longint'(m.h21) * v + longint'(m.h22);
    if (w <= 0) return 8'h00;
    r = (64'sd1 <<< 32) / w;
    nx = longint'(m.h00) * u + longint'(m.h01) * v + longint'(m.h02);
    ny = longint'(m.h10) * u + longint'(m.h11) * v + longint'(m.h12);
    xs = (nx * r) >>> 32;
    ys = (ny * r) >>> 32;
    if (xs < 0 || xs >= 640 || ys < 0 || ys >= 480) return 8'h00;
    return pic(int'(xs), int'(ys));
  endfunction

  function automatic logic [7:0] out_pix(int u, int v);
    return u_dst.mem[v * 160 + u / 4][8 * (u % 4) +: 8];
  endfunction

  initial begin
    int bad, t0, cycles, black_top, black_bot;
    view_mtx_t m;
    #1;
    for (int y = 0; y < 480; y++)
      for (int x = 0; x < 640; x += 4)
        u_src.mem[y * 160 + x / 4] = {4'h0, pic(x + 3, y), pic(x + 2, y), pic(x + 1, y), pic(x, y)};
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int vw = 0; vw < 4; vw++) begin
      for (int i = 0; i < 76800; i++) u_dst.mem[i] = 36'hFFFFFFFFF;
      @(negedge clk);
      view_sel = 2'(vw); enable = 1;
      @(negedge clk);
      enable = 0;
      t0 = $time;
      while (!frame_done) @(negedge clk);
      cycles = ($time - t0) / 10;
      repeat (4) @(negedge clk);
      m = view_matrix(2'(vw));
      bad = 0; black_top = 0; black_bot = 0;
      for (int v = 0; v < 480; v++)
        for (int u = 0; u < 640; u++) begin
          if (out_pix(u, v) != ref_out(m, u, v)) begin
            bad++;
            if (bad < 4) $display("view %0d (%0d,%0d): %02x want %02x", vw, u, v, out_pix(u, v), ref_out(m, u, v));
          end
          if (v == 0 && out_pix(u, v) == 8'h00) black_top++;
          if (v == 479 && out_pix(u, v) == 8'h00) black_bot++;
        end
      check(bad == 0, $sformatf("view %0d: %0d wrong pixels", vw, bad));
      check(u_dst.mem[76799][35:32] == 4'h0, "last word written");
      $display("view %0d: %0d cycles, %0d/%0d black in top/bottom row", vw, cycles, black_top, black_bot);
      case (vw)
        0: check(black_top == 0 && black_bot == 0, "flat view keeps the full picture");
        1, 3: check(black_top > 300 && black_bot < 10, "tilted away: top narrower");
        default: check(black_bot > 300 && black_top < 10, "tilted towards: bottom narrower");
      endcase
    end
    check(ndone == 4, "one frame_done per frame");
    check(held_off > 1000, $sformatf("held off %0d cycles", held_off));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
