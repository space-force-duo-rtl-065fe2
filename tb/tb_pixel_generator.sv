// tb_pixel_generator: sweeps the raster counters over two 640x480 frames,
// collects the words the generator writes, and compares each pixel with the
// colour computed here from the game state: score bar, shots, ships, enemy
// and background, in that priority.  The game state is changed in the middle
// of the second frame to check that a frame is drawn from the state latched
// in the preceding vertical blanking.
module tb_pixel_generator;
  import sfd_pkg::*;
  logic clk = 0, rst = 1;
  logic [9:0] hcount = 0, vcount = 0;
  game_view_t game, drawn;
  zbt_req_t mem_req;
  logic frame_written;
  int checks = 0, failures = 0, nwritten = 0, nwrites = 0;
  logic [31:0] fb [76800];

  pixel_generator dut (.clk, .rst, .hcount, .vcount, .game, .mem_req, .frame_written);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    if (mem_req.req && mem_req.we) begin
      nwrites++;
      if (mem_req.addr < 76800) fb[mem_req.addr] = mem_req.wdata[31:0];
    end
    if (frame_written) nwritten++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit in_box(int x, y, bx, by, w, h);
    return x >= bx && x < bx + w && y >= by && y < by + h;
  endfunction

  function automatic logic [7:0] ref_pixel(game_view_t g, int x, int y);
    logic [7:0] c;
    c = (g.state == G_PLAY) ? 8'h00 : 8'h02;
    if (g.enemy_alive && in_box(x, y, g.enemy_x, g.enemy_y, 32, 24)) c = 8'hE0;
    if (g.rem_present && in_box(x, y, g.rem_x, g.rem_y, 32, 16)) c = 8'h1F;
    if (in_box(x, y, g.my_x, g.my_y, 32, 16)) c = 8'h1C;
    if ((g.my_shot && in_box(x, y, g.my_shot_x, g.my_shot_y, 4, 8)) ||
        (g.rem_shot && in_box(x, y, g.rem_shot_x, g.rem_shot_y, 4, 8))) c = 8'hFC;
    if (y < 8 && x < 4 * g.score) c = 8'hFF;
    return c;
  endfunction

  task automatic raster(input game_view_t later);
    for (int y = 0; y < 525; y++)
      for (int x = 0; x < 800; x++) begin
        @(negedge clk);
        hcount = 10'(x); vcount = 10'(y);
        if (y == 200 && x == 0) game = later;   // mid-frame change
      end
  endtask

  task automatic compare(input game_view_t g, input string tag);
    int bad = 0;
    for (int y = 0; y < 480; y++)
      for (int x = 0; x < 640; x++)
        if (fb[y * 160 + x / 4][8 * (x % 4) +: 8] != ref_pixel(g, x, y)) begin
          bad++;
          if (bad < 4) $display("%s (%0d,%0d): %02x want %02x", tag, x, y,
                                fb[y * 160 + x / 4][8 * (x % 4) +: 8], ref_pixel(g, x, y));
        end
    check(bad == 0, $sformatf("%s: %0d wrong pixels", tag, bad));
  endtask

  initial begin
    game_view_t g1, g2;
    for (int i = 0; i < 76800; i++) fb[i] = 32'hDEADBEEF;
    g1 = '0;
    g1.state = G_PLAY; g1.my_x = 100; g1.my_y = 440; g1.my_shot = 1;
    g1.my_shot_x = 114; g1.my_shot_y = 300; g1.rem_present = 1; g1.rem_x = 110; g1.rem_y = 432;   // overlaps the local ship
    g1.rem_shot = 1; g1.rem_shot_x = 620; g1.rem_shot_y = 60; g1.enemy_alive = 1;
    g1.enemy_x = 610; g1.enemy_y = 50; g1.score = 37;
    g2 = g1;
    g2.state = G_IDLE; g2.my_x = 300; g2.enemy_alive = 0; g2.score = 3; g2.rem_present = 0;
    game = g1;
    hcount = 10'd700; vcount = 10'd500;     // start in vertical blanking
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    raster(g2);                              // frame 1 drawn from g1
    @(negedge clk); @(negedge clk);
    compare(g1, "frame 1");
    raster(g2);                              // frame 2 drawn from g2
    @(negedge clk); @(negedge clk);
    compare(g2, "frame 2");
    check(nwrites == 2 * 76800, $sformatf("%0d word writes", nwrites));
    check(nwritten == 2, $sformatf("%0d frame_written pulses", nwritten));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
