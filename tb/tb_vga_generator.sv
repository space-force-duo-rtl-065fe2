// tb_vga_generator: runs two full 640x480 frames at the default timing and
// checks every cycle against counters kept here: line length 800, frame
// length 525 lines, hsync low for 96 clocks starting 16 after the visible
// area, vsync low for lines 490-491, blank exactly outside 640x480, and one
// frame_start per frame at pixel (0,0).
module tb_vga_generator;
  logic clk = 0, rst = 1;
  logic [9:0] hcount, vcount;
  logic hsync, vsync, blank, frame_start;
  int checks = 0, failures = 0;
  int frames = 0, hs_cycles = 0;

  vga_generator dut (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank, .frame_start);

  always #5 clk = ~clk;

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

  initial begin
    int x, y, bad;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk);                // first pixel of the first frame
    for (int f = 0; f < 2; f++) begin
      bad = 0;
      for (y = 0; y < 525; y++) begin
        for (x = 0; x < 800; x++) begin
          if (hcount != 10'(x) || vcount != 10'(y)) bad++;
          if (blank != (x >= 640 || y >= 480)) bad++;
          if (hsync != !(x >= 656 && x < 752)) bad++;
          if (vsync != !(y >= 490 && y < 492)) bad++;
          if (frame_start != (x == 0 && y == 0)) bad++;
          if (!hsync) hs_cycles++;
          @(negedge clk);
        end
      end
      check(bad == 0, $sformatf("frame %0d: %0d mismatching cycles", f, bad));
    end
    check(hs_cycles == 2 * 525 * 96, $sformatf("hsync low cycles %0d", hs_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
