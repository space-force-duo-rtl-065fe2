// vga_generator: horizontal and vertical sync plus pixel counters for a
// 640x480 picture at 60 Hz (industry timing: 800 clocks per line, 525 lines
// per frame, active-low sync pulses), clocked at the 25.175 MHz pixel rate.
//
// `hcount`/`vcount` count every clock of the line and every line of the
// frame, starting at 0 in the top-left visible pixel; `blank` is high outside
// the visible 640x480 area.  All outputs are registered and belong to the
// same pixel.  `frame_start` pulses with pixel (0,0).  The 640x480 size is
// the description's; the porch and sync widths are the standard VGA ones.
module vga_generator #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33
) (
  input  logic       clk,
  input  logic       rst,
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic       hsync,      // active low
  output logic       vsync,      // active low
  output logic       blank,
  output logic       frame_start
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [9:0] h_n, v_n;

  always_comb begin
    h_n = (hcount == 10'(H_TOTAL - 1)) ? '0 : hcount + 1'b1;
    v_n = vcount;
    if (hcount == 10'(H_TOTAL - 1))
      v_n = (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      // Start one clock before pixel (0,0) so the first frame is complete.
      hcount <= 10'(H_TOTAL - 1);
      vcount <= 10'(V_TOTAL - 1);
      hsync <= 1'b1; vsync <= 1'b1; blank <= 1'b1; frame_start <= 1'b0;
    end else begin
      hcount <= h_n;
      vcount <= v_n;
      blank  <= (h_n >= 10'(H_ACTIVE)) || (v_n >= 10'(V_ACTIVE));
      hsync  <= !((h_n >= 10'(H_ACTIVE + H_FP)) && (h_n < 10'(H_ACTIVE + H_FP + H_SYNC)));
      vsync  <= !((v_n >= 10'(V_ACTIVE + V_FP)) && (v_n < 10'(V_ACTIVE + V_FP + V_SYNC)));
      frame_start <= (h_n == 0) && (v_n == 0);
    end
  end
endmodule
