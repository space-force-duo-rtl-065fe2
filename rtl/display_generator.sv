// display_generator: reads the finished picture from the display frame
// buffer and drives the VGA port.
//
// It follows the VGA generator's counters.  At the first pixel of every group
// of four visible pixels it asks the display bank for the word holding them
// (address BASE + y*(H_ACTIVE/4) + x/4); it is client 0 of that bank and is
// always granted.  The request is registered, the ZBT returns the word two
// cycles later, and the four pixels are then shown one per clock.  To keep
// the picture aligned, sync and blank are delayed by the same LATENCY (5)
// clocks as the colour.  The 8-bit RRRGGGBB pixel is widened to 8 bits per
// channel by bit replication; colour is forced to 0 while blanked.
// The description gives the job (read the final frame from ZBT RAM, drive the
// VGA port); the pipeline is this design's.
module display_generator #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned V_ACTIVE = 480,
  parameter logic [sfd_pkg::ZBT_AW-1:0] BASE = '0
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [9:0]         hcount,
  input  logic [9:0]         vcount,
  input  logic               hsync_in,
  input  logic               vsync_in,
  input  logic               blank_in,
  output sfd_pkg::zbt_req_t  mem_req,
  input  sfd_pkg::zbt_rsp_t  mem_rsp,
  output logic [7:0]         vga_r,
  output logic [7:0]         vga_g,
  output logic [7:0]         vga_b,
  output logic               vga_hsync,
  output logic               vga_vsync,
  output logic               vga_blank
);
  import sfd_pkg::*;

  localparam int unsigned WPR     = H_ACTIVE / PIX_PER_WORD;
  localparam int unsigned LATENCY = 5;

  logic [LATENCY-2:0] hs_d, vs_d, bl_d;
  logic [1:0]         sel_d [LATENCY-1];
  logic [31:0]        word_q;
  pixel_t             pix;

  assign pix = word_q[8*sel_d[LATENCY-2] +: 8];

  always_ff @(posedge clk) begin
    if (rst) begin
      mem_req <= '0; word_q <= '0;
      hs_d <= '1; vs_d <= '1; bl_d <= '1;
      for (int i = 0; i < LATENCY - 1; i++) sel_d[i] <= '0;
      vga_r <= '0; vga_g <= '0; vga_b <= '0;
      vga_hsync <= 1'b1; vga_vsync <= 1'b1; vga_blank <= 1'b1;
    end else begin
      mem_req.req   <= !blank_in && (hcount[1:0] == 2'd0);
      mem_req.we    <= 1'b0;
      mem_req.wdata <= '0;
      mem_req.addr  <= BASE + ZBT_AW'(vcount) * ZBT_AW'(WPR) + ZBT_AW'(hcount[9:2]);
      if (mem_rsp.rvalid) word_q <= mem_rsp.rdata[31:0];

      hs_d <= {hs_d[LATENCY-3:0], hsync_in};
      vs_d <= {vs_d[LATENCY-3:0], vsync_in};
      bl_d <= {bl_d[LATENCY-3:0], blank_in};
      sel_d[0] <= hcount[1:0];
      for (int i = 1; i < LATENCY - 1; i++) sel_d[i] <= sel_d[i-1];

      vga_hsync <= hs_d[LATENCY-2];
      vga_vsync <= vs_d[LATENCY-2];
      vga_blank <= bl_d[LATENCY-2];
      if (bl_d[LATENCY-2]) begin
        vga_r <= '0; vga_g <= '0; vga_b <= '0;
      end else begin
        vga_r <= {pix[7:5], pix[7:5], pix[7:6]};
        vga_g <= {pix[4:2], pix[4:2], pix[4:3]};
        vga_b <= {4{pix[1:0]}};
      end
    end
  end

  a_granted : assert property (@(posedge clk) disable iff (rst) mem_req.req |-> mem_rsp.gnt);
endmodule
