// pixel_generator: draws the game picture into the render frame buffer.
//
// It follows the VGA generator's pixel counters.  For every visible pixel it
// decides the colour from the game state latched during vertical blanking
// (so a frame never mixes two game states): a score bar along the top, the
// two shots, the two ships and the enemy as filled rectangles, over a
// background that is dark blue in the lobby and black in play.  Four pixels
// are packed into one ZBT word (first pixel in bits 7:0) and written, one
// word every fourth clock, at address BASE + y*(H_ACTIVE/4) + x/4.  The write
// request is registered, one cycle after the fourth pixel's counters.
// It is client 0 of the render bank and is always granted.
// From the description: sprites at the positions given by the game data, a
// GUI, and a frame buffered in ZBT RAM.  Sprite shapes, sizes and colours are
// this design's choice.
module pixel_generator #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned V_ACTIVE = 480,
  parameter logic [sfd_pkg::ZBT_AW-1:0] BASE = '0
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [9:0]           hcount,
  input  logic [9:0]           vcount,
  input  sfd_pkg::game_view_t  game,
  output sfd_pkg::zbt_req_t    mem_req,
  output logic                 frame_written   // pulses after the frame's last word
);
  import sfd_pkg::*;

  localparam int unsigned WPR = H_ACTIVE / PIX_PER_WORD;

  game_view_t g;
  pixel_t     color;
  logic [23:0] pack;          // the first three pixels of the current group
  logic        visible;

  function automatic logic inside_box(input logic [9:0] x, y, bx, by,
                                      input int unsigned w, h);
    return ({1'b0, x} >= {1'b0, bx}) && ({1'b0, x} < {1'b0, bx} + 11'(w)) &&
           ({1'b0, y} >= {1'b0, by}) && ({1'b0, y} < {1'b0, by} + 11'(h));
  endfunction

  assign visible = (hcount < 10'(H_ACTIVE)) && (vcount < 10'(V_ACTIVE));

  always_comb begin
    color = (g.state == G_PLAY) ? C_BLACK : C_IDLE;
    if (g.enemy_alive && inside_box(hcount, vcount, g.enemy_x, g.enemy_y, ENEMY_W, ENEMY_H))
      color = C_ENEMY;
    if (g.rem_present && inside_box(hcount, vcount, g.rem_x, g.rem_y, SHIP_W, SHIP_H))
      color = C_REMOTE;
    if (inside_box(hcount, vcount, g.my_x, g.my_y, SHIP_W, SHIP_H))
      color = C_LOCAL;
    if ((g.my_shot && inside_box(hcount, vcount, g.my_shot_x, g.my_shot_y, SHOT_W, SHOT_H)) ||
        (g.rem_shot && inside_box(hcount, vcount, g.rem_shot_x, g.rem_shot_y, SHOT_W, SHOT_H)))
      color = C_SHOT;
    if (vcount < 10'd8 && {2'b0, hcount} < {2'b0, g.score, 2'b00})
      color = C_SCORE;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      g <= '0; pack <= '0; mem_req <= '0; frame_written <= 1'b0;
    end else begin
      if (vcount >= 10'(V_ACTIVE)) g <= game;    // vertical blanking
      mem_req.req   <= 1'b0;
      frame_written <= 1'b0;
      if (visible) begin
        pack <= {color, pack[23:8]};
        if (hcount[1:0] == 2'd3) begin
          mem_req.req   <= 1'b1;
          mem_req.we    <= 1'b1;
          mem_req.addr  <= BASE + ZBT_AW'(vcount) * ZBT_AW'(WPR) + ZBT_AW'(hcount[9:2]);
          mem_req.wdata <= {4'h0, color, pack};
          frame_written <= (hcount == 10'(H_ACTIVE - 1)) && (vcount == 10'(V_ACTIVE - 1));
        end
      end
    end
  end
endmodule
