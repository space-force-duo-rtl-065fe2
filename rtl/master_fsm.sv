// master_fsm: login handshake and game logic of one terminal.
//
// Login: the terminal whose player presses START first becomes the host.  It
// sends a login packet and waits (G_HOST) for the other terminal's login.  A
// terminal that receives a login while idle becomes the client (G_CLIENT);
// when its player presses START it answers with its own login.  Both are then
// in G_PLAY.  Buttons: 0 START, 1 FIRE, 2 LEFT, 3 RIGHT, 4 UP, 5 DOWN,
// 6 VIEW (VIEW cycles the camera view in any state).
//
// Play, once per video frame (`frame_tick`): the local ship moves by
// SHIP_SPEED in the held directions, kept on screen and in the lower half;
// FIRE launches a shot if none is in flight, and shots climb SHOT_SPEED per
// frame.  The host owns the enemy: it sweeps sideways by ENEMY_SPEED, drops
// ENEMY_DROP at each edge and returns to the top when it reaches the ships'
// area.  The host scores a hit when its own shot or the client's last
// reported shot overlaps the enemy; the enemy then restarts at the top.  The
// client removes its own shot when it overlaps the enemy it was last told
// about.  Each frame in play the terminal sends a game message (own ship and
// shot; the host adds enemy and score), and takes the other side's ship, shot
// and, on the client, enemy and score from each message it receives.
// The description gives the duties (initialisation, choosing host and client
// by who logs in first, game state from game rules and user input, what to
// send and what to do with what arrives); the rules themselves are this
// design's own minimal game.
module master_fsm #(
  parameter int unsigned H_ACTIVE    = 640,
  parameter int unsigned V_ACTIVE    = 480,
  parameter int unsigned SHIP_SPEED  = 4,
  parameter int unsigned SHOT_SPEED  = 8,
  parameter int unsigned ENEMY_SPEED = 2,
  parameter int unsigned ENEMY_DROP  = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [6:0]           btn,          // debounced levels
  input  logic [6:0]           btn_rise,     // debounced presses
  input  logic                 frame_tick,
  input  logic                 login_rx,
  input  logic                 game_rx_valid,
  input  sfd_pkg::game_msg_t   game_rx,
  output logic                 login_req,
  output logic                 game_req,
  output sfd_pkg::game_msg_t   game_tx,
  output sfd_pkg::game_view_t  view,
  output logic [1:0]           view_sel,
  output logic                 hit          // pulses when the host scores
);
  import sfd_pkg::*;

  localparam int unsigned B_START = 0, B_FIRE = 1, B_LEFT = 2, B_RIGHT = 3,
                          B_UP = 4, B_DOWN = 5, B_VIEW = 6;
  localparam logic [9:0] X_MAX   = 10'(H_ACTIVE - SHIP_W);
  localparam logic [9:0] Y_MIN   = 10'(V_ACTIVE / 2);
  localparam logic [9:0] Y_MAX   = 10'(V_ACTIVE - SHIP_H);
  localparam logic [9:0] EX_MAX  = 10'(H_ACTIVE - ENEMY_W);
  localparam logic [9:0] EY_TOP  = 10'd16;
  localparam logic [9:0] EY_LOW  = 10'(V_ACTIVE / 2 - ENEMY_H);

  game_state_e state;
  logic        is_host;
  logic [9:0]  my_x, my_y, sx, sy, ex, ey, rx, ry, rsx, rsy;
  logic        shot, rshot, rpres, edir, alive;
  logic [7:0]  score;
  logic        fire_pend;

  function automatic logic overlap(input logic [9:0] shx, shy, enx, eny);
    return ({1'b0, shx} + 11'(SHOT_W)  > {1'b0, enx}) && ({1'b0, shx} < {1'b0, enx} + 11'(ENEMY_W)) &&
           ({1'b0, shy} + 11'(SHOT_H)  > {1'b0, eny}) && ({1'b0, shy} < {1'b0, eny} + 11'(ENEMY_H));
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= G_IDLE; is_host <= 1'b0;
      my_x <= '0; my_y <= Y_MAX; sx <= '0; sy <= '0; shot <= 1'b0;
      rx <= '0; ry <= '0; rsx <= '0; rsy <= '0; rshot <= 1'b0; rpres <= 1'b0;
      ex <= '0; ey <= EY_TOP; edir <= 1'b1; alive <= 1'b1; score <= '0;
      login_req <= 1'b0; game_req <= 1'b0; view_sel <= '0; hit <= 1'b0;
      fire_pend <= 1'b0;
    end else begin
      login_req <= 1'b0;
      game_req  <= 1'b0;
      hit       <= 1'b0;
      if (btn_rise[B_VIEW]) view_sel <= view_sel + 1'b1;
      if (btn_rise[B_FIRE]) fire_pend <= 1'b1;

      unique case (state)
        G_IDLE:
          if (btn_rise[B_START]) begin
            login_req <= 1'b1;
            is_host   <= 1'b1;
            my_x      <= 10'(H_ACTIVE / 4);
            state     <= G_HOST;
          end else if (login_rx) begin
            is_host <= 1'b0;
            my_x    <= 10'(3 * H_ACTIVE / 4);
            state   <= G_CLIENT;
          end
        G_HOST:
          if (login_rx) state <= G_PLAY;
        G_CLIENT:
          if (btn_rise[B_START]) begin
            login_req <= 1'b1;
            state     <= G_PLAY;
          end
        G_PLAY: begin
          if (game_rx_valid) begin
            rpres <= 1'b1;
            rx <= game_rx.ship_x[9:0];  ry <= game_rx.ship_y[9:0];
            rsx <= game_rx.shot_x[9:0]; rsy <= game_rx.shot_y[9:0];
            rshot <= game_rx.shot_active;
            if (!is_host) begin
              ex <= game_rx.enemy_x[9:0]; ey <= game_rx.enemy_y[9:0];
              alive <= game_rx.enemy_alive;
              score <= game_rx.score;
            end
          end
          if (frame_tick) begin
            // ---- own ship
            if (btn[B_LEFT])
              my_x <= (my_x > 10'(SHIP_SPEED)) ? my_x - 10'(SHIP_SPEED) : '0;
            else if (btn[B_RIGHT])
              my_x <= (my_x + 10'(SHIP_SPEED) < X_MAX) ? my_x + 10'(SHIP_SPEED) : X_MAX;
            if (btn[B_UP])
              my_y <= (my_y > Y_MIN + 10'(SHIP_SPEED)) ? my_y - 10'(SHIP_SPEED) : Y_MIN;
            else if (btn[B_DOWN])
              my_y <= (my_y + 10'(SHIP_SPEED) < Y_MAX) ? my_y + 10'(SHIP_SPEED) : Y_MAX;
            // ---- own shot
            if (shot) begin
              if (sy < 10'(SHOT_SPEED)) shot <= 1'b0;
              else sy <= sy - 10'(SHOT_SPEED);
            end else if (fire_pend) begin
              fire_pend <= 1'b0;
              shot <= 1'b1;
              sx   <= my_x + 10'(SHIP_W / 2 - SHOT_W / 2);
              sy   <= my_y - 10'(SHOT_H);
            end
            // ---- enemy and hits
            if (is_host) begin
              if ((shot && overlap(sx, sy, ex, ey)) || (rshot && overlap(rsx, rsy, ex, ey))) begin
                hit   <= 1'b1;
                score <= score + 1'b1;
                if (shot && overlap(sx, sy, ex, ey)) shot <= 1'b0;
                ex <= '0; ey <= EY_TOP; edir <= 1'b1;
              end else if (edir) begin
                if (ex + 10'(ENEMY_SPEED) >= EX_MAX) begin
                  ex <= EX_MAX; edir <= 1'b0;
                  ey <= (ey + 10'(ENEMY_DROP) > EY_LOW) ? EY_TOP : ey + 10'(ENEMY_DROP);
                end else ex <= ex + 10'(ENEMY_SPEED);
              end else begin
                if (ex <= 10'(ENEMY_SPEED)) begin
                  ex <= '0; edir <= 1'b1;
                  ey <= (ey + 10'(ENEMY_DROP) > EY_LOW) ? EY_TOP : ey + 10'(ENEMY_DROP);
                end else ex <= ex - 10'(ENEMY_SPEED);
              end
            end else if (shot && alive && overlap(sx, sy, ex, ey)) begin
              shot <= 1'b0;
            end
            game_req <= 1'b1;
          end
        end
        default: state <= G_IDLE;
      endcase
    end
  end

  always_comb begin
    game_tx = '0;
    game_tx.is_host     = is_host;
    game_tx.shot_active = shot;
    game_tx.enemy_alive = alive;
    game_tx.ship_x  = 16'(my_x);  game_tx.ship_y  = 16'(my_y);
    game_tx.shot_x  = 16'(sx);    game_tx.shot_y  = 16'(sy);
    game_tx.enemy_x = 16'(ex);    game_tx.enemy_y = 16'(ey);
    game_tx.score   = score;

    view = '0;
    view.state   = state;
    view.is_host = is_host;
    view.my_x = my_x; view.my_y = my_y;
    view.my_shot = shot; view.my_shot_x = sx; view.my_shot_y = sy;
    view.rem_present = rpres;
    view.rem_x = rx; view.rem_y = ry;
    view.rem_shot = rshot; view.rem_shot_x = rsx; view.rem_shot_y = rsy;
    view.enemy_alive = alive && (state == G_PLAY);
    view.enemy_x = ex; view.enemy_y = ey;
    view.score = score;
  end
endmodule
