// tb_master_fsm: plays both roles of the login and a stretch of game.
// Host side: START in the lobby makes this terminal host and sends a login;
// the other side's login starts play.  Then, frame by frame, it checks ship
// movement and clamping, shot launch and climb, the enemy's sweep, edge
// drop, a hit by the other player's reported shot (score, respawn), the game
// message sent each frame, and VIEW cycling.  Client side: a login received
// in the lobby makes it client, START answers with a login, and enemy and
// score are then taken from the host's messages.
module tb_master_fsm;
  import sfd_pkg::*;
  logic clk = 0, rst = 1;
  logic [6:0] btn = 0, btn_rise = 0;
  logic frame_tick = 0, login_rx = 0, game_rx_valid = 0;
  game_msg_t game_rx = '0, game_tx;
  logic login_req, game_req, hit;
  game_view_t view;
  logic [1:0] view_sel;
  int checks = 0, failures = 0, nlogin = 0, ngame = 0, nhit = 0;

  master_fsm dut (.clk, .rst, .btn, .btn_rise, .frame_tick, .login_rx, .game_rx_valid, .game_rx,
                  .login_req, .game_req, .game_tx, .view, .view_sel, .hit);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    if (login_req) nlogin++;
    if (game_req) ngame++;
    if (hit) nhit++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic press(input int b);
    @(negedge clk) btn_rise[b] = 1;
    @(negedge clk) btn_rise[b] = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic frame();
    @(negedge clk) frame_tick = 1;
    @(negedge clk) frame_tick = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic pulse_login();
    @(negedge clk) login_rx = 1;
    @(negedge clk) login_rx = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic remote(input game_msg_t g);
    @(negedge clk) begin game_rx = g; game_rx_valid = 1; end
    @(negedge clk) game_rx_valid = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int x0, ex0, ey0, g0;
    game_msg_t r;
    // ================================================================ host
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    check(view.state == G_IDLE, "lobby after reset");
    frame();
    check(ngame == 0, "no game traffic in the lobby");
    press(0);
    check(view.state == G_HOST && view.is_host && nlogin == 1, "first START: host, login sent");
    pulse_login();
    check(view.state == G_PLAY, "client login starts play");
    // ship moves right 4 per frame while RIGHT is held
    x0 = view.my_x;
    btn[3] = 1;
    for (int k = 0; k < 5; k++) frame();
    btn[3] = 0;
    check(view.my_x == x0 + 20, $sformatf("ship x %0d want %0d", view.my_x, x0 + 20));
    // left is clamped at 0
    btn[2] = 1;
    for (int k = 0; k < 60; k++) frame();
    btn[2] = 0;
    check(view.my_x == 0, "clamped at left edge");
    // up stops at mid-screen
    btn[4] = 1;
    for (int k = 0; k < 70; k++) frame();
    btn[4] = 0;
    check(view.my_y == 240, $sformatf("clamped at mid-screen, y=%0d", view.my_y));
    // enemy sweeps right by 2 per frame
    ex0 = view.enemy_x; ey0 = view.enemy_y;
    frame();
    check(view.enemy_x == ex0 + 2 || view.enemy_y != ey0, "enemy moves 2 per frame");
    // fire: shot appears above the ship and climbs 8 per frame
    press(1);
    frame();
    check(view.my_shot && view.my_shot_x == view.my_x + 14 && view.my_shot_y == view.my_y - 8,
          "shot launched from ship");
    frame();
    check(view.my_shot_y == view.my_y - 16, "shot climbs 8 per frame");
    for (int k = 0; k < 40; k++) frame();
    check(!view.my_shot, "shot leaves the screen");
    // enemy reaches the right edge, turns and drops
    ey0 = view.enemy_y;
    for (int k = 0; k < 320; k++) frame();
    check(view.enemy_y == ey0 + 16 || view.enemy_y == 16, $sformatf("enemy dropped to %0d", view.enemy_y));
    // the client's reported shot hits the enemy: score, respawn at the top
    g0 = view.score;
    r = '0;
    r.shot_active = 1; r.shot_x = 16'(view.enemy_x + 10); r.shot_y = 16'(view.enemy_y + 4);
    r.ship_x = 400; r.ship_y = 440;
    remote(r);
    check(view.rem_present && view.rem_x == 400, "remote ship taken from message");
    frame();
    check(nhit == 1 && view.score == g0 + 1, $sformatf("hit scored, score %0d", view.score));
    check(view.enemy_x == 0 && view.enemy_y == 16, "enemy respawned");
    // the game message of the next frame carries ship, enemy and score
    g0 = ngame;
    frame();
    check(ngame == g0 + 1, "one game message per frame");
    check(game_tx.is_host && game_tx.score == 8'(view.score) && game_tx.enemy_x == 16'(view.enemy_x) &&
          game_tx.ship_x == 16'(view.my_x), "game message contents");
    // VIEW cycles 0..3
    for (int k = 0; k < 4; k++) begin
      check(view_sel == 2'(k), "view select");
      press(6);
    end
    check(view_sel == 0, "view wraps");

    // ================================================================ client
    @(negedge clk) rst = 1;
    repeat (3) @(negedge clk);
    rst = 0; nlogin = 0;
    repeat (2) @(negedge clk);
    pulse_login();
    check(view.state == G_CLIENT && !view.is_host && nlogin == 0, "login received first: client");
    press(0);
    check(view.state == G_PLAY && nlogin == 1, "START answers with a login");
    r = '0;
    r.is_host = 1; r.enemy_alive = 1; r.enemy_x = 123; r.enemy_y = 45; r.score = 9;
    remote(r);
    check(view.enemy_x == 123 && view.enemy_y == 45 && view.score == 9, "enemy and score from host");
    frame();
    check(view.enemy_x == 123, "client does not move the enemy itself");
    check(!game_tx.is_host, "client message marked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
