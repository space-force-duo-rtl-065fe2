// tb_net_packet_receiver: sends byte streams made of stray bytes, login,
// game, audio and unknown-type packets, at irregular spacing, and checks
// that each complete packet is routed once to the right output with the
// right contents, and that bytes without the sync nibble are skipped.
module tb_net_packet_receiver;
  import sfd_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] rx_data = 0;
  logic rx_valid = 0, login_rx, game_valid, audio_valid, resync;
  game_msg_t game_msg;
  payload_t audio_payload;
  int checks = 0, failures = 0;
  int nlogin = 0, ngame = 0, naudio = 0, nresync = 0;
  game_msg_t last_game;
  payload_t last_audio;

  net_packet_receiver dut (.clk, .rst, .rx_data, .rx_valid, .login_rx, .game_valid, .game_msg,
                           .audio_valid, .audio_payload, .resync);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    if (login_rx) nlogin++;
    if (game_valid) begin ngame++; last_game = game_msg; end
    if (audio_valid) begin naudio++; last_audio = audio_payload; end
    if (resync) nresync++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic byte_in(input logic [7:0] b);
    @(negedge clk);
    rx_data = b; rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
    repeat ($urandom_range(0, 5)) @(negedge clk);
  endtask

  task automatic send(input logic [3:0] t, input payload_t p);
    byte_in({4'hA, t});
    for (int i = 0; i < 15; i++) byte_in(p[(14 - i) * 8 +: 8]);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    payload_t p;
    game_msg_t g;
    int l0, g0, a0;
    repeat (3) @(posedge clk);
    rst = 0;
    // stray bytes are dropped
    byte_in(8'h13); byte_in(8'h5A); byte_in(8'hFF);
    check(nresync == 3, $sformatf("resync %0d", nresync));
    send(4'h1, '0);
    check(nlogin == 1 && ngame == 0 && naudio == 0, "login routed");
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < 15; i++) p[i * 8 +: 8] = 8'($urandom);
      l0 = nlogin; g0 = ngame; a0 = naudio;
      case (r % 3)
        0: begin
          g = game_msg_t'(p);
          send(4'h2, p);
          check(ngame == g0 + 1 && naudio == a0 && nlogin == l0, "game routed once");
          check(last_game == g, "game contents");
          check(last_game.ship_x == g.ship_x && last_game.score == g.score, "game fields");
        end
        1: begin
          send(4'h3, p);
          check(naudio == a0 + 1 && ngame == g0 && nlogin == l0, "audio routed once");
          check(last_audio == p, "audio contents");
        end
        default: begin
          send(4'h7, p);      // unknown type: dropped
          check(naudio == a0 && ngame == g0 && nlogin == l0, "unknown type dropped");
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
