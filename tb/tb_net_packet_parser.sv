// tb_net_packet_parser: offers login, game and audio traffic to the packet
// parser, accepts bytes with a ready signal that behaves like a busy serial
// transmitter, and rebuilds the packets.  Checks headers, payloads, the
// login > game > audio priority, that a newer game message replaces an
// unsent one, and that audio is sent only once 15 samples are buffered.
module tb_net_packet_parser;
  import sfd_pkg::*;
  logic clk = 0, rst = 1;
  logic login_req = 0, game_req = 0, aud_pop, tx_valid, tx_ready = 0;
  game_msg_t game_msg = '0;
  logic [7:0] aud_data, tx_data;
  logic [4:0] aud_count;
  logic [1:0] sent_type;
  int checks = 0, failures = 0;
  int audq [$];
  logic [7:0] rx [$];
  int busy = 0;

  net_packet_parser dut (.clk, .rst, .login_req, .game_req, .game_msg, .aud_data, .aud_count,
                         .aud_pop, .tx_data, .tx_valid, .tx_ready, .sent_type);

  // recorder buffer model
  assign aud_count = 5'(audq.size());
  assign aud_data  = (audq.size() != 0) ? 8'(audq[0]) : 8'h00;
  // pops taken at an edge are applied half a cycle later, so that the model
  // never changes aud_data in the same time step as the parser samples it
  logic pop_q = 0;
  always @(posedge clk) pop_q <= !rst && aud_pop;
  always @(negedge clk) if (pop_q && audq.size() != 0) void'(audq.pop_front());

  // serializer model: after each byte, busy for a few cycles
  always @(posedge clk) begin
    if (!rst && tx_valid && tx_ready) begin
      rx.push_back(tx_data);
      busy = $urandom_range(1, 6);
    end else if (busy > 0) busy--;
  end
  always @(negedge clk) tx_ready = (busy == 0) && !rst;

  always #5 clk = ~clk;

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

  task automatic wait_packet(output logic [7:0] pk [16]);
    int t = 0;
    while (rx.size() < 16 && t < 5000) begin @(negedge clk); t++; end
    for (int i = 0; i < 16; i++) pk[i] = (rx.size() != 0) ? rx.pop_front() : 8'hxx;
  endtask

  initial begin
    logic [7:0] pk [16];
    payload_t gp;
    game_msg_t g1, g2;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    check(!tx_valid, "nothing to send");
    // 14 samples: not yet an audio packet
    for (int i = 0; i < 14; i++) audq.push_back(i + 100);
    repeat (50) @(negedge clk);
    check(!tx_valid && rx.size() == 0, "no audio packet below 15 samples");
    audq.push_back(114);
    // in the same cycle: login and two game messages (the second replaces the first)
    g1 = game_msg_t'({8{15'($urandom)}});
    g2 = game_msg_t'({8{15'($urandom)}});
    @(negedge clk);
    login_req = 1; game_req = 1; game_msg = g1;
    @(negedge clk);
    login_req = 0; game_req = 0;
    // before the game message goes out, replace it
    repeat (10) @(negedge clk);
    game_req = 1; game_msg = g2;
    @(negedge clk);
    game_req = 0;
    // packet 1: whichever was loaded first
    wait_packet(pk);
    // an audio packet may already be in flight if it was chosen before the
    // requests arrived; otherwise login comes first
    if (pk[0] == {4'hA, 4'h3}) begin
      for (int i = 1; i < 16; i++) check(pk[i] == 8'(99 + i), "audio payload (early)");
      wait_packet(pk);
    end
    check(pk[0] == {4'hA, 4'h1}, $sformatf("login first, header %02x", pk[0]));
    wait_packet(pk);
    check(pk[0] == {4'hA, 4'h2}, $sformatf("game second, header %02x", pk[0]));
    gp = payload_t'(g2);
    for (int i = 1; i < 16; i++) check(pk[i] == gp[(15 - i) * 8 +: 8], $sformatf("game byte %0d", i));
    if (audq.size() != 0) begin
      wait_packet(pk);
      check(pk[0] == {4'hA, 4'h3}, "audio third");
      for (int i = 1; i < 16; i++) check(pk[i] == 8'(99 + i), $sformatf("audio byte %0d", i));
    end
    check(audq.size() == 0, "15 samples consumed");
    repeat (200) @(negedge clk);
    check(rx.size() == 0 && !tx_valid, "nothing more sent");
    // several rounds of audio only
    for (int r = 0; r < 5; r++) begin
      for (int i = 0; i < 15; i++) audq.push_back((r * 31 + i * 3) & 255);
      wait_packet(pk);
      check(pk[0] == {4'hA, 4'h3}, "audio header");
      for (int i = 1; i < 16; i++) check(pk[i] == 8'((r * 31 + (i - 1) * 3) & 255), "audio data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
