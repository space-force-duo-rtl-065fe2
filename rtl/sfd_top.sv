// sfd_top: one Space Force Duo terminal.
//
// Two of these, joined by a crossed RS-232 cable, make the two-player game.
// Inside one terminal:
//   buttons  -> debouncer -> master_fsm (login, host/client, game rules)
//   master_fsm -> net_packet_parser -> serializer -> rs232_txd
//   rs232_rxd -> deserializer -> net_packet_receiver -> master_fsm / playback
//   codec mic samples -> recorder (filter, 16-byte buffer) -> net_packet_parser
//   playback (16-byte buffer, filter) -> codec headphone samples
//   vga_generator -> pixel_generator -> ZBT bank 0 (rendered frame)
//   ZBT bank 0 -> matrix_transformer (camera view) -> ZBT bank 1
//   ZBT bank 1 -> display_generator -> VGA port
// Each ZBT bank is shared by two clients through a zbt_arbiter; the real-time
// client (pixel_generator on bank 0, display_generator on bank 1) has
// priority and the transformer fills the gaps.  The AC97 codec interface and
// the two ZBT chips are outside this module: their signals are ports.  Codec
// samples are 8-bit signed with a one-cycle strobe per sample in each
// direction.  One clock drives everything and is also the pixel clock.
module sfd_top #(
  parameter int unsigned CLKS_PER_BIT  = sfd_pkg::CLKS_PER_BIT,
  parameter int unsigned STABLE_CYCLES = 251_750,
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33
) (
  input  logic                        clk,
  input  logic                        rst,
  // push buttons: START, FIRE, LEFT, RIGHT, UP, DOWN, VIEW
  input  logic [6:0]                  btn_raw,
  // RS-232 link to the other terminal
  input  logic                        rs232_rxd,
  output logic                        rs232_txd,
  // AC97 codec interface side
  input  logic signed [7:0]           mic_sample,
  input  logic                        mic_valid,
  input  logic                        hp_req,
  output logic signed [7:0]           hp_sample,
  output logic                        hp_valid,
  // ZBT bank 0 (rendered frame) and bank 1 (displayed frame)
  output logic [sfd_pkg::ZBT_AW-1:0]  zbt0_addr,
  output logic                        zbt0_we,
  output logic [sfd_pkg::ZBT_DW-1:0]  zbt0_wdata,
  input  logic [sfd_pkg::ZBT_DW-1:0]  zbt0_rdata,
  output logic [sfd_pkg::ZBT_AW-1:0]  zbt1_addr,
  output logic                        zbt1_we,
  output logic [sfd_pkg::ZBT_DW-1:0]  zbt1_wdata,
  input  logic [sfd_pkg::ZBT_DW-1:0]  zbt1_rdata,
  // VGA port
  output logic [7:0]                  vga_r,
  output logic [7:0]                  vga_g,
  output logic [7:0]                  vga_b,
  output logic                        vga_hsync,
  output logic                        vga_vsync,
  output logic                        vga_blank,
  // status
  output sfd_pkg::game_state_e        game_state,
  output logic                        is_host,
  output logic [7:0]                  score,
  output logic [1:0]                  view_sel,
  output logic                        xform_frame_done,
  output logic                        hit,            // host scored
  output logic                        rx_frame_err,   // received byte with bad stop bit
  output logic                        rx_resync,      // received byte discarded to re-align
  output logic                        rec_overflow,   // mic sample dropped, buffer full
  output logic                        pb_underrun,    // codec asked, nothing buffered
  output logic                        pb_overflow     // received sample dropped, buffer full
);
  import sfd_pkg::*;

  // ---------------------------------------------------------------- buttons
  logic [6:0] btn, btn_rise;
  debouncer #(.WIDTH(7), .STABLE_CYCLES(STABLE_CYCLES)) u_debounce (
    .clk, .rst, .btn_raw, .btn, .rise(btn_rise));

  // ---------------------------------------------------------------- video timing
  logic [9:0] hcount, vcount;
  logic       hsync, vsync, blank, frame_start;
  vga_generator #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)
  ) u_vga (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank, .frame_start);

  // ---------------------------------------------------------------- network receive
  logic [7:0] rx_byte;
  logic       rx_valid;
  logic       login_rx, game_rx_valid, audio_rx_valid;
  game_msg_t  game_rx;
  payload_t   audio_rx;

  deserializer #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_deser (
    .clk, .rst, .rxd(rs232_rxd), .data(rx_byte), .valid(rx_valid), .frame_err(rx_frame_err));

  net_packet_receiver u_netrx (
    .clk, .rst, .rx_data(rx_byte), .rx_valid,
    .login_rx, .game_valid(game_rx_valid), .game_msg(game_rx),
    .audio_valid(audio_rx_valid), .audio_payload(audio_rx), .resync(rx_resync));

  // ---------------------------------------------------------------- game logic
  logic       login_req, game_req;
  game_msg_t  game_tx;
  game_view_t view;

  master_fsm #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE)) u_fsm (
    .clk, .rst, .btn, .btn_rise, .frame_tick(frame_start),
    .login_rx, .game_rx_valid, .game_rx,
    .login_req, .game_req, .game_tx, .view, .view_sel, .hit);

  assign game_state = view.state;
  assign is_host    = view.is_host;
  assign score      = view.score;

  // ---------------------------------------------------------------- audio
  logic [7:0] aud_data;
  logic [4:0] aud_count;
  logic       aud_pop;

  recorder #(.BUF_BYTES(16)) u_rec (
    .clk, .rst, .mic_sample, .mic_valid,
    .aud_data, .aud_count, .aud_pop, .overflow(rec_overflow));

  playback #(.BUF_BYTES(16)) u_play (
    .clk, .rst, .pkt_payload(audio_rx), .pkt_valid(audio_rx_valid),
    .hp_req, .hp_sample, .hp_valid, .underrun(pb_underrun), .overflow(pb_overflow));

  // ---------------------------------------------------------------- network transmit
  logic [7:0] tx_byte;
  logic       tx_valid, tx_ready;
  logic [1:0] sent_type;

  net_packet_parser u_nettx (
    .clk, .rst, .login_req, .game_req, .game_msg(game_tx),
    .aud_data, .aud_count, .aud_pop,
    .tx_data(tx_byte), .tx_valid, .tx_ready, .sent_type);

  serializer #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_ser (
    .clk, .rst, .data(tx_byte), .valid(tx_valid), .ready(tx_ready), .txd(rs232_txd));

  // ---------------------------------------------------------------- frame buffers
  zbt_req_t pg_req, xs_req, xd_req, dg_req;
  zbt_rsp_t pg_rsp, xs_rsp, xd_rsp, dg_rsp;
  logic     pg_frame_written, xform_busy;

  pixel_generator #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE)) u_pixgen (
    .clk, .rst, .hcount, .vcount, .game(view),
    .mem_req(pg_req), .frame_written(pg_frame_written));

  zbt_arbiter u_arb0 (
    .clk, .rst, .c0_req(pg_req), .c0_rsp(pg_rsp), .c1_req(xs_req), .c1_rsp(xs_rsp),
    .zbt_addr(zbt0_addr), .zbt_we(zbt0_we), .zbt_wdata(zbt0_wdata), .zbt_rdata(zbt0_rdata));

  matrix_transformer #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE)) u_xform (
    .clk, .rst, .enable(1'b1), .view_sel,
    .src_req(xs_req), .src_rsp(xs_rsp), .dst_req(xd_req), .dst_rsp(xd_rsp),
    .frame_done(xform_frame_done), .busy(xform_busy));

  zbt_arbiter u_arb1 (
    .clk, .rst, .c0_req(dg_req), .c0_rsp(dg_rsp), .c1_req(xd_req), .c1_rsp(xd_rsp),
    .zbt_addr(zbt1_addr), .zbt_we(zbt1_we), .zbt_wdata(zbt1_wdata), .zbt_rdata(zbt1_rdata));

  display_generator #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE)) u_disp (
    .clk, .rst, .hcount, .vcount, .hsync_in(hsync), .vsync_in(vsync), .blank_in(blank),
    .mem_req(dg_req), .mem_rsp(dg_rsp),
    .vga_r, .vga_g, .vga_b, .vga_hsync, .vga_vsync, .vga_blank);
endmodule
