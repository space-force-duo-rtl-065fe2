// net_packet_parser: builds outgoing 16-byte packets and feeds them byte by
// byte to the serializer.
//
// Three sources compete for the link: a login request and a game message from
// the game logic, and filtered voice samples from the recorder.  Requests are
// remembered until sent (a newer game message replaces an unsent one).  When
// the 16-byte buffer is free the highest-priority source is loaded into it:
// login, then game state, then audio once the recorder holds 15 samples (they
// are popped one per clock).  Byte 0 is the header {4'hA, type}; bytes 1..15
// the payload, sent in order on the serializer's valid/ready handshake.
// The 16-byte buffer and the byte-wise hand-off follow the description; the
// header, the priorities and the 15-sample audio payload are this design's
// choice.
module net_packet_parser (
  input  logic               clk,
  input  logic               rst,
  input  logic               login_req,
  input  logic               game_req,
  input  sfd_pkg::game_msg_t game_msg,
  input  logic [7:0]         aud_data,
  input  logic [4:0]         aud_count,
  output logic               aud_pop,
  output logic [7:0]         tx_data,
  output logic               tx_valid,
  input  logic               tx_ready,
  output logic [1:0]         sent_type     // type of the last packet loaded (debug)
);
  import sfd_pkg::*;

  typedef enum logic [1:0] {P_IDLE, P_FILL_AUDIO, P_SEND} state_e;
  state_e     state;
  logic [7:0] buffer [PKT_BYTES];
  logic [3:0] idx;
  logic       login_pend, game_pend;
  game_msg_t  game_hold;
  payload_t   gp;

  assign gp       = payload_t'(game_hold);
  assign tx_data  = buffer[idx];
  assign tx_valid = (state == P_SEND);
  assign aud_pop  = (state == P_FILL_AUDIO);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= P_IDLE; idx <= '0; login_pend <= 1'b0; game_pend <= 1'b0;
      game_hold <= '0; sent_type <= '0;
      for (int i = 0; i < PKT_BYTES; i++) buffer[i] <= '0;
    end else begin
      if (login_req) login_pend <= 1'b1;
      if (game_req) begin
        game_pend <= 1'b1;
        game_hold <= game_msg;
      end
      unique case (state)
        P_IDLE: begin
          idx <= '0;
          if (login_pend) begin
            login_pend <= login_req;
            buffer[0]  <= {PKT_SYNC, PKT_LOGIN};
            for (int i = 1; i < PKT_BYTES; i++) buffer[i] <= '0;
            sent_type  <= 2'(PKT_LOGIN);
            state      <= P_SEND;
          end else if (game_pend) begin
            game_pend <= game_req;
            buffer[0] <= {PKT_SYNC, PKT_GAME};
            for (int i = 1; i < PKT_BYTES; i++)
              buffer[i] <= gp[(PKT_BYTES-1-i)*8 +: 8];
            sent_type <= 2'(PKT_GAME);
            state     <= P_SEND;
          end else if (aud_count >= 5'(PAYLOAD_BYTES)) begin
            buffer[0] <= {PKT_SYNC, PKT_AUDIO};
            sent_type <= 2'(PKT_AUDIO);
            idx       <= 4'd1;
            state     <= P_FILL_AUDIO;
          end
        end
        P_FILL_AUDIO: begin
          buffer[idx] <= aud_data;
          idx <= idx + 1'b1;
          if (idx == 4'(PKT_BYTES - 1)) begin
            idx   <= '0;
            state <= P_SEND;
          end
        end
        P_SEND: if (tx_ready) begin
          idx <= idx + 1'b1;
          if (idx == 4'(PKT_BYTES - 1)) state <= P_IDLE;
        end
        default: state <= P_IDLE;
      endcase
    end
  end
endmodule
