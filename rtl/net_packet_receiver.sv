// net_packet_receiver: assembles 16-byte packets from the deserializer and
// routes them to the game logic and the playback path.
//
// Bytes from the deserializer (`rx_valid`) fill a 16-byte buffer.  When the
// sixteenth byte arrives the packet is complete and is handed on in the next
// cycle according to its type: a login pulses `login_rx`, a game message
// pulses `game_valid` with the decoded `game_msg`, and an audio packet pulses
// `audio_valid` with its 15 samples.  The 16-byte buffer and the routing
// follow the description.  The header byte (sync nibble 4'hA, packet type)
// is this design's framing: a byte that should start a packet but lacks the
// sync nibble is discarded (`resync` pulses), which re-aligns the receiver
// after a lost byte.  Packets of unknown type are dropped.
module net_packet_receiver (
  input  logic                clk,
  input  logic                rst,
  input  logic [7:0]          rx_data,
  input  logic                rx_valid,
  output logic                login_rx,
  output logic                game_valid,
  output sfd_pkg::game_msg_t  game_msg,
  output logic                audio_valid,
  output sfd_pkg::payload_t   audio_payload,
  output logic                resync
);
  import sfd_pkg::*;

  logic [7:0] buffer [PKT_BYTES];
  logic [3:0] idx;
  logic       done;
  payload_t   payload;

  always_comb
    for (int i = 1; i < PKT_BYTES; i++)
      payload[(PKT_BYTES-1-i)*8 +: 8] = buffer[i];

  always_ff @(posedge clk) begin
    if (rst) begin
      idx <= '0; done <= 1'b0; resync <= 1'b0;
      for (int i = 0; i < PKT_BYTES; i++) buffer[i] <= '0;
    end else begin
      done   <= 1'b0;
      resync <= 1'b0;
      if (rx_valid) begin
        if (idx == 0 && rx_data[7:4] != PKT_SYNC) begin
          resync <= 1'b1;
        end else begin
          buffer[idx] <= rx_data;
          idx <= idx + 1'b1;                      // wraps to 0 after byte 15
          if (idx == 4'(PKT_BYTES - 1)) done <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      login_rx <= 1'b0; game_valid <= 1'b0; audio_valid <= 1'b0;
      game_msg <= '0; audio_payload <= '0;
    end else begin
      login_rx    <= 1'b0;
      game_valid  <= 1'b0;
      audio_valid <= 1'b0;
      if (done) begin
        unique case (buffer[0][3:0])
          PKT_LOGIN: login_rx <= 1'b1;
          PKT_GAME: begin
            game_valid <= 1'b1;
            game_msg   <= game_msg_t'(payload);
          end
          PKT_AUDIO: begin
            audio_valid   <= 1'b1;
            audio_payload <= payload;
          end
          default: ;
        endcase
      end
    end
  end
endmodule
