// sfd_pkg: types and constants shared by the Space Force Duo terminal.
//
// Holds the system clock and link rates, the 640x480 screen and frame-buffer
// geometry, the 16-byte network packet layout, the game-state record passed
// from the game logic to the renderer, and the table of camera-view matrices
// used by the perspective transformer.
//
// From the design description: 19,200 bit/s RS-232 framing, 16-byte packets,
// 8-bit audio samples, a 640x480 picture and ZBT frame buffers.  Everything
// else here (clock rate, packet header and field layout, pixel format, sprite
// sizes, matrix values) is this implementation's own choice.
package sfd_pkg;

  // ---------------------------------------------------------------- clocking
  // One clock for the whole terminal; it is also the VGA pixel clock.
  localparam int unsigned CLK_HZ   = 25_175_000;
  localparam int unsigned BAUD     = 19_200;
  localparam int unsigned CLKS_PER_BIT = (CLK_HZ + BAUD / 2) / BAUD;  // 1311

  // ---------------------------------------------------------------- screen
  localparam int unsigned H_ACTIVE = 640;
  localparam int unsigned V_ACTIVE = 480;
  // Four 8-bit pixels are packed into one 36-bit ZBT word (bits 31:0 used,
  // pixel 0 of the group in bits 7:0).
  localparam int unsigned PIX_PER_WORD = 4;
  localparam int unsigned ZBT_AW = 19;       // 512K words per ZBT chip
  localparam int unsigned ZBT_DW = 36;

  // One client's request to a ZBT bank and the arbiter's answer.  Read data
  // comes back with rvalid two cycles after the cycle in which gnt was high.
  typedef struct packed {
    logic              req;
    logic              we;
    logic [ZBT_AW-1:0] addr;
    logic [ZBT_DW-1:0] wdata;
  } zbt_req_t;

  typedef struct packed {
    logic              gnt;
    logic              rvalid;
    logic [ZBT_DW-1:0] rdata;
  } zbt_rsp_t;

  // 8-bit colour, RRRGGGBB.
  typedef logic [7:0] pixel_t;
  localparam pixel_t C_BLACK  = 8'h00;
  localparam pixel_t C_IDLE   = 8'h02;       // dark blue lobby background
  localparam pixel_t C_LOCAL  = 8'h1C;       // green: this terminal's ship
  localparam pixel_t C_REMOTE = 8'h1F;       // cyan: the other player's ship
  localparam pixel_t C_ENEMY  = 8'hE0;       // red
  localparam pixel_t C_SHOT   = 8'hFC;       // yellow
  localparam pixel_t C_SCORE  = 8'hFF;       // white score bar

  // ---------------------------------------------------------------- sprites
  localparam int unsigned SHIP_W  = 32, SHIP_H  = 16;
  localparam int unsigned ENEMY_W = 32, ENEMY_H = 24;
  localparam int unsigned SHOT_W  = 4,  SHOT_H  = 8;

  // ---------------------------------------------------------------- packets
  localparam int unsigned PKT_BYTES     = 16;
  localparam int unsigned PAYLOAD_BYTES = PKT_BYTES - 1;   // 15
  localparam logic [3:0]  PKT_SYNC      = 4'hA;            // header high nibble

  typedef enum logic [3:0] {
    PKT_NONE  = 4'h0,
    PKT_LOGIN = 4'h1,
    PKT_GAME  = 4'h2,
    PKT_AUDIO = 4'h3
  } pkt_type_e;

  typedef logic [PAYLOAD_BYTES*8-1:0] payload_t;   // byte 1 in the top bits

  // Game message carried in a PKT_GAME payload (15 bytes, sent MSB first).
  typedef struct packed {
    logic        is_host;      // sender is the host terminal
    logic        shot_active;  // sender's shot is on screen
    logic        enemy_alive;
    logic [4:0]  rsvd;
    logic [15:0] ship_x;
    logic [15:0] ship_y;
    logic [15:0] shot_x;
    logic [15:0] shot_y;
    logic [15:0] enemy_x;      // only meaningful from the host
    logic [15:0] enemy_y;
    logic [7:0]  score;        // only meaningful from the host
    logic [7:0]  pad;
  } game_msg_t;

  typedef enum logic [1:0] {
    G_IDLE   = 2'd0,   // nobody logged in
    G_HOST   = 2'd1,   // logged in first, waiting for the other player
    G_CLIENT = 2'd2,   // the other terminal logged in first, waiting for local start
    G_PLAY   = 2'd3
  } game_state_e;

  // Everything the renderer needs to draw one frame.
  typedef struct packed {
    game_state_e state;
    logic        is_host;
    logic [9:0]  my_x,  my_y;
    logic        my_shot;
    logic [9:0]  my_shot_x,  my_shot_y;
    logic        rem_present;
    logic [9:0]  rem_x, rem_y;
    logic        rem_shot;
    logic [9:0]  rem_shot_x, rem_shot_y;
    logic        enemy_alive;
    logic [9:0]  enemy_x, enemy_y;
    logic [7:0]  score;
  } game_view_t;

  // ---------------------------------------------------------------- camera views
  // Inverse projective map from an output pixel (u,v) to a source pixel:
  //   w  = H21*v + H22
  //   xs = (H00*u + H01*v + H02) / w
  //   ys = (H10*u + H11*v + H12) / w
  // All coefficients are signed Q16 (65536 = 1.0).  The divisor depends on the
  // row only, which covers views that tilt the playfield about the horizontal
  // axis; one reciprocal per output row is enough.
  typedef struct packed {
    logic signed [31:0] h00, h01, h02;
    logic signed [31:0] h10, h11, h12;
    logic signed [31:0] h21, h22;
  } view_mtx_t;

  localparam int unsigned NUM_VIEWS = 4;

  function automatic view_mtx_t view_matrix(input logic [1:0] sel);
    view_mtx_t m;
    m = '{h00: 32'sd65536, h01: 32'sd0, h02: 32'sd0,
          h10: 32'sd0, h11: 32'sd65536, h12: 32'sd0,
          h21: 32'sd0, h22: 32'sd65536};                 // view 0: flat
    unique case (sel)
      2'd1: begin   // tilted away: top row shown at half width, w = 0.5 .. 1
        m.h01 = 32'sd21845;          // (W/2)*0.5/V * 65536
        m.h02 = -32'sd10485760;      // -(W/2)*0.5 * 65536
        m.h21 = 32'sd69;             // 0.5/V * 65536, rounded up so w(479) >= 1
        m.h22 = 32'sd32768;          // 0.5
      end
      2'd2: begin   // tilted towards the viewer: bottom row at half width
        m.h01 = -32'sd21845;
        m.h11 = 32'sd32768;
        m.h21 = -32'sd68;
      end
      2'd3: begin   // steep tilt away: top row at quarter width, w = 0.25 .. 1
        m.h01 = 32'sd32768;          // (W/2)*0.75/V * 65536
        m.h02 = -32'sd15728640;      // -(W/2)*0.75 * 65536
        m.h21 = 32'sd103;            // 0.75/V * 65536, rounded up so w(479) >= 1
        m.h22 = 32'sd16384;          // 0.25
      end
      default: ;
    endcase
    return m;
  endfunction

endpackage
