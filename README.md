# Space Force Duo — a two-terminal FPGA space game in SystemVerilog

Space Force Duo is a cooperative two-player shooter for two FPGA boards. The
boards are joined by a plain RS-232 cable. Each player flies a ship against an
enemy. The boards exchange game state and the players' voices over the same
19,200 bit/s serial link. The picture is drawn flat and then warped through a
projective matrix, so the playfield can be seen from different "camera views"
that give it a 3-D tilt.

This repository holds the RTL for **one terminal** (`sfd_top`). Two instances
with crossed TX/RX lines make the full game. The player who presses START
first becomes the *host*. The host owns the enemy and the score. The other
terminal becomes the *client*.

## How one terminal is put together

```
 buttons ─► debouncer ─► master_fsm ──────────────┐ game state
                           │ ▲                     ▼
             login / game  │ │ login / game   pixel_generator ─► ZBT bank 0 (rendered frame)
                           ▼ │                                        │
 mic samples ─► recorder ─► net_packet_parser ─► serializer ─► TX     ▼
                (filter, 16 B)                                  matrix_transformer (camera view)
                                                                      │
 RX ─► deserializer ─► net_packet_receiver ─► playback ─► codec       ▼
                                     │        (16 B, filter)    ZBT bank 1 (displayed frame)
                                     └─► master_fsm                   │
 vga_generator ─► counters to pixel_generator and display_generator ─► VGA port
```

Everything runs on one clock, which is also the VGA pixel clock. Its assumed
rate is 25.175 MHz. The AC97 codec interface and the two ZBT SRAM chips are
not part of this RTL. Their signals are ports of `sfd_top`:

- **Codec side:** 8-bit signed samples, with a one-cycle strobe per sample in
  each direction.
- **ZBT side:** the address, an active-high write enable, and 36-bit write and
  read data for each bank. A board wrapper must invert the write enable for the
  real active-low part.

## The picture pipeline

The display side is the hardest part of the design to follow. It has three
stages, joined by two frame buffers.

**Pixel format and layout.** A pixel is 8 bits, RRRGGGBB. Four pixels share one
36-bit ZBT word: pixel *x* mod 4 = 0 sits in bits 7:0 and bits 35:32 are zero.
Pixel (x, y) lives at word `y*160 + x/4`, so a 640×480 frame takes 76,800
words. One 512K-word chip holds it easily. Bank 0 holds the rendered frame and
bank 1 the frame being displayed.

**Render (`pixel_generator`).** This stage follows the VGA counters. For each
visible pixel it picks a colour, highest priority first:

1. score bar (top 8 lines, 4 pixels per point)
2. shots (4×8)
3. local ship (32×16)
4. remote ship (32×16)
5. enemy (32×24)
6. background: black in play, dark blue in the lobby

Every fourth pixel it writes one word. The game state is latched during
vertical blanking, so a frame never mixes two game states.

**Perspective warp (`matrix_transformer`).** This stage maps backwards. For each
output pixel (u, v) it computes which source pixel to fetch:

```
w  = H21*v + H22
xs = floor((H00*u + H01*v + H02) / w)
ys = floor((H10*u + H11*v + H12) / w)
```

All coefficients are signed Q16 (65536 = 1.0). The divisor depends only on the
row, which covers every view that tilts the playfield about the horizontal
axis. That restriction is what makes the block cheap. A 33-step restoring
divider computes `r = floor(2^32 / w)` once per row. After that each pixel
needs only multiplies and shifts: `xs = (num_x * r) >>> 32`.

A source pixel outside the picture, or a row with w ≤ 0, gives black. Output
pixels are produced in raster order, so four of them pack into one word with no
read-modify-write.

The four views are defined in `sfd_pkg::view_matrix`:

| view | effect | w from row 0 to row 479 |
|---|---|---|
| 0 | flat (identity) | 1 |
| 1 | tilted away: top row at half width, rows packed towards the top | 0.5 → 1 |
| 2 | tilted towards the viewer: bottom row at half width | 1 → 0.5 |
| 3 | steep tilt away: top row at quarter width | 0.25 → 1 |

In views 1 and 3, H21 is rounded up so that w reaches at least 1.0 on the last
row. Otherwise the bottom row would sample source line 480, one past the
picture.

**Display (`display_generator`).** At the first pixel of each group of four,
this stage reads one word from bank 1 and then shows its four pixels one per
clock. Sync and blank are delayed by 5 clocks to stay aligned with the colour.
RGB is widened to 8 bits per channel by bit replication.

**Sharing a ZBT bank (`zbt_arbiter`).** Each bank has two clients:

- **Client 0** has a real-time deadline and always wins: the renderer on
  bank 0, the display on bank 1. Each uses at most one cycle in four, and only
  during the visible part of the frame.
- **Client 1** is the transformer. It waits for `gnt` and uses the rest.

The grant is combinational. The arbiter delays write data by two registers,
because a ZBT takes write data two edges after the address. Read data comes
back with `rvalid` two cycles after the grant.

**Frame rate.** The transformer needs about 6 clocks per pixel when it is not
held off. That is about 1.9–2.1 M clocks per frame, or about 12 transformed
frames per second at 25.175 MHz. The renderer and the display both run at
60 Hz. There is no double buffering, so the display can show a frame that the
transformer has only half updated.

## The serial link and its packets

**Framing (`serializer`, `deserializer`).** Bytes are sent as 8N1: one start
bit, eight data bits LSB first, one stop bit. The default is 1311 clocks per
bit, which is 19,200 bit/s at 25.175 MHz.

- The receiver samples each bit in its middle.
- It ignores a low glitch shorter than half a bit.
- It drops a byte whose stop bit reads 0 and flags `frame_err`.

**Packets.** Every packet is 16 bytes:

| byte | content |
|---|---|
| 0 | header `{4'hA, type}`: 1 = login, 2 = game message, 3 = voice |
| 1–15 | payload |

The payload depends on the type:

- **Login:** zeros.
- **Voice:** 15 consecutive filtered samples.
- **Game message:** `sfd_pkg::game_msg_t`, sent most significant byte first.
  It holds flags (sender is host, shot active, enemy alive), the ship, shot
  and enemy coordinates as 16-bit fields, and the score.

**Receiver (`net_packet_receiver`).** It fills a 16-byte buffer. If the first
byte of a packet lacks the `A` nibble, the receiver discards it, so it
re-aligns after a lost byte. A complete packet gives a one-cycle pulse on the
output for its type.

**Parser (`net_packet_parser`).** This is the transmit side. It keeps pending
requests and loads the 16-byte buffer in priority order: login, then the game
message, then voice once the recorder holds 15 samples. A newer game message
replaces an unsent one.

**Link budget.** A packet takes 160 bit times, or 8.33 ms. The link therefore
carries 120 packets per second. The game message uses 60 of them, one per
video frame. That leaves 60 voice packets, which is 900 samples per second.

## Voice

Microphone samples go through `fir_filter` into the recorder's 16-sample FIFO,
and the parser drains them. The filter is a 32-tap low-pass with a cut-off near
3 kHz at a 48 kHz sample rate. It uses one multiply-accumulate unit and gives
its result 33 clocks after the input.

On the far side, a voice payload is copied into the playback FIFO, which holds
16 samples. Each codec request pops one sample, or 0 if the FIFO is empty, and
sends it through another instance of the same filter to the headphones.

The link carries only about 900 samples per second. The recorder therefore
drops what does not fit and flags `rec_overflow`. The playback side flags
`pb_underrun` and `pb_overflow`. With a 48 kHz codec the voice is heard in
short bursts. A lower codec rate, or a decimating recorder, would match the
link better. Neither is part of this RTL.

The coefficients are a Hamming-windowed sinc, normalised to a sum of 1024:

```
h[n] = 2*fc*sinc(2*fc*(n-15.5)) * (0.54 - 0.46*cos(2*pi*n/31))
fc   = 3/48
```

The output is `(acc + 512) >>> 10`, saturated to signed 8 bits.

## Game logic (`master_fsm`)

**Buttons.** The seven buttons are START, FIRE, LEFT, RIGHT, UP, DOWN and
VIEW. The `debouncer` synchronises them and requires 10 ms of stable level
before a change counts.

**Lobby.** The roles are settled by who logs in first:

1. The first START sends a login and makes that terminal host (`G_HOST`).
2. A terminal that receives a login while idle becomes client (`G_CLIENT`).
3. The client's START answers with its own login.
4. Both terminals are then in `G_PLAY`.

If both players press START before either login arrives, both terminals become
host. Nothing resolves this case.

**Each video frame in play:**

- **Ship:** moves 4 pixels in the held directions. It stays on screen and in
  the lower half.
- **Shot:** FIRE launches one if none is in flight. It climbs 8 pixels per
  frame.
- **Enemy (host only):** moves sideways 2 pixels per frame. At each edge it
  drops 16 pixels, and it returns to the top before reaching the ships.
- **Hits:** the host scores when its own shot, or the client's last reported
  shot, overlaps the enemy. The enemy then restarts at the top left.
- **Client's shot:** the client removes it when it overlaps the enemy the host
  last reported.
- **Game message:** each terminal sends one. The client takes the enemy and
  the score from the host's messages.

**Views.** VIEW steps through the four camera views.

These game rules are a minimal stand-in. The project description names a
spacecraft game against enemy units but gives no rules, so this block is the
least faithful part of the design.

## What follows the project description and what does not

**Taken from the description:**

- two boards joined by a serial link carrying voice and game data
- the host chosen by who logs in first
- 8N1 framing, LSB first, at 19,200 bit/s
- 16-byte packets, with the 16-byte buffers in the receiver and parser
- 8-bit audio samples
- a low-pass filter over a 32-sample buffer, cutting above about 3 kHz
- 16-byte buffers in the recorder and playback paths
- a 640×480 VGA output
- a renderer that writes a frame to ZBT RAM
- a matrix transform from one ZBT frame to another for a perspective view
- a display stage that reads the final frame from ZBT
- debounced buttons

**Choices made here:**

- the clock rate
- the packet header and field layout
- separate game and voice packets, so a voice packet carries 15 samples and
  not 16
- the send priorities
- the pixel format and memory layout
- the sprite shapes and colours
- the row-only perspective divisor, Q16 coefficients and the four view matrices
- the filter coefficients
- the FIFO behaviour (drop when full, silence when empty)
- the whole rule set of the game
- the 10 ms debounce time

**Not in this RTL:**

- the AC97 codec interface, which was a pre-existing module
- the ZBT chips, which are external parts

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Any of them runs with plain Verilator, for
example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sfd_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/sfd_pkg.sv tb/tb_sfd_top.sv
./obj_dir/Vtb_sfd_top
```

| testbench | what it exercises |
|---|---|
| `tb_sfd_top` | Two terminals at a reduced size: 160×120 screen, 8 clocks per bit, 4-clock debounce. A noise byte and a broken frame on the line, the login and role choice, game messages both ways, a scored hit, voice packets checked byte for byte from one recorder to the other terminal's playback, recorder overflow, playback underrun and overflow, both ships on the client's VGA output, and a camera-view switch reaching the transformer. Each mechanism is counted and must occur. |
| `tb_sfd_top_full` | Two terminals with every parameter at its default. Real 10 ms button presses, the login over the 19,200 bit/s link (every low run on the line is a whole number of 1311-clock bits), and one full frame through render, warp and display with both ships fully on screen. About 5.5 M clocks; a few seconds of simulation. |
| `tb_matrix_transformer` | All four views at 640×480, with the real-time clients taking priority half the time. The whole output frame is compared with a 64-bit integer reference. |
| `tb_pixel_generator`, `tb_display_generator`, `tb_vga_generator` | Full 640×480 frames, every pixel and every sync cycle checked. |
| `tb_fir_filter`, `tb_recorder`, `tb_playback` | Outputs against a filter reference computed in real arithmetic from the window formula. |
| the remaining testbenches | The serial, packet, debounce and game-logic blocks. |

`tb/zbt_sram_model.sv` is a behavioural ZBT model used only by the
testbenches. Simulation is two-state, so every register read is reset.

## Files

| file | content |
|---|---|
| `rtl/sfd_pkg.sv` | clock and link rates, screen geometry, packet and game-message types, colours, sprite sizes, ZBT request/response structs, camera-view matrices |
| `rtl/sfd_top.sv` | one terminal |
| `rtl/master_fsm.sv`, `rtl/debouncer.sv` | game logic and button input |
| `rtl/serializer.sv`, `rtl/deserializer.sv`, `rtl/net_packet_parser.sv`, `rtl/net_packet_receiver.sv` | serial link |
| `rtl/recorder.sv`, `rtl/playback.sv`, `rtl/fir_filter.sv`, `rtl/sync_fifo.sv` | voice path |
| `rtl/vga_generator.sv`, `rtl/pixel_generator.sv`, `rtl/matrix_transformer.sv`, `rtl/display_generator.sv`, `rtl/zbt_arbiter.sv` | picture pipeline |
