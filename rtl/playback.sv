// playback: headphone path from the network to the AC97 interface.
//
// A received audio payload (`pkt_valid`, up to 15 samples, byte 1 in the top
// bits of `pkt_payload`) is copied sample by sample, one per clock, into a
// 16-byte buffer.  Each time the codec asks for a sample (`hp_req`), the
// oldest buffered sample, or silence (0) if the buffer is empty, goes through
// the low-pass fir_filter, and the result appears on `hp_sample` with
// `hp_valid` NTAPS+1 cycles later.  `underrun` pulses when a request finds
// the buffer empty and `overflow` when a sample finds it full.  The 16-byte
// buffer and the filter follow the description; silence on underrun and the
// sample-by-sample copy are this design's choice.  A new payload arriving
// while the previous one is still being copied is dropped.
module playback #(
  parameter int unsigned BUF_BYTES = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  input  sfd_pkg::payload_t     pkt_payload,
  input  logic                  pkt_valid,
  input  logic                  hp_req,
  output logic signed [7:0]     hp_sample,
  output logic                  hp_valid,
  output logic                  underrun,
  output logic                  overflow
);
  import sfd_pkg::*;

  payload_t   hold;
  logic [3:0] left;            // samples of `hold` still to copy
  logic [7:0] head;
  logic [$clog2(BUF_BYTES+1)-1:0] count;
  logic       empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      hold <= '0; left <= '0;
    end else if (left != 0) begin
      hold <= {hold[$bits(payload_t)-9:0], 8'h00};
      left <= left - 1'b1;
    end else if (pkt_valid) begin
      hold <= pkt_payload;
      left <= 4'(PAYLOAD_BYTES);
    end
  end

  assign empty = (count == 0);

  sync_fifo #(.WIDTH(8), .DEPTH(BUF_BYTES)) u_buf (
    .clk, .rst,
    .din(hold[$bits(payload_t)-1 -: 8]), .push(left != 0),
    .pop(hp_req), .dout(head), .count, .overflow
  );

  always_ff @(posedge clk) begin
    if (rst) underrun <= 1'b0;
    else     underrun <= hp_req && empty;
  end

  fir_filter u_filter (
    .clk, .rst,
    .in_sample (empty ? 8'sd0 : $signed(head)), .in_valid(hp_req),
    .out_sample(hp_sample), .out_valid(hp_valid)
  );
endmodule
