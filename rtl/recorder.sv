// recorder: microphone path from the AC97 interface to the network.
//
// Each 8-bit sample offered by the codec interface (`mic_valid`) is passed
// through the low-pass fir_filter; filtered samples are kept in a 16-byte
// buffer from which the packet parser takes them (`aud_count`, `aud_data`,
// `aud_pop`, first word fall-through).  When the buffer is full a new
// filtered sample is dropped and `overflow` pulses: the 19,200 bit/s link
// carries far fewer samples than the codec delivers, so the buffer sheds
// what the link cannot take.  The filter, the 16-byte buffer and the hand-off
// to the packet parser follow the description; dropping on overflow is this
// design's choice.
module recorder #(
  parameter int unsigned BUF_BYTES = 16
) (
  input  logic                             clk,
  input  logic                             rst,
  input  logic signed [7:0]                mic_sample,
  input  logic                             mic_valid,
  output logic [7:0]                       aud_data,
  output logic [$clog2(BUF_BYTES+1)-1:0]   aud_count,
  input  logic                             aud_pop,
  output logic                             overflow
);
  logic signed [7:0] filt;
  logic              filt_valid;

  fir_filter u_filter (
    .clk, .rst,
    .in_sample (mic_sample), .in_valid (mic_valid),
    .out_sample(filt),       .out_valid(filt_valid)
  );

  sync_fifo #(.WIDTH(8), .DEPTH(BUF_BYTES)) u_buf (
    .clk, .rst,
    .din(filt), .push(filt_valid),
    .pop(aud_pop), .dout(aud_data), .count(aud_count), .overflow
  );
endmodule
