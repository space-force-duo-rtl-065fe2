// fir_filter: 32-tap low-pass FIR for 8-bit audio, cutting above about 3 kHz.
//
// As described, each new 8-bit sample is shifted into a 32-byte buffer and
// the whole buffer is used for every output.  The arithmetic is done by one
// multiply-accumulate unit over 32 clocks: `in_valid` starts a pass, and
// `out_valid` pulses with the result NTAPS+1 cycles later.  Samples must be
// at least NTAPS+2 cycles apart (the 48 kHz audio rate gives hundreds).
//
// The coefficients are this design's choice: a Hamming-windowed sinc,
//   h[n] = 2*fc*sinc(2*fc*(n-15.5)) * (0.54 - 0.46*cos(2*pi*n/31)),
// fc = 3 kHz / 48 kHz, normalised to a sum of 1024 and rounded, so the pass
// band gain is 1 and the result is the accumulator shifted right by 10 with
// rounding, saturated to signed 8 bits.  Samples are signed two's complement.
module fir_filter (
  input  logic              clk,
  input  logic              rst,
  input  logic signed [7:0] in_sample,
  input  logic              in_valid,
  output logic signed [7:0] out_sample,
  output logic              out_valid
);
  localparam int unsigned NTAPS = 32;    // fixed by the coefficient table
  localparam int unsigned IW = $clog2(NTAPS + 1);

  function automatic logic signed [7:0] coef(input int unsigned i);
    case (i)
      0, 31:  return  8'sd0;
      1, 30:  return -8'sd1;
      2, 29:  return -8'sd2;
      3, 28:  return -8'sd4;
      4, 27:  return -8'sd6;
      5, 26:  return -8'sd8;
      6, 25:  return -8'sd7;
      7, 24:  return -8'sd4;
      8, 23:  return  8'sd5;
      9, 22:  return  8'sd18;
      10, 21: return  8'sd36;
      11, 20: return  8'sd58;
      12, 19: return  8'sd81;
      13, 18: return  8'sd102;
      14, 17: return  8'sd118;
      default: return 8'sd126;   // 15, 16
    endcase
  endfunction

  logic signed [7:0]  buffer [NTAPS];    // buffer[0] is the newest sample
  logic signed [19:0] acc;
  logic [IW-1:0]      idx;
  logic               busy;
  logic signed [19:0] rounded;

  assign rounded = (acc + 20'sd512) >>> 10;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NTAPS; i++) buffer[i] <= '0;
      acc <= '0; idx <= '0; busy <= 1'b0;
      out_sample <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid && !busy) begin
        buffer[0] <= in_sample;
        for (int i = 1; i < NTAPS; i++) buffer[i] <= buffer[i-1];
        acc  <= '0;
        idx  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (idx == IW'(NTAPS)) begin
          busy       <= 1'b0;
          out_valid  <= 1'b1;
          out_sample <= (rounded > 20'sd127)  ? 8'sd127 :
                        (rounded < -20'sd128) ? -8'sd128 : rounded[7:0];
        end else begin
          acc <= acc + 20'(buffer[idx[$clog2(NTAPS)-1:0]] * coef(32'(idx)));
          idx <= idx + 1'b1;
        end
      end
    end
  end

  a_spacing : assert property (@(posedge clk) disable iff (rst) !(in_valid && busy));
endmodule
