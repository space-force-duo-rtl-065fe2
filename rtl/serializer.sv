// serializer: RS-232 transmitter, one start bit, 8 data bits LSB first, one
// stop bit, as the description specifies, at CLK_HZ/CLKS_PER_BIT bit/s
// (19,200 bit/s by default).
//
// Handshake: a byte is accepted when `valid` and `ready` are both high;
// `ready` is high only while the line is idle.  A frame takes exactly
// 10*CLKS_PER_BIT cycles from the cycle after acceptance, and the next byte
// can be accepted in the cycle after the stop bit ends.  The line idles high.
module serializer #(
  parameter int unsigned CLKS_PER_BIT = sfd_pkg::CLKS_PER_BIT
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  logic [9:0]    shreg;     // {stop, data, start}, shifted out LSB first
  logic [3:0]    bits_left;
  logic [CW-1:0] tick;

  assign ready = (bits_left == 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '1;
      bits_left <= '0;
      tick      <= '0;
      txd       <= 1'b1;
    end else if (bits_left == 0) begin
      txd <= 1'b1;
      if (valid) begin
        shreg     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        tick      <= '0;
        txd       <= 1'b0;     // start bit goes out right away
      end
    end else if (tick == CW'(CLKS_PER_BIT - 1)) begin
      tick      <= '0;
      bits_left <= bits_left - 1'b1;
      shreg     <= {1'b1, shreg[9:1]};
      txd       <= (bits_left == 1) ? 1'b1 : shreg[1];
    end else begin
      tick <= tick + 1'b1;
    end
  end

  // A byte offered while busy must be held until accepted.
  property p_hold;
    @(posedge clk) disable iff (rst) (valid && !ready) |=> valid && $stable(data);
  endproperty
  a_hold : assert property (p_hold);
endmodule
