// deserializer: RS-232 receiver for 1 start bit, 8 data bits LSB first and
// 1 stop bit, as the description specifies, at CLK_HZ/CLKS_PER_BIT bit/s.
//
// The line passes a two-flip-flop synchroniser.  A falling edge starts a
// frame; the start bit is re-checked half a bit later (a glitch shorter than
// that is ignored) and each following bit is sampled in the middle of its bit
// period.  The byte is held in a one-byte buffer and `valid` pulses for one
// cycle in the middle of the stop bit.  A frame whose stop bit reads 0 is
// dropped and pulses `frame_err` instead.
module deserializer #(
  parameter int unsigned CLKS_PER_BIT = sfd_pkg::CLKS_PER_BIT
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;
  state_e        state;
  logic          r0, r1;
  logic [CW-1:0] tick;
  logic [2:0]    bitn;
  logic [7:0]    shreg;

  always_ff @(posedge clk) begin
    if (rst) begin
      r0 <= 1'b1; r1 <= 1'b1;
      state <= S_IDLE; tick <= '0; bitn <= '0; shreg <= '0;
      data <= '0; valid <= 1'b0; frame_err <= 1'b0;
    end else begin
      r0 <= rxd;
      r1 <= r0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        S_IDLE: if (!r1) begin
          state <= S_START;
          tick  <= '0;
        end
        S_START: begin
          if (tick == CW'(CLKS_PER_BIT / 2 - 1)) begin
            tick  <= '0;
            bitn  <= '0;
            state <= r1 ? S_IDLE : S_DATA;
          end else tick <= tick + 1'b1;
        end
        S_DATA: begin
          if (tick == CW'(CLKS_PER_BIT - 1)) begin
            tick  <= '0;
            shreg <= {r1, shreg[7:1]};
            bitn  <= bitn + 1'b1;
            if (bitn == 3'd7) state <= S_STOP;
          end else tick <= tick + 1'b1;
        end
        S_STOP: begin
          if (tick == CW'(CLKS_PER_BIT - 1)) begin
            tick  <= '0;
            state <= S_IDLE;
            if (r1) begin
              data  <= shreg;
              valid <= 1'b1;
            end else frame_err <= 1'b1;
          end else tick <= tick + 1'b1;
        end
      endcase
    end
  end
endmodule
