// debouncer: synchronises and debounces WIDTH push buttons.
//
// Each raw input goes through a two-flip-flop synchroniser.  A per-button
// counter restarts whenever the synchronised level differs from the debounced
// output; once the new level has held for STABLE_CYCLES consecutive clocks the
// output takes it.  A one-cycle `rise` pulse marks each debounced press.
// The description only says the block debounces and synchronises the buttons;
// the counter scheme and the 10 ms default (at the 25.175 MHz clock) are this
// design's choice.  Outputs reset to 0 (buttons released).
module debouncer #(
  parameter int unsigned WIDTH         = 7,
  parameter int unsigned STABLE_CYCLES = 251_750
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] btn_raw,
  output logic [WIDTH-1:0] btn,      // debounced level
  output logic [WIDTH-1:0] rise      // one-cycle pulse on a debounced press
);
  localparam int unsigned CW = $clog2(STABLE_CYCLES + 1);

  logic [WIDTH-1:0] sync0, sync1;
  logic [CW-1:0]    cnt [WIDTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync0 <= '0;
      sync1 <= '0;
      btn   <= '0;
      rise  <= '0;
      for (int i = 0; i < WIDTH; i++) cnt[i] <= '0;
    end else begin
      sync0 <= btn_raw;
      sync1 <= sync0;
      rise  <= '0;
      for (int i = 0; i < WIDTH; i++) begin
        if (sync1[i] == btn[i]) begin
          cnt[i] <= '0;
        end else if (cnt[i] == CW'(STABLE_CYCLES - 1)) begin
          cnt[i]  <= '0;
          btn[i]  <= sync1[i];
          rise[i] <= sync1[i];
        end else begin
          cnt[i] <= cnt[i] + 1'b1;
        end
      end
    end
  end
endmodule
