// sync_fifo: small single-clock first-word-fall-through FIFO used as the
// 16-byte audio buffers of the recorder and the playback path.
//
// `dout` shows the oldest entry whenever `count` is non-zero; `pop` removes
// it.  A push into a full FIFO is dropped and pulses `overflow`; a pop of an
// empty FIFO is ignored.  Push and pop may happen in the same cycle.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [WIDTH-1:0]         din,
  input  logic                     push,
  input  logic                     pop,
  output logic [WIDTH-1:0]         dout,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                     overflow
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd, wr;
  logic             do_push, do_pop;

  assign do_pop  = pop && (count != 0);
  assign do_push = push && (count != CW'(DEPTH) || do_pop);
  assign dout    = mem[rd];

  always_ff @(posedge clk) begin
    if (rst) begin
      rd <= '0; wr <= '0; count <= '0; overflow <= 1'b0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      overflow <= push && !do_push;
      if (do_push) begin
        mem[wr] <= din;
        wr <= (wr == AW'(DEPTH - 1)) ? '0 : wr + 1'b1;
      end
      if (do_pop) rd <= (rd == AW'(DEPTH - 1)) ? '0 : rd + 1'b1;
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end
endmodule
