// zbt_sram_model: behavioural model of a pipelined ZBT SRAM chip, for
// simulation only (not synthesised into the design).
//
// The address and write enable are taken at a rising edge.  For a read, the
// stored word is driven on `rdata` during the cycle after the next edge;
// for a write, the word on `wdata` during that same cycle is stored at the
// edge that ends it.  Write enable is active high.  Contents start at zero.
module zbt_sram_model #(
  parameter int unsigned AW = 19,
  parameter int unsigned DW = 36
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];
  logic [AW-1:0] a1, a2;
  logic          w1, w2;

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    a1 = '0; a2 = '0; w1 = 1'b0; w2 = 1'b0;
  end

  always_ff @(posedge clk) begin
    a1 <= addr; w1 <= we;
    a2 <= a1;   w2 <= w1;
    if (w2) mem[a2] <= wdata;
  end

  assign rdata = w2 ? '0 : mem[a2];
endmodule
