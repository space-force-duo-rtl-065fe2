// zbt_arbiter: shares one ZBT SRAM bank between two clients.
//
// A ZBT (zero-bus-turnaround) SRAM is pipelined: the address and write enable
// are taken at a clock edge, and the data for that access is on the data bus
// during the clock cycle after the following edge.  This arbiter grants at
// most one request per cycle, client 0 first (it is the one with a real-time
// deadline), and drives address and write enable to the chip in the same
// cycle (`gnt` is combinational).  Write data is delayed two registers so it
// reaches the bus in the cycle the chip expects it.  For a granted read the
// data comes back to the same client with `rvalid` two cycles after the grant
// and must be taken in that cycle.  The pin-level write enable here is
// active high; a board wrapper inverts it for the real part.
module zbt_arbiter (
  input  logic                      clk,
  input  logic                      rst,
  input  sfd_pkg::zbt_req_t         c0_req,
  output sfd_pkg::zbt_rsp_t         c0_rsp,
  input  sfd_pkg::zbt_req_t         c1_req,
  output sfd_pkg::zbt_rsp_t         c1_rsp,
  output logic [sfd_pkg::ZBT_AW-1:0] zbt_addr,
  output logic                      zbt_we,
  output logic [sfd_pkg::ZBT_DW-1:0] zbt_wdata,
  input  logic [sfd_pkg::ZBT_DW-1:0] zbt_rdata
);
  import sfd_pkg::*;

  logic              g0, g1;
  logic [ZBT_DW-1:0] wd1, wd2;
  logic [1:0]        rd1, rd2;       // one-hot owner of a read in flight

  assign g0 = c0_req.req;
  assign g1 = c1_req.req && !c0_req.req;

  assign zbt_addr = g0 ? c0_req.addr : c1_req.addr;
  assign zbt_we   = (g0 && c0_req.we) || (g1 && c1_req.we);
  assign zbt_wdata = wd2;

  always_ff @(posedge clk) begin
    if (rst) begin
      wd1 <= '0; wd2 <= '0; rd1 <= '0; rd2 <= '0;
    end else begin
      wd1 <= g0 ? c0_req.wdata : c1_req.wdata;
      wd2 <= wd1;
      rd1 <= {g1 && !c1_req.we, g0 && !c0_req.we};
      rd2 <= rd1;
    end
  end

  always_comb begin
    c0_rsp = '{gnt: g0, rvalid: rd2[0], rdata: zbt_rdata};
    c1_rsp = '{gnt: g1, rvalid: rd2[1], rdata: zbt_rdata};
  end
endmodule
