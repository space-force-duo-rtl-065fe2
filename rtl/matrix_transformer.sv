// matrix_transformer: warps the rendered frame into a perspective ("camera")
// view, reading one ZBT frame buffer and writing another.
//
// It works by inverse mapping in raster order.  For each output row v it
// forms the homogeneous divisor w = H21*v + H22 and takes its reciprocal
// r = floor(2^32 / w) with a 33-step restoring divider (once per row).  For
// each output pixel u it then computes
//   xs = floor((H00*u + H01*v + H02) * r / 2^32)
//   ys = floor((H10*u + H11*v + H12) * r / 2^32)
// and copies source pixel (xs,ys) from the render bank, or black if it falls
// outside the picture or w <= 0.  Four output pixels are packed and written
// as one word to the display bank.  Coefficients are Q16 and come from
// sfd_pkg::view_matrix(view_sel), sampled when a frame starts.  On both banks
// this block is client 1 and waits for grants; about six clocks per pixel
// when not held off.  With `enable` high it starts the next frame as soon as
// one is done; `frame_done` pulses after the last word is written.
// The description gives the job (a matrix operation on the pixel array that
// gives a 3D perspective, from ZBT to ZBT); restricting the divisor to depend
// on the row only, the fixed-point formats and the view matrices are this
// design's choice.
module matrix_transformer #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned V_ACTIVE = 480,
  parameter logic [sfd_pkg::ZBT_AW-1:0] SRC_BASE = '0,
  parameter logic [sfd_pkg::ZBT_AW-1:0] DST_BASE = '0
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               enable,
  input  logic [1:0]         view_sel,
  output sfd_pkg::zbt_req_t  src_req,
  input  sfd_pkg::zbt_rsp_t  src_rsp,
  output sfd_pkg::zbt_req_t  dst_req,
  input  sfd_pkg::zbt_rsp_t  dst_rsp,
  output logic               frame_done,
  output logic               busy
);
  import sfd_pkg::*;

  localparam int unsigned WPR = H_ACTIVE / PIX_PER_WORD;

  typedef enum logic [3:0] {
    S_IDLE, S_ROW, S_DIV, S_NUM, S_PROJ, S_READ, S_WAIT, S_STORE, S_WRITE
  } state_e;

  state_e             state;
  view_mtx_t          m;
  logic [9:0]         u, v;
  logic signed [31:0] w;
  logic [32:0]        rem;
  logic [32:0]        quo;
  logic [5:0]         step;
  logic               row_ok;
  logic signed [47:0] num_x, num_y;
  logic signed [31:0] xs, ys;
  logic               in_range;
  pixel_t             pix;
  logic [23:0]        pack;

  // Restoring division of 2^32 by w, one quotient bit per step.
  logic [33:0] rem_sh;
  assign rem_sh = {rem, (step == 6'd32)};

  logic signed [81:0] px, py;
  assign px = num_x * $signed({1'b0, quo});
  assign py = num_y * $signed({1'b0, quo});

  assign in_range = (xs >= 0) && (xs < 32'sd1 * H_ACTIVE) &&
                    (ys >= 0) && (ys < 32'sd1 * V_ACTIVE) && row_ok;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE; m <= '0; u <= '0; v <= '0; w <= '0; rem <= '0; quo <= '0;
      step <= '0; row_ok <= 1'b0; num_x <= '0; num_y <= '0; xs <= '0; ys <= '0;
      src_req <= '0; dst_req <= '0; frame_done <= 1'b0; busy <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      unique case (state)
        S_IDLE: if (enable) begin
          m     <= view_matrix(view_sel);
          u     <= '0;
          v     <= '0;
          busy  <= 1'b1;
          state <= S_ROW;
        end
        S_ROW: begin
          w     <= 32'(m.h21 * $signed({22'b0, v}) + m.h22);
          rem   <= '0;
          quo   <= '0;
          step  <= 6'd32;
          state <= S_DIV;
        end
        S_DIV: begin
          row_ok <= (w > 0);
          if (w > 0 && rem_sh >= 34'(w)) begin
            rem <= 33'(rem_sh - 34'(w));
            quo <= {quo[31:0], 1'b1};
          end else begin
            rem <= rem_sh[32:0];
            quo <= {quo[31:0], 1'b0};
          end
          if (step == 0) state <= S_NUM;
          else step <= step - 1'b1;
        end
        S_NUM: begin
          num_x <= 48'(m.h00 * $signed({22'b0, u})) + 48'(m.h01 * $signed({22'b0, v})) + 48'(m.h02);
          num_y <= 48'(m.h10 * $signed({22'b0, u})) + 48'(m.h11 * $signed({22'b0, v})) + 48'(m.h12);
          state <= S_PROJ;
        end
        S_PROJ: begin
          xs    <= 32'(px >>> 32);
          ys    <= 32'(py >>> 32);
          state <= S_READ;
        end
        S_READ: begin
          if (!in_range) begin
            pix   <= C_BLACK;
            state <= S_STORE;
          end else if (src_req.req && src_rsp.gnt) begin
            src_req.req <= 1'b0;
            state       <= S_WAIT;
          end else begin
            src_req.req  <= 1'b1;
            src_req.we   <= 1'b0;
            src_req.wdata <= '0;
            src_req.addr <= SRC_BASE + ZBT_AW'(ys) * ZBT_AW'(WPR) + ZBT_AW'(xs[31:2]);
          end
        end
        S_WAIT: if (src_rsp.rvalid) begin
          pix   <= src_rsp.rdata[8*xs[1:0] +: 8];
          state <= S_STORE;
        end
        S_STORE: begin
          pack <= {pix, pack[23:8]};
          if (u[1:0] == 2'd3) begin
            dst_req.req   <= 1'b1;
            dst_req.we    <= 1'b1;
            dst_req.addr  <= DST_BASE + ZBT_AW'(v) * ZBT_AW'(WPR) + ZBT_AW'(u[9:2]);
            dst_req.wdata <= {4'h0, pix, pack};
            state         <= S_WRITE;
          end else begin
            u     <= u + 1'b1;
            state <= S_NUM;
          end
        end
        S_WRITE: if (dst_rsp.gnt) begin
          dst_req.req <= 1'b0;
          if (u == 10'(H_ACTIVE - 1)) begin
            u <= '0;
            if (v == 10'(V_ACTIVE - 1)) begin
              frame_done <= 1'b1;
              busy       <= 1'b0;
              state      <= S_IDLE;
            end else begin
              v     <= v + 1'b1;
              state <= S_ROW;
            end
          end else begin
            u     <= u + 1'b1;
            state <= S_NUM;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
