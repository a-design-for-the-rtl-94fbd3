// lower_layer: lower layer module of the two-layer optical flow processor.
//
// For one divided block (W x H pixels at full resolution) it builds the
// motion compensation frames CF and CB from frames t-1 and t+1 with the
// propagation flow of the upper layer, computes the luminance gradients of
// (CF, t, CB), seeds the flow correction from the previous frame's flow,
// runs NITER (6) Gauss-Seidel/SOR sweeps for the correction, and outputs the
// final flow = correction + propagation flow during the final sweep, one
// pixel per cycle.
//
// Units and memories, as in the block diagram of the original design:
// motion compensation image creation unit (with the original image line
// memory), luminance gradient unit (with the motion compensation image line
// memory), luminance gradient memory, initial value generation, motion
// calculation unit and motion memory. The propagation flow is read from
// the bilinear interpolation unit through three query ports (for motion
// compensation, for the initial value and for the final output). The
// sequencing is this design's own, as in upper_layer.
//
// Interface: start begins one block. pix_* carries the W x H source pixels
// of frames t-1, t, t+1 and prev_* the previous frame's final flow (both
// valid/ready, raster order). q_x/q_y/q_flow are the propagation flow query
// ports (combinational answer). out_valid/out_x/out_y/out_flow is the final
// flow of the whole block including its overlap pixels, registered, without
// back-pressure. done pulses after the last output.
module lower_layer
  import of_pkg::*;
#(
  parameter int W     = 244,
  parameter int H     = 192,
  parameter int NITER = 6,
  parameter int LAT   = 12,
  localparam int AW = $clog2(W*H)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [COEF_W-1:0] alpha2,
  input  logic [COEF_W-1:0] lambda2,
  input  logic              pix_valid,
  output logic              pix_ready,
  input  pix3_t             pix_data,
  input  logic              prev_valid,
  output logic              prev_ready,
  input  flow2_t            prev_flow,
  output coord_t            q_x    [3],
  output coord_t            q_y    [3],
  input  flow2_t            q_flow [3],
  output logic              out_valid,
  output coord_t            out_x,
  output coord_t            out_y,
  output flow2_t            out_flow,
  output logic              mc_clamp,
  output logic              busy,
  output logic              iterating,
  output logic              done
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_ITER} state_t;
  state_t state;
  logic   load_start, grad_done_seen, init_done_seen;

  // motion compensation image creation
  logic   c_valid, c_done;
  coord_t c_x, c_y;
  pix3_t  c_pix;

  // source stream gate (see the previous-flow rule below)
  int   src_col, src_row, init_beats;
  logic init_ahead, src_ready;

  mc_unit #(.W(W), .H(H)) u_mc (
    .clk, .rst_n, .start(load_start),
    .in_valid(pix_valid && init_ahead), .in_ready(src_ready), .in_pix(pix_data),
    .q_x(q_x[0]), .q_y(q_y[0]), .q_flow(q_flow[0]), .clamp_hit(mc_clamp),
    .out_valid(c_valid), .out_x(c_x), .out_y(c_y), .out_pix(c_pix),
    .done(c_done)
  );

  // luminance gradient
  logic   g_valid, g_done, g_busy;
  coord_t g_x, g_y;
  grad_t  g_val;

  grad_unit #(.W(W), .H(H), .LAT(6)) u_grad (
    .clk, .rst_n, .start(load_start),
    .in_valid(c_valid), .in_pix(c_pix), .busy(g_busy),
    .out_valid(g_valid), .out_x(g_x), .out_y(g_y), .out_grad(g_val),
    .done(g_done)
  );

  logic [AW-1:0]       gm_raddr [1];
  logic [3*GRAD_W-1:0] gm_rraw  [1];

  block_ram #(.DW(3*GRAD_W), .DEPTH(W*H), .NRD(1)) u_grad_mem (
    .clk, .we(g_valid), .we_b(1'b0), .wr_addr_b('0), .wr_data_b('0),
    .wr_addr(AW'(int'(g_y)*W + int'(g_x))), .wr_data(g_val),
    .rd_addr(gm_raddr), .rd_data(gm_rraw)
  );

  // initial value generation (previous flow minus propagation flow)
  logic          iv_wr_en, iv_done;
  logic [AW-1:0] iv_wr_addr;
  flow3_t        iv_wr_data;

  init_value_gen #(.UPPER(1'b0), .W(W), .H(H)) u_init (
    .clk, .rst_n, .start(load_start),
    .in_valid(prev_valid), .in_ready(prev_ready), .in_flow(prev_flow),
    .prop_x(q_x[1]), .prop_y(q_y[1]), .prop_flow(q_flow[1]),
    .wr_en(iv_wr_en), .wr_addr(iv_wr_addr), .wr_data(iv_wr_data), .done(iv_done)
  );

  // motion calculation and motion memory
  logic          mc_start, mc_busy, mc_done;
  logic [AW-1:0] mm_raddr [5];
  flow3_t        mm_rdata [5];
  logic [3*FLOW_W-1:0] mm_rraw [5];
  logic          mc_wr_en, mc_wr_last;
  logic [AW-1:0] mc_wr_addr;
  coord_t        mc_wr_x, mc_wr_y;
  flow3_t        mc_wr_data;

  always_comb for (int k = 0; k < 5; k++) mm_rdata[k] = flow3_t'(mm_rraw[k]);

  motion_calc_unit #(.W(W), .H(H), .NITER(NITER), .LAT(LAT)) u_motion (
    .clk, .rst_n, .start(mc_start), .alpha2, .lambda2,
    .s_valid(g_valid), .s_x(g_x), .s_y(g_y), .s_grad(g_val),
    .busy(mc_busy), .done(mc_done),
    .g_addr(gm_raddr[0]), .g_data(grad_t'(gm_rraw[0])),
    .m_addr(mm_raddr), .m_data(mm_rdata),
    .wr_en(mc_wr_en), .wr_addr(mc_wr_addr), .wr_x(mc_wr_x), .wr_y(mc_wr_y),
    .wr_data(mc_wr_data), .wr_last(mc_wr_last)
  );

  block_ram #(.DW(3*FLOW_W), .DEPTH(W*H), .NRD(5)) u_motion_mem (
    .clk,
    .we(mc_wr_en), .wr_addr(mc_wr_addr), .wr_data(mc_wr_data),
    .we_b(iv_wr_en), .wr_addr_b(iv_wr_addr), .wr_data_b(iv_wr_data),
    .rd_addr(mm_raddr), .rd_data(mm_rraw)
  );

  // final flow = correction + propagation flow, during the last sweep
  assign q_x[2] = mc_wr_x;
  assign q_y[2] = mc_wr_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      out_flow  <= '0;
    end else begin
      out_valid <= mc_wr_en && mc_wr_last;
      out_x     <= mc_wr_x;
      out_y     <= mc_wr_y;
      out_flow.u <= sat_flow(64'(mc_wr_data.u) + 64'(q_flow[2].u));
      out_flow.v <= sat_flow(64'(mc_wr_data.v) + 64'(q_flow[2].v));
    end
  end

  // The previous-flow stream must stay one row ahead of the source stream,
  // so that the first sweep finds the initial values of the row below.

  assign init_ahead = (init_beats >= (src_row + 1) * W);
  assign pix_ready  = src_ready && init_ahead;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_col <= 0; src_row <= 0; init_beats <= 0;
    end else if (load_start) begin
      src_col <= 0; src_row <= 0; init_beats <= 0;
    end else begin
      if (prev_valid && prev_ready) init_beats <= init_beats + 1;
      if (pix_valid && pix_ready) begin
        if (src_col == W-1) begin
          src_col <= 0;
          src_row <= src_row + 1;
        end else src_col <= src_col + 1;
      end
    end
  end

  // The first sweep must find the initial values of the row below each
  // gradient row it receives (mirrored at the last row).
  int iv_writes;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          iv_writes <= 0;
    else if (load_start) iv_writes <= 0;
    else if (iv_wr_en)   iv_writes <= iv_writes + 1;
  end

  a_init_ahead: assert property (@(posedge clk) disable iff (!rst_n)
    g_valid |-> iv_writes >= ((int'(g_y) + 2 > H) ? H : int'(g_y) + 2) * W)
    else $error("initial values not ready for gradient row %0d", g_y);

  // sequencing: all units start together; the first sweep follows the
  // gradient stream, the remaining sweeps run once the block is loaded.
  assign load_start = (state == S_IDLE) && start;
  assign mc_start   = load_start;
  assign busy       = (state != S_IDLE) || out_valid;
  assign iterating  = (state == S_ITER);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      grad_done_seen <= 1'b0;
      init_done_seen <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_LOAD;
          grad_done_seen <= 1'b0;
          init_done_seen <= 1'b0;
        end
        S_LOAD: begin
          if (g_done)  grad_done_seen <= 1'b1;
          if (iv_done) init_done_seen <= 1'b1;
          if (mc_done) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else if ((grad_done_seen || g_done) && (init_done_seen || iv_done))
            state <= S_ITER;
        end
        S_ITER: if (mc_done) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
