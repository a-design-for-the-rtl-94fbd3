// of_top: two-layer optical flow processor (HOE algorithm with
// Gauss-Seidel/SOR iteration and the image division method).
//
// The frame is cut into overlapping blocks of W x H pixels (244 x 192 with
// 15/16 overlap pixels) that are processed one after another. The upper
// layer module and the lower layer module form a two-stage block pipeline:
// in step s the upper layer works on block s while the lower layer works on
// block s-1, using the upper-layer flow of that block from the bilinear
// interpolation memory. A new step starts when both layers have finished
// the current one, so a run of num_blocks blocks takes num_blocks+1 steps.
// The double-banked bilinear interpolation memory (bank = block index mod 2)
// and the step-wise lock of the two layers are this design's choices.
//
// Interface: start with num_blocks begins a run; done pulses at its end.
// up_pix_*/up_prev_* are the upper layer's source pixel (t-1, t, t+1) and
// previous-frame flow streams of a block, lo_pix_*/lo_prev_* the same
// streams for the lower layer (the same block, one step later); all are
// valid/ready, W x H beats in raster order per block, fed from external
// memory. out_* is the final flow of each block (W x H beats, overlap
// included, no back-pressure); out_blk gives its block number. Cropping
// the overlap and placing blocks into the frame is left to the external
// address generator. alpha2/lambda2 are the smoothness weights alpha^2 and
// lambda^2 = (alpha/beta)^2 in units of 2^-(2*GRAD_F).
module of_top
  import of_pkg::*;
#(
  parameter int W        = 244,
  parameter int H        = 192,
  parameter int NITER_UP = 24,
  parameter int NITER_LO = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [15:0]       num_blocks,
  input  logic [COEF_W-1:0] alpha2,
  input  logic [COEF_W-1:0] lambda2,
  input  logic              up_pix_valid,
  output logic              up_pix_ready,
  input  pix3_t             up_pix_data,
  input  logic              up_prev_valid,
  output logic              up_prev_ready,
  input  flow2_t            up_prev_flow,
  input  logic              lo_pix_valid,
  output logic              lo_pix_ready,
  input  pix3_t             lo_pix_data,
  input  logic              lo_prev_valid,
  output logic              lo_prev_ready,
  input  flow2_t            lo_prev_flow,
  output logic              out_valid,
  output logic [15:0]       out_blk,
  output coord_t            out_x,
  output coord_t            out_y,
  output flow2_t            out_flow,
  output logic              up_busy,
  output logic              lo_busy,
  output logic              up_iterating,
  output logic              lo_iterating,
  output logic              mc_clamp,
  output logic              busy,
  output logic              done
);

  logic        running;
  logic [15:0] step, nblk;
  logic        up_start, lo_start, up_done, lo_done;
  logic        up_pending, lo_pending, step_start;

  // upper layer
  logic   bi_wr_en;
  coord_t bi_wr_x, bi_wr_y;
  flow2_t bi_wr_flow;

  upper_layer #(.W(W), .H(H), .NITER(NITER_UP)) u_upper (
    .clk, .rst_n, .start(up_start), .alpha2, .lambda2,
    .pix_valid(up_pix_valid), .pix_ready(up_pix_ready), .pix_data(up_pix_data),
    .prev_valid(up_prev_valid), .prev_ready(up_prev_ready), .prev_flow(up_prev_flow),
    .bi_wr_en, .bi_wr_x, .bi_wr_y, .bi_wr_flow,
    .busy(up_busy), .iterating(up_iterating), .done(up_done)
  );

  // bilinear interpolation unit and memory
  logic   q_bank [3];
  coord_t q_x [3], q_y [3];
  flow2_t q_flow [3];
  logic   lo_bank;

  assign lo_bank = ~step[0];          // lower layer works on block step-1
  always_comb for (int k = 0; k < 3; k++) q_bank[k] = lo_bank;

  bilinear_interp_unit #(.WU(W/2), .HU(H/2), .NQ(3)) u_bilinear (
    .clk, .wr_en(bi_wr_en), .wr_bank(step[0]), .wr_x(bi_wr_x), .wr_y(bi_wr_y),
    .wr_flow(bi_wr_flow), .q_bank, .q_x, .q_y, .q_flow
  );

  // lower layer
  lower_layer #(.W(W), .H(H), .NITER(NITER_LO)) u_lower (
    .clk, .rst_n, .start(lo_start), .alpha2, .lambda2,
    .pix_valid(lo_pix_valid), .pix_ready(lo_pix_ready), .pix_data(lo_pix_data),
    .prev_valid(lo_prev_valid), .prev_ready(lo_prev_ready), .prev_flow(lo_prev_flow),
    .q_x, .q_y, .q_flow,
    .out_valid, .out_x, .out_y, .out_flow, .mc_clamp,
    .busy(lo_busy), .iterating(lo_iterating), .done(lo_done)
  );

  assign out_blk = step - 16'd1;

  // block pipeline sequencer
  assign up_start = step_start && (step < nblk);
  assign lo_start = step_start && (step != 16'd0);
  assign busy     = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running    <= 1'b0;
      step       <= '0;
      nblk       <= '0;
      up_pending <= 1'b0;
      lo_pending <= 1'b0;
      step_start <= 1'b0;
      done       <= 1'b0;
    end else begin
      step_start <= 1'b0;
      done       <= 1'b0;
      if (!running) begin
        if (start && num_blocks != 0) begin
          running    <= 1'b1;
          nblk       <= num_blocks;
          step       <= '0;
          step_start <= 1'b1;
          up_pending <= 1'b1;
          lo_pending <= 1'b0;
        end
      end else if (!step_start) begin
        if (up_done) up_pending <= 1'b0;
        if (lo_done) lo_pending <= 1'b0;
        if ((!up_pending || up_done) && (!lo_pending || lo_done)) begin
          if (step == nblk) begin
            running <= 1'b0;
            done    <= 1'b1;
          end else begin
            step       <= step + 16'd1;
            step_start <= 1'b1;
            up_pending <= (step + 16'd1) < nblk;
            lo_pending <= 1'b1;
          end
        end
      end
    end
  end

endmodule
