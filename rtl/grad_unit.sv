// grad_unit: luminance gradient calculation unit (used in both layers).
//
// Applies a multi-dimensional gradient filter to three co-sited frames
// (t-1, t, t+1 in the upper layer; CF, t, CB in the lower layer) and gives
// the spatial gradients Ix, Iy and the temporal gradient It of each pixel.
// Incoming rows are kept in a four-row line buffer (the hierarchical image
// memory, or the motion compensation image memory): after three rows are
// stored, the start of the fourth row starts the gradient output, one pixel
// per cycle, and each gradient appears LAT cycles after the pixel that
// completes its window (LAT = 6 as in the original pipeline).
//
// The filter taps are this design's choice, since only the filter's kind
// is known: a central difference smoothed by (1,2,1) across the other
// spatial axis and across the three frames for Ix and Iy, and a frame
// difference (t+1)-(t-1) smoothed by (1,2,1)x(1,2,1) for It. Each sum is
// divided by 32 and kept with GRAD_F fractional bits (arithmetic shift,
// rounding toward minus infinity). Borders clamp coordinates into the block.
//
// Interface: start arms the unit for one W x H block; in_valid carries the
// raster stream (no back-pressure, gaps allowed). out_valid/out_x/out_y/
// out_grad give the gradient stream; done pulses with the last output.
module grad_unit
  import of_pkg::*;
#(
  parameter int W   = 244,
  parameter int H   = 192,
  parameter int LAT = 6
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   in_valid,
  input  pix3_t  in_pix,
  output logic   busy,
  output logic   out_valid,
  output coord_t out_x,
  output coord_t out_y,
  output grad_t  out_grad,
  output logic   done
);

  localparam int R     = 1;
  localparam int LINES = 2*R + 2;
  localparam int SW    = $clog2(LINES);
  localparam int XW    = (W > 1) ? $clog2(W) : 1;
  localparam int NRD   = 9;
  localparam int A [3] = '{1, 2, 1};
  localparam int SHIFT = 5 - GRAD_F;

  logic active;
  int   sx, sy, oy;
  logic step;

  assign step = active && ((sy < H) ? in_valid : 1'b1);
  assign oy   = sy - (R + 1);
  assign busy = active;

  logic [SW-1:0] rd_slot [NRD];
  logic [XW-1:0] rd_x    [NRD];
  logic [23:0]   rd_data [NRD];

  line_ring #(.DW(24), .LINES(LINES), .LINE_W(W), .NRD(NRD)) u_line_mem (
    .clk     (clk),
    .we      (step && (sy < H)),
    .wr_slot (SW'(sy % LINES)),
    .wr_x    (XW'(sx)),
    .wr_data (in_pix),
    .rd_slot (rd_slot),
    .rd_x    (rd_x),
    .rd_data (rd_data)
  );

  function automatic int clampi(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  grad_t g_comb;
  always_comb begin
    int sxs, sys, sts;
    pix3_t p [3][3];
    sxs = 0; sys = 0; sts = 0;
    for (int dy = 0; dy < 3; dy++)
      for (int dx = 0; dx < 3; dx++) begin
        rd_slot[dy*3+dx] = SW'(clampi(oy + dy - R, 0, H-1) % LINES);
        rd_x[dy*3+dx]    = XW'(clampi(sx + dx - R, 0, W-1));
        p[dy][dx]        = pix3_t'(rd_data[dy*3+dx]);
      end
    for (int d = 0; d < 3; d++) begin
      // horizontal difference, smoothed along y (index d) and time
      sxs += A[d] * (1 * (int'(p[d][2].prev) - int'(p[d][0].prev))
                   + 2 * (int'(p[d][2].cur)  - int'(p[d][0].cur))
                   + 1 * (int'(p[d][2].next) - int'(p[d][0].next)));
      // vertical difference, smoothed along x (index d) and time
      sys += A[d] * (1 * (int'(p[2][d].prev) - int'(p[0][d].prev))
                   + 2 * (int'(p[2][d].cur)  - int'(p[0][d].cur))
                   + 1 * (int'(p[2][d].next) - int'(p[0][d].next)));
      for (int e = 0; e < 3; e++)
        sts += A[d] * A[e] * (int'(p[d][e].next) - int'(p[d][e].prev));
    end
    g_comb.ix = grad_val_t'(sxs >>> SHIFT);
    g_comb.iy = grad_val_t'(sys >>> SHIFT);
    g_comb.it = grad_val_t'(sts >>> SHIFT);
  end

  // Output delay line: stage 0 is the registered filter result.
  logic   dv [LAT];
  coord_t dx_q [LAT];
  coord_t dy_q [LAT];
  grad_t  dg [LAT];
  logic   dd [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      sx     <= 0;
      sy     <= 0;
      for (int i = 0; i < LAT; i++) begin
        dv[i] <= 1'b0; dd[i] <= 1'b0;
        dx_q[i] <= '0; dy_q[i] <= '0; dg[i] <= '0;
      end
    end else begin
      dv[0] <= 1'b0;
      dd[0] <= 1'b0;
      for (int i = 1; i < LAT; i++) begin
        dv[i] <= dv[i-1]; dd[i] <= dd[i-1];
        dx_q[i] <= dx_q[i-1]; dy_q[i] <= dy_q[i-1]; dg[i] <= dg[i-1];
      end
      if (start && !active) begin
        active <= 1'b1;
        sx     <= 0;
        sy     <= 0;
      end else if (step) begin
        if (oy >= 0) begin
          dv[0]   <= 1'b1;
          dx_q[0] <= coord_t'(sx);
          dy_q[0] <= coord_t'(oy);
          dg[0]   <= g_comb;
        end
        if (sx == W-1) begin
          sx <= 0;
          if (sy == H + R) begin
            active <= 1'b0;
            dd[0]  <= 1'b1;
            sy     <= 0;
          end else begin
            sy <= sy + 1;
          end
        end else begin
          sx <= sx + 1;
        end
      end
    end
  end

  assign out_valid = dv[LAT-1];
  assign out_x     = dx_q[LAT-1];
  assign out_y     = dy_q[LAT-1];
  assign out_grad  = dg[LAT-1];
  assign done      = dd[LAT-1];

endmodule
