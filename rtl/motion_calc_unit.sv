// motion_calc_unit: iterative flow solver of one layer (motion calculation
// unit).
//
// Solves the HOE linear system for the flow (u,v) and luminance change xi
// of every pixel of a block with the Gauss-Seidel method and successive
// over-relaxation (SOR):
//   N   = Ix*ubar + Iy*vbar + It + xibar
//   D   = alpha^2 + Ix^2 + Iy^2 + lambda^2
//   u  += w*((ubar - Ix*N/D) - u),  v += w*((vbar - Iy*N/D) - v),
//   xi += w*((xibar - lambda^2*N/D) - xi),   with w = 1.75,
// where each bar is the mean of the four diagonal neighbours. Pixels are
// scanned in raster order, one per cycle, and results are written back in
// place LAT = 12 cycles after the pixel is issued. The first sweep is driven
// by the gradient stream itself (s_valid/s_x/s_y/s_grad): a pixel is issued
// as soon as its gradient leaves the gradient unit, as in the original
// pipeline where the motion calculation starts right after the luminance
// gradient. Later sweeps run from internal counters, one pixel per cycle,
// and read the gradients back from the gradient memory. Because the average uses
// only diagonal neighbours, the row above was already rewritten (values of
// the current sweep) while the row below still holds the previous sweep:
// this is the Gauss-Seidel ordering, and it lets the pipeline issue a new
// pixel every cycle since no pixel depends on its left neighbour. This needs
// W >= LAT + 2 so that the upper-right neighbour is written before it is read.
// Multiplying by w = 1.75 is done as 2d - d/4 (shifts only).
//
// Own choices: the fixed-point formats of of_pkg, N/D as a truncating
// division with QF extra fractional bits, floor rounding of the averages,
// saturation of results, and mirroring of neighbour coordinates at the
// block borders (row -1 reads row 1, column -1 reads column 1). Mirroring
// keeps every neighbour out of the pixel's own row, so the result is the
// same in-place Gauss-Seidel sweep whatever gaps the input stream has.
//
// Interface: start begins NITER sweeps over the W x H block; the first sweep
// consumes the raster-ordered gradient stream s_* (gaps allowed), which the
// caller also writes into the gradient memory. The caller must have written
// the initial values of rows up to y+1 before pixel row y arrives on s_*.
// Afterwards the unit reads gradients (g_addr/g_data) and the motion memory (m_addr[5]/m_data[5],
// order: own, upper-left, upper-right, lower-left, lower-right) through
// combinational read ports, and writes through wr_en/wr_addr/wr_data;
// wr_last marks writes of the final sweep, wr_x/wr_y give the pixel.
// done pulses one cycle after the last write.
module motion_calc_unit
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
  input  logic              s_valid,
  input  coord_t            s_x,
  input  coord_t            s_y,
  input  grad_t             s_grad,
  output logic              busy,
  output logic              done,
  output logic [AW-1:0]     g_addr,
  input  grad_t             g_data,
  output logic [AW-1:0]     m_addr [5],
  input  flow3_t            m_data [5],
  output logic              wr_en,
  output logic [AW-1:0]     wr_addr,
  output coord_t            wr_x,
  output coord_t            wr_y,
  output flow3_t            wr_data,
  output logic              wr_last
);

  localparam int QF = 8;

  // ---------------- issue ----------------
  logic issuing, issue;
  int   cx, cy, ck;
  int   inflight;
  int   px, py;                     // pixel being issued
  grad_t g_issue;

  assign issue   = issuing && ((ck == 0) ? s_valid : 1'b1);
  assign px      = (ck == 0) ? int'(s_x) : cx;
  assign py      = (ck == 0) ? int'(s_y) : cy;
  assign g_issue = (ck == 0) ? s_grad : g_data;

  always_comb begin
    int xl, xr, yu, yd;
    // mirrored at the block border: a neighbour is never in the pixel's own
    // row, so every read is either settled (row above) or untouched (row below)
    xl = (px == 0)   ? 1   : px - 1;
    xr = (px == W-1) ? W-2 : px + 1;
    yu = (py == 0)   ? 1   : py - 1;
    yd = (py == H-1) ? H-2 : py + 1;
    g_addr    = AW'(py*W + px);
    m_addr[0] = AW'(py*W + px);
    m_addr[1] = AW'(yu*W + xl);
    m_addr[2] = AW'(yu*W + xr);
    m_addr[3] = AW'(yd*W + xl);
    m_addr[4] = AW'(yd*W + xr);
  end

  // ---------------- stage registers ----------------
  typedef struct packed {
    logic          vld;
    logic          last;
    logic [AW-1:0] addr;
    coord_t        x;
    coord_t        y;
  } tag_t;

  tag_t tag [LAT+1];     // tag[k] belongs to the result of stage k

  // stage 1
  grad_t  s1_g;
  flow3_t s1_own;
  flow3_t s1_d [4];
  // stage 2
  grad_t  s2_g;
  flow3_t s2_own, s2_avg;
  // stage 3
  grad_t  s3_g;
  flow3_t s3_own, s3_avg;
  logic signed [47:0] s3_n, s3_d;
  // stage 4
  grad_t  s4_g;
  flow3_t s4_own, s4_avg;
  logic signed [47:0] s4_q;
  // stage 5 and delay to LAT
  flow3_t res [5:LAT];

  function automatic flow_val_t avg4(input flow_val_t a, input flow_val_t b,
                                     input flow_val_t c, input flow_val_t d);
    logic signed [FLOW_W+1:0] s;
    s = (FLOW_W+2)'(a) + (FLOW_W+2)'(b) + (FLOW_W+2)'(c) + (FLOW_W+2)'(d);
    return flow_val_t'(s >>> 2);
  endfunction

  // SOR update of one component: own + 1.75*(target - own), target = avg - corr
  function automatic flow_val_t sor(input flow_val_t own, input flow_val_t avg,
                                    input logic signed [63:0] corr);
    logic signed [63:0] d;
    d = 64'(avg) - corr - 64'(own);
    return sat_flow(64'(own) + (d <<< 1) - (d >>> 2));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      cx <= 0; cy <= 0; ck <= 0;
      inflight <= 0;
      done <= 1'b0;
      for (int k = 0; k <= LAT; k++) tag[k] <= '0;
      s1_g <= '0; s1_own <= '0;
      for (int k = 0; k < 4; k++) s1_d[k] <= '0;
      s2_g <= '0; s2_own <= '0; s2_avg <= '0;
      s3_g <= '0; s3_own <= '0; s3_avg <= '0; s3_n <= '0; s3_d <= '0;
      s4_g <= '0; s4_own <= '0; s4_avg <= '0; s4_q <= '0;
      for (int k = 5; k <= LAT; k++) res[k] <= '0;
    end else begin
      done <= 1'b0;
      // issue counters
      if (start && !busy) begin
        issuing <= 1'b1;
        cx <= 0; cy <= 0; ck <= 0;
      end else if (issue) begin
        if (cx == W-1) begin
          cx <= 0;
          if (cy == H-1) begin
            cy <= 0;
            if (ck == NITER-1) issuing <= 1'b0;
            else               ck <= ck + 1;
          end else cy <= cy + 1;
        end else cx <= cx + 1;
      end
      // pipeline occupancy, for done
      inflight <= inflight + (issue ? 1 : 0) - (tag[LAT].vld ? 1 : 0);
      if (!issuing && inflight == 1 && tag[LAT].vld) done <= 1'b1;

      // tags
      tag[0] <= '0;
      tag[1] <= '{vld: issue, last: (ck == NITER-1), addr: AW'(py*W + px),
                  x: coord_t'(px), y: coord_t'(py)};
      for (int k = 2; k <= LAT; k++) tag[k] <= tag[k-1];

      // stage 1: capture reads
      s1_g   <= g_issue;
      s1_own <= m_data[0];
      for (int k = 0; k < 4; k++) s1_d[k] <= m_data[k+1];
      // stage 2: diagonal averages
      s2_g   <= s1_g;
      s2_own <= s1_own;
      s2_avg.u  <= avg4(s1_d[0].u,  s1_d[1].u,  s1_d[2].u,  s1_d[3].u);
      s2_avg.v  <= avg4(s1_d[0].v,  s1_d[1].v,  s1_d[2].v,  s1_d[3].v);
      s2_avg.xi <= avg4(s1_d[0].xi, s1_d[1].xi, s1_d[2].xi, s1_d[3].xi);
      // stage 3: numerator and denominator
      s3_g   <= s2_g;
      s3_own <= s2_own;
      s3_avg <= s2_avg;
      s3_n   <= 48'(s2_g.ix) * 48'(s2_avg.u) + 48'(s2_g.iy) * 48'(s2_avg.v)
              + (48'(s2_g.it) <<< FLOW_F) + (48'(s2_avg.xi) <<< GRAD_F);
      s3_d   <= 48'(s2_g.ix) * 48'(s2_g.ix) + 48'(s2_g.iy) * 48'(s2_g.iy)
              + 48'($signed({1'b0, alpha2})) + 48'($signed({1'b0, lambda2}));
      // stage 4: quotient N/D with QF fractional bits
      s4_g   <= s3_g;
      s4_own <= s3_own;
      s4_avg <= s3_avg;
      s4_q   <= (s3_d == 0) ? 48'sd0 : (s3_n <<< QF) / s3_d;
      // stage 5: SOR update
      res[5].u  <= sor(s4_own.u,  s4_avg.u,  (64'(s4_g.ix) * 64'(s4_q)) >>> QF);
      res[5].v  <= sor(s4_own.v,  s4_avg.v,  (64'(s4_g.iy) * 64'(s4_q)) >>> QF);
      res[5].xi <= sor(s4_own.xi, s4_avg.xi,
                       (64'($signed({1'b0, lambda2})) * 64'(s4_q)) >>> (QF + GRAD_F));
      for (int k = 6; k <= LAT; k++) res[k] <= res[k-1];
    end
  end

  assign busy    = issuing || (inflight != 0);
  assign wr_en   = tag[LAT].vld;
  assign wr_addr = tag[LAT].addr;
  assign wr_x    = tag[LAT].x;
  assign wr_y    = tag[LAT].y;
  assign wr_last = tag[LAT].last;
  assign wr_data = res[LAT];

  // Gauss-Seidel in-place update relies on the row above being written
  // before it is read again.
  // The first sweep expects the gradient stream in raster order.
  a_stream_order: assert property (@(posedge clk) disable iff (!rst_n)
      (issuing && ck == 0 && s_valid) |-> (int'(s_x) == cx && int'(s_y) == cy))
    else $error("motion_calc_unit: gradient stream out of raster order");

  initial assert (W >= LAT + 2 && H >= 3)
    else $error("motion_calc_unit: block too small for the pipeline");

endmodule
