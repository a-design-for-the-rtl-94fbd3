// mc_unit: motion compensation image creation unit of the lower layer.
//
// Warps frames t-1 and t+1 of the source block onto frame t with the
// propagation flow (p_u, p_v) from the upper layer:
//   CF(x,y) = I(x - p_u, y - p_v, t-1),   CB(x,y) = I(x + p_u, y + p_v, t+1),
// sampling sub-pixel positions by bilinear interpolation of the four
// surrounding integer pixels. The source rows are kept in an eight-row
// line buffer (the lower layer's original image memory); the output for
// row y is produced while row y+4 is written, so output starts with the
// ninth row, and the rows y-3 .. y+3 are available for sampling.
//
// Own choices: the vertical displacement is clamped to [-3, 3) pixels so
// the sample stays inside the eight buffered rows, sample positions are
// clamped into the block, interpolation weights have FLOW_F fractional
// bits and the result is rounded to the nearest integer. After the last
// input pixel the unit drains four more rows by itself.
//
// Interface: start arms the unit for one W x H block; in_valid/in_ready
// carries (t-1, t, t+1) pixels in raster order. q_x/q_y ask for the
// propagation flow of the pixel being produced and q_flow must answer in the
// same cycle. out_valid/out_x/out_y/out_pix (prev = CF, cur = t,
// next = CB) is registered one cycle after its beat; done pulses with the
// last output.
module mc_unit
  import of_pkg::*;
#(
  parameter int W = 244,
  parameter int H = 192
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   in_valid,
  output logic   in_ready,
  input  pix3_t  in_pix,
  output coord_t q_x,
  output coord_t q_y,
  input  flow2_t q_flow,
  output logic   clamp_hit,     // a vertical displacement was clamped
  output logic   out_valid,
  output coord_t out_x,
  output coord_t out_y,
  output pix3_t  out_pix,
  output logic   done
);

  localparam int R     = 3;
  localparam int LINES = 2*R + 2;
  localparam int SW    = $clog2(LINES);
  localparam int XW    = (W > 1) ? $clog2(W) : 1;
  localparam int NRD   = 9;
  localparam int ONE   = 1 << FLOW_F;
  localparam int DMAX  = R*ONE - 1;
  localparam int DMIN  = -R*ONE;

  logic active;
  int   sx, sy, oy;
  logic step;

  assign in_ready = active && (sy < H);
  assign step     = active && ((sy < H) ? in_valid : 1'b1);
  assign oy       = sy - (R + 1);
  assign q_x      = coord_t'(sx);
  assign q_y      = coord_t'((oy < 0) ? 0 : oy);

  logic [SW-1:0] rd_slot [NRD];
  logic [XW-1:0] rd_x    [NRD];
  logic [23:0]   rd_data [NRD];

  line_ring #(.DW(24), .LINES(LINES), .LINE_W(W), .NRD(NRD)) u_src_mem (
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

  // Sample position of one warped frame: sign = -1 for CF, +1 for CB.
  // Returns {x0, x1, y0, y1, fx, fy} through outputs.
  typedef struct packed {
    int x0, x1, y0, y1, fx, fy;
    logic clamped;
  } samp_t;

  function automatic samp_t samp(input int sign, input int px, input int py,
                                 input flow2_t f);
    samp_t s;
    int dx, dy, posx, posy;
    dx = sign * int'(f.u);
    dy = sign * int'(f.v);
    s.clamped = (dy > DMAX) || (dy < DMIN);
    dy = clampi(dy, DMIN, DMAX);
    posx = clampi(px * ONE + dx, 0, (W-1) * ONE);
    posy = clampi(py * ONE + dy, 0, (H-1) * ONE);
    s.x0 = posx >> FLOW_F;  s.fx = posx & (ONE-1);
    s.y0 = posy >> FLOW_F;  s.fy = posy & (ONE-1);
    s.x1 = (s.x0 + 1 > W-1) ? W-1 : s.x0 + 1;
    s.y1 = (s.y0 + 1 > H-1) ? H-1 : s.y0 + 1;
    return s;
  endfunction

  function automatic pix_t blerp(input pix_t p00, input pix_t p01,
                                 input pix_t p10, input pix_t p11,
                                 input int fx, input int fy);
    int acc;
    acc = int'(p00) * (ONE-fx) * (ONE-fy) + int'(p01) * fx * (ONE-fy)
        + int'(p10) * (ONE-fx) * fy       + int'(p11) * fx * fy;
    return pix_t'((acc + (ONE*ONE/2)) >> (2*FLOW_F));
  endfunction

  samp_t sf, sb;
  pix3_t res;
  pix3_t rp [NRD];
  always_comb for (int k = 0; k < NRD; k++) rp[k] = pix3_t'(rd_data[k]);
  always_comb begin
    int yc;
    yc = (oy < 0) ? 0 : oy;
    sf = samp(-1, sx, yc, q_flow);
    sb = samp(+1, sx, yc, q_flow);
    rd_slot[0] = SW'(sf.y0 % LINES); rd_x[0] = XW'(sf.x0);
    rd_slot[1] = SW'(sf.y0 % LINES); rd_x[1] = XW'(sf.x1);
    rd_slot[2] = SW'(sf.y1 % LINES); rd_x[2] = XW'(sf.x0);
    rd_slot[3] = SW'(sf.y1 % LINES); rd_x[3] = XW'(sf.x1);
    rd_slot[4] = SW'(sb.y0 % LINES); rd_x[4] = XW'(sb.x0);
    rd_slot[5] = SW'(sb.y0 % LINES); rd_x[5] = XW'(sb.x1);
    rd_slot[6] = SW'(sb.y1 % LINES); rd_x[6] = XW'(sb.x0);
    rd_slot[7] = SW'(sb.y1 % LINES); rd_x[7] = XW'(sb.x1);
    rd_slot[8] = SW'(yc % LINES);    rd_x[8] = XW'(sx);
  end

  always_comb begin
    res.prev = blerp(rp[0].prev, rp[1].prev,
                     rp[2].prev, rp[3].prev, sf.fx, sf.fy);
    res.next = blerp(rp[4].next, rp[5].next,
                     rp[6].next, rp[7].next, sb.fx, sb.fy);
    res.cur  = rp[8].cur;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      sx <= 0; sy <= 0;
      out_valid <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      out_pix   <= '0;
      clamp_hit <= 1'b0;
      done      <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      clamp_hit <= 1'b0;
      done      <= 1'b0;
      if (start && !active) begin
        active <= 1'b1;
        sx <= 0; sy <= 0;
      end else if (step) begin
        if (oy >= 0) begin
          out_valid <= 1'b1;
          out_x     <= coord_t'(sx);
          out_y     <= coord_t'(oy);
          out_pix   <= res;
          clamp_hit <= sf.clamped || sb.clamped;
        end
        if (sx == W-1) begin
          sx <= 0;
          if (sy == H + R) begin
            sy     <= 0;
            active <= 1'b0;
            done   <= 1'b1;
          end else sy <= sy + 1;
        end else sx <= sx + 1;
      end
    end
  end

endmodule
