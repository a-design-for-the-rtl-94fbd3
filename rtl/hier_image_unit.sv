// hier_image_unit: hierarchical image creation unit of the upper layer.
//
// Takes the source block of the three frames t-1, t, t+1 as a raster stream
// (one pixel of each frame per beat), smooths it with a 5x5 Gaussian filter
// and keeps every second pixel of every second row, giving the
// half-resolution images of the upper layer. The source rows are held in a
// six-row line buffer (the upper layer's original image memory): once five
// rows are stored and the sixth begins, the unit outputs filtered rows,
// following the pipeline of the original design.
//
// Choices of this design: the Gaussian weights are the binomial
// (1,4,6,4,1)x(1,4,6,4,1)/256 with rounding; image borders are handled by
// clamping coordinates into the block; the output pixel (X,Y) is centred on
// source pixel (2X,2Y). After the last input pixel the unit drains the
// remaining rows by itself (three rows of W cycles) and pulses done.
//
// Interface: start arms the unit for one block. in_valid/in_ready is a
// standard handshake. out_valid marks a filtered pixel at out_x/out_y
// (upper-layer coordinates), registered one cycle after the beat that
// produced it.
module hier_image_unit
  import of_pkg::*;
#(
  parameter int W = 244,     // lower-layer block width (even)
  parameter int H = 192      // lower-layer block height (even)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   in_valid,
  output logic   in_ready,
  input  pix3_t  in_pix,
  output logic   out_valid,
  output coord_t out_x,
  output coord_t out_y,
  output pix3_t  out_pix,
  output logic   done
);

  localparam int R     = 2;
  localparam int LINES = 2*R + 2;
  localparam int SW    = $clog2(LINES);
  localparam int XW    = (W > 1) ? $clog2(W) : 1;
  localparam int NRD   = 25;
  localparam int WGT [5] = '{1, 4, 6, 4, 1};

  logic   active;
  int     sx, sy;          // sweep position (source coordinates)
  logic   step;
  int     oy;

  assign in_ready = active && (sy < H);
  assign step     = active && ((sy < H) ? in_valid : 1'b1);
  assign oy       = sy - (R + 1);

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

  // 5x5 window addresses and filter.
  pix3_t filt;
  always_comb begin
    int acc_p, acc_c, acc_n, w, k;
    pix3_t px;
    acc_p = 0; acc_c = 0; acc_n = 0;
    for (int dy = 0; dy < 5; dy++) begin
      for (int dx = 0; dx < 5; dx++) begin
        k = dy*5 + dx;
        rd_slot[k] = SW'(clampi(oy + dy - R, 0, H-1) % LINES);
        rd_x[k]    = XW'(clampi(sx + dx - R, 0, W-1));
      end
    end
    for (int dy = 0; dy < 5; dy++) begin
      for (int dx = 0; dx < 5; dx++) begin
        k  = dy*5 + dx;
        w  = WGT[dy] * WGT[dx];
        px = pix3_t'(rd_data[k]);
        acc_p += w * int'(px.prev);
        acc_c += w * int'(px.cur);
        acc_n += w * int'(px.next);
      end
    end
    filt.prev = pix_t'((acc_p + 128) >> 8);
    filt.cur  = pix_t'((acc_c + 128) >> 8);
    filt.next = pix_t'((acc_n + 128) >> 8);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      sx        <= 0;
      sy        <= 0;
      out_valid <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      out_pix   <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      if (start && !active) begin
        active <= 1'b1;
        sx     <= 0;
        sy     <= 0;
      end else if (step) begin
        if (oy >= 0 && oy[0] == 1'b0 && sx[0] == 1'b0) begin
          out_valid <= 1'b1;
          out_x     <= coord_t'(sx / 2);
          out_y     <= coord_t'(oy / 2);
          out_pix   <= filt;
        end
        if (sx == W-1) begin
          sx <= 0;
          if (sy == H + R) begin
            active <= 1'b0;
            done   <= 1'b1;
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

endmodule
