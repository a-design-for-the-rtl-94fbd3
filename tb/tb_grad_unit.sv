// tb_grad_unit: self-checking test of the luminance gradient unit.
// Streams two random 16 x 8 blocks of three frames (the second with random
// gaps), computes Ix, Iy, It of every pixel with an independent reference
// of the filter (clamped borders, divide by 32, GRAD_F fractional bits,
// floor), and checks values, raster order, count, the done pulse and the
// six-cycle latency: the output is valid in the sixth cycle counting the
// cycle of the pixel that completes its window as the first.
module tb_grad_unit;
  import of_pkg::*;
  localparam int W = 16, H = 8, LAT = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, in_valid, busy, out_valid, done;
  pix3_t in_pix;
  coord_t out_x, out_y;
  grad_t out_grad;
  int checks = 0, failures = 0;
  pix3_t img [H][W];
  int beat_at [H][W];
  int cyc = 0, nout = 0, ndone = 0, ex, ey, nlat = 0;
  always @(posedge clk) cyc++;

  grad_unit #(.W(W), .H(H), .LAT(LAT)) dut (.*);

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : v > hi ? hi : v;
  endfunction
  function automatic int P(int f, int y, int x);
    pix3_t p = img[clampi(y,0,H-1)][clampi(x,0,W-1)];
    return f == 0 ? int'(p.prev) : f == 1 ? int'(p.cur) : int'(p.next);
  endfunction
  function automatic int floordiv(int a, int b);
    int q = a / b;
    if ((a % b != 0) && (a < 0)) q -= 1;
    return q;
  endfunction
  function automatic grad_t ref_grad(int x, int y);
    int a [3] = '{1, 2, 1};
    int sx = 0, sy = 0, st = 0;
    grad_t g;
    for (int f = 0; f < 3; f++)
      for (int d = -1; d <= 1; d++) begin
        sx += a[f] * a[d+1] * (P(f, y+d, x+1) - P(f, y+d, x-1));
        sy += a[f] * a[d+1] * (P(f, y+1, x+d) - P(f, y-1, x+d));
      end
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        st += a[dy+1] * a[dx+1] * (P(2, y+dy, x+dx) - P(0, y+dy, x+dx));
    // divide by 32 and keep GRAD_F fraction bits, rounding toward -inf
    g.ix = grad_val_t'(floordiv(sx * (1 << GRAD_F), 32));
    g.iy = grad_val_t'(floordiv(sy * (1 << GRAD_F), 32));
    g.it = grad_val_t'(floordiv(st * (1 << GRAD_F), 32));
    return g;
  endfunction

  always @(negedge clk) begin
    if (out_valid) begin
      grad_t e;
      e = ref_grad(int'(out_x), int'(out_y));
      checks++;
      if (out_grad !== e || int'(out_x) != ex || int'(out_y) != ey) begin
        failures++;
        if (failures < 5) $display("mismatch (%0d,%0d) got %h exp %h", out_x, out_y, out_grad, e);
      end
      if (int'(out_y) + 2 < H) begin
        checks++; nlat++;
        if (cyc != beat_at[int'(out_y)+2][int'(out_x)] + LAT - 1) begin
          failures++;
          if (failures < 5) $display("latency at (%0d,%0d): %0d", out_x, out_y, cyc - beat_at[int'(out_y)+2][int'(out_x)]);
        end
      end
      nout++;
      ex++; if (ex == W) begin ex = 0; ey++; end
    end
    if (done) ndone++;
  end

  initial begin
    rst_n = 0; start = 0; in_valid = 0; in_pix = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int blk = 0; blk < 2; blk++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = pix3_t'($urandom);
      ex = 0; ey = 0; nout = 0; ndone = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
        if (blk == 1) while ($urandom % 4 == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_pix = img[y][x];
        beat_at[y][x] = cyc + 1;   // the edge that takes this pixel
        @(negedge clk);
      end
      in_valid = 0;
      while (ndone == 0) @(negedge clk);
      repeat (3) @(negedge clk);
      checks++; if (nout != W*H) begin failures++; $display("count %0d", nout); end
      checks++; if (ndone != 1 || busy) failures++;
    end
    checks++; if (nlat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
