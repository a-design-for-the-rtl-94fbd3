// tb_hier_image_unit: self-checking test of the hierarchical image unit.
// Streams two random 16 x 12 blocks of three frames (with random input
// gaps), and compares every output pixel with a reference 5x5 binomial
// Gaussian (clamped borders) sampled at even rows and columns. Also checks
// the number and raster order of outputs, the done pulse, and that the first
// output appears one cycle after the first pixel of the fourth row.
module tb_hier_image_unit;
  import of_pkg::*;
  localparam int W = 16, H = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, in_valid, in_ready, out_valid, done;
  pix3_t in_pix, out_pix;
  coord_t out_x, out_y;
  int checks = 0, failures = 0;
  pix3_t img [H][W];
  int cyc = 0, nbeat = 0, beat_cyc = -1, first_out_cyc = -1, nout = 0, ndone = 0;
  int exp_x, exp_y;
  always @(posedge clk) cyc++;

  hier_image_unit #(.W(W), .H(H)) dut (.*);

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : v > hi ? hi : v;
  endfunction
  localparam int WG [5] = '{1, 4, 6, 4, 1};

  function automatic pix3_t gauss(int cx, int cy);
    int a0 = 0, a1 = 0, a2 = 0;
    pix3_t r;
    for (int dy = -2; dy <= 2; dy++)
      for (int dx = -2; dx <= 2; dx++) begin
        pix3_t p = img[clampi(cy+dy,0,H-1)][clampi(cx+dx,0,W-1)];
        int w = WG[dy+2] * WG[dx+2];
        a0 += w * p.prev; a1 += w * p.cur; a2 += w * p.next;
      end
    r.prev = 8'((a0 + 128) / 256); r.cur = 8'((a1 + 128) / 256); r.next = 8'((a2 + 128) / 256);
    return r;
  endfunction

  always @(posedge clk) begin
    if (in_valid && in_ready) begin
      if (nbeat == 3*W) beat_cyc = cyc;   // first pixel of the fourth row
      nbeat++;
    end
    if (out_valid) begin
      pix3_t e;
      if (first_out_cyc < 0) first_out_cyc = cyc;
      e = gauss(2*int'(out_x), 2*int'(out_y));
      checks++;
      if (out_pix !== e || int'(out_x) != exp_x || int'(out_y) != exp_y) begin
        failures++;
        if (failures < 5) $display("mismatch at (%0d,%0d): got %h exp %h", out_x, out_y, out_pix, e);
      end
      nout++;
      exp_x++; if (exp_x == W/2) begin exp_x = 0; exp_y++; end
    end
    if (done) ndone++;
  end

  initial begin
    rst_n = 0; start = 0; in_valid = 0; in_pix = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int blk = 0; blk < 2; blk++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
        img[y][x] = pix3_t'($urandom);
      exp_x = 0; exp_y = 0; nout = 0; nbeat = 0; ndone = 0; beat_cyc = -1; first_out_cyc = -1;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
        if (blk == 1) while ($urandom % 3 == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_pix = img[y][x];
        @(posedge clk); while (!in_ready) @(posedge clk);
        @(negedge clk);
      end
      in_valid = 0;
      while (ndone == 0) @(negedge clk);
      repeat (3) @(negedge clk);
      checks++; if (nout != (W/2)*(H/2)) begin failures++; $display("count %0d", nout); end
      checks++; if (ndone != 1) failures++;
      checks++; if (first_out_cyc != beat_cyc + 1) begin
        failures++; $display("latency: beat %0d first out %0d", beat_cyc, first_out_cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
