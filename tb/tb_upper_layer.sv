// tb_upper_layer: end-to-end test of the upper layer module on a 32 x 24
// block (16 x 12 in the upper layer) of a smooth pattern translating by
// (2, -1) pixels per frame, i.e. (1, -0.5) at upper-layer resolution.
// Run 1 starts from a zero previous flow, run 2 from the true flow (the
// previous-frame initial value). Checks: the upper-layer flow written to
// the bilinear memory (one write per pixel, raster order, only in the final
// sweep) approximates the true motion in the interior, run 2 is at least as
// close as run 1, the phase after the block has streamed in lasts
// (NITER-1)*WU*HU + LAT + 1 cycles (the first sweep runs while the block
// streams in), and all input beats are taken.
module tb_upper_layer;
  import of_pkg::*;
  import of_tb_pkg::*;
  localparam int W = 32, H = 24, WU = W/2, HU = H/2, NITER = 24, LAT = 12;
  localparam real TU = 1.0, TV = -0.5;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, pix_valid, pix_ready, prev_valid, prev_ready;
  logic bi_wr_en, busy, iterating, done;
  logic [COEF_W-1:0] alpha2 = 16'd64, lambda2 = 16'd16;
  pix3_t pix_data;
  flow2_t prev_flow, bi_wr_flow;
  coord_t bi_wr_x, bi_wr_y;
  int checks = 0, failures = 0;
  real fu [HU][WU], fv [HU][WU];
  int nwr, order_err, iter_cycles, ndone;
  real err [2];

  upper_layer #(.W(W), .H(H), .NITER(NITER), .LAT(LAT)) dut (.*);

  initial begin
    #50000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (iterating) iter_cycles++;
    if (bi_wr_en) begin
      if (int'(bi_wr_x) != nwr % WU || int'(bi_wr_y) != nwr / WU || !iterating) order_err++;
      fu[bi_wr_y][bi_wr_x] = from_flow(bi_wr_flow.u);
      fv[bi_wr_y][bi_wr_x] = from_flow(bi_wr_flow.v);
      nwr++;
    end
    if (done) ndone++;
  end

  initial begin
    rst_n = 0; start = 0; pix_valid = 0; prev_valid = 0; pix_data = '0; prev_flow = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      nwr = 0; order_err = 0; iter_cycles = 0; ndone = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      fork
        for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
          pix_valid = 1; pix_data = frames(x, y, 0, 0, 2.0*TU, 2.0*TV);
          @(posedge clk); while (!pix_ready) @(posedge clk);
          @(negedge clk); pix_valid = 0;
        end
        for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
          if ($urandom % 2 == 0) @(negedge clk);
          prev_valid = 1;
          prev_flow.u = (run == 1) ? to_flow(2.0*TU) : '0;
          prev_flow.v = (run == 1) ? to_flow(2.0*TV) : '0;
          @(posedge clk); while (!prev_ready) @(posedge clk);
          @(negedge clk); prev_valid = 0;
        end
      join
      while (ndone == 0) @(negedge clk);
      begin
        real e = 0.0;
        int n = 0;
        for (int y = 2; y < HU-2; y++) for (int x = 2; x < WU-2; x++) begin
          e += (fu[y][x] - TU) * (fu[y][x] - TU) + (fv[y][x] - TV) * (fv[y][x] - TV);
          n++;
        end
        err[run] = $sqrt(e / n);
        $display("run %0d: rms flow error %f px, centre flow (%f, %f), iteration cycles %0d",
                 run, err[run], fu[HU/2][WU/2], fv[HU/2][WU/2], iter_cycles);
      end
      checks++; if (nwr != WU*HU || order_err != 0) begin failures++; $display("writes %0d order %0d", nwr, order_err); end
      checks++; if (err[run] > 0.3) failures++;
      checks++; if (iter_cycles != (NITER-1)*WU*HU + LAT + 1) failures++;
      checks++; if (ndone != 1 || busy) failures++;
    end
    checks++; if (err[1] > err[0] + 0.01) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
