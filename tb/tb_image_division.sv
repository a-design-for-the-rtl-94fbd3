// tb_image_division: runs the image division experiment on a small frame.
// One 96 x 24 frame of a diverging (zooming) scene, whose true flow varies
// from pixel to pixel, is processed three ways by the same RTL:
//   - as a single 96 x 24 block (reference, no division);
//   - as two 64-pixel-wide blocks 32 pixels apart (16 overlap pixels on
//     each side of the cut at x = 48, as in the original design);
//   - as two 48-pixel-wide blocks without overlap.
// Checks: every run ends with done and W*H outputs per block; the undivided
// and overlapped flows are close to the truth; at the block seam the
// overlapped flow is closer to the truth and to the undivided flow than
// the flow without overlap, and not more than 0.05 px rms worse than the
// undivided one. The results are not bit-identical: with a fixed number of
// sweeps the solution is not fully converged, and within one sweep
// information travels along the whole block. The rms errors are printed.
module tb_image_division;
  import of_pkg::*;
  localparam int FW = 96, FH = 24;
  localparam real S = 0.02;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, go = 0;
  logic fin_one, fin_ovl, fin_cut;
  int   n_one, n_ovl, n_cut;
  int   checks = 0, failures = 0;

  div_runner #(.FW(FW), .FH(FH), .W(96), .NB(1), .STEPX(96), .S(S)) r_one (
    .clk, .rst_n, .go, .finished(fin_one), .nout(n_one));
  div_runner #(.FW(FW), .FH(FH), .W(64), .NB(2), .STEPX(32), .S(S)) r_ovl (
    .clk, .rst_n, .go, .finished(fin_ovl), .nout(n_ovl));
  div_runner #(.FW(FW), .FH(FH), .W(48), .NB(2), .STEPX(48), .S(S)) r_cut (
    .clk, .rst_n, .go, .finished(fin_cut), .nout(n_cut));

  initial begin
    #(64'd5_000_000_000) failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // flow of run r (0 undivided, 1 overlapped, 2 no overlap) at (x, y)
  function automatic real get_u(int r, int x, int y);
    return (r == 0) ? r_one.fu[y][x] : (r == 1) ? r_ovl.fu[y][x] : r_cut.fu[y][x];
  endfunction
  function automatic real get_v(int r, int x, int y);
    return (r == 0) ? r_one.fv[y][x] : (r == 1) ? r_ovl.fv[y][x] : r_cut.fv[y][x];
  endfunction

  // rms difference over columns x0..x1-1, rows 2..FH-3, between run r and
  // run q, or the true flow when q < 0
  function automatic real rms_diff(int r, int q, int x0, int x1);
    real e2, du, dv;
    int  n;
    e2 = 0.0; n = 0;
    for (int y = 2; y < FH - 2; y++)
      for (int x = x0; x < x1; x++) begin
        if (q < 0) begin
          du = get_u(r, x, y) - S * (real'(x) - real'(FW - 1) / 2.0);
          dv = get_v(r, x, y) - S * (real'(y) - real'(FH - 1) / 2.0);
        end else begin
          du = get_u(r, x, y) - get_u(q, x, y);
          dv = get_v(r, x, y) - get_v(q, x, y);
        end
        e2 += du*du + dv*dv; n++;
      end
    return $sqrt(e2 / n);
  endfunction

  initial begin
    real t_one, t_ovl, t_cut, s_one, s_ovl, s_cut, d_ovl, d_cut;
    repeat (3) @(negedge clk); rst_n = 1; go = 1;
    wait (fin_one && fin_ovl && fin_cut);
    repeat (2) @(negedge clk);
    t_one = rms_diff(0, -1, 2, FW - 2);
    t_ovl = rms_diff(1, -1, 2, FW - 2);
    t_cut = rms_diff(2, -1, 2, FW - 2);
    s_one = rms_diff(0, -1, 44, 52);
    s_ovl = rms_diff(1, -1, 44, 52);
    s_cut = rms_diff(2, -1, 44, 52);
    d_ovl = rms_diff(1, 0, 44, 52);
    d_cut = rms_diff(2, 0, 44, 52);
    $display("error against the true flow, whole frame: undivided %f, overlapped %f, no overlap %f px",
             t_one, t_ovl, t_cut);
    $display("error against the true flow, seam columns 44..51: undivided %f, overlapped %f, no overlap %f px",
             s_one, s_ovl, s_cut);
    $display("difference from the undivided flow at the seam: overlapped %f, no overlap %f px",
             d_ovl, d_cut);
    checks++; if (n_one != 96*FH || n_ovl != 2*64*FH || n_cut != 2*48*FH) failures++;
    checks++; if (t_one > 0.3 || t_ovl > 0.3) failures++;
    checks++; if (s_ovl > s_cut) failures++;
    checks++; if (d_ovl > d_cut) failures++;
    checks++; if (s_ovl > s_one + 0.05) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
