// tb_init_value_gen: self-checking test of initial value generation in both
// modes. UPPER: a 12 x 8 previous-flow raster must produce 6 x 4 writes of
// the even-row/even-column flows halved by an arithmetic shift, xi = 0.
// LOWER: every pixel must be written with previous flow minus the
// propagation flow returned for the requested coordinates (modelled here as
// a function of x and y), xi = 0. Checks addresses, data, counts, done.
module tb_init_value_gen;
  import of_pkg::*;
  localparam int W = 12, H = 8;
  localparam int AWU = $clog2((W/2)*(H/2)), AWL = $clog2(W*H);
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start;
  logic in_valid;
  flow2_t in_flow;
  // upper instance
  logic u_ready, u_wr_en, u_done;
  logic [AWU-1:0] u_wr_addr;
  flow3_t u_wr_data;
  coord_t u_px, u_py;
  // lower instance
  logic l_ready, l_wr_en, l_done;
  logic [AWL-1:0] l_wr_addr;
  flow3_t l_wr_data;
  coord_t l_px, l_py;
  flow2_t l_prop;
  int checks = 0, failures = 0;
  int fu [H][W], fv [H][W];
  int nu = 0, nl = 0, ndu = 0, ndl = 0;

  init_value_gen #(.UPPER(1'b1), .W(W), .H(H)) dut_u (
    .clk, .rst_n, .start, .in_valid, .in_ready(u_ready), .in_flow,
    .prop_x(u_px), .prop_y(u_py), .prop_flow('0),
    .wr_en(u_wr_en), .wr_addr(u_wr_addr), .wr_data(u_wr_data), .done(u_done));
  init_value_gen #(.UPPER(1'b0), .W(W), .H(H)) dut_l (
    .clk, .rst_n, .start, .in_valid, .in_ready(l_ready), .in_flow,
    .prop_x(l_px), .prop_y(l_py), .prop_flow(l_prop),
    .wr_en(l_wr_en), .wr_addr(l_wr_addr), .wr_data(l_wr_data), .done(l_done));

  function automatic int pu(int x, int y); return 7*x - 5*y - 20; endfunction
  function automatic int pv(int x, int y); return -3*x + 11*y + 4; endfunction
  assign l_prop.u = flow_val_t'(pu(int'(l_px), int'(l_py)));
  assign l_prop.v = flow_val_t'(pv(int'(l_px), int'(l_py)));

  function automatic int half(int a); return (a >= 0) ? a / 2 : -((-a + 1) / 2); endfunction

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (u_wr_en) begin
      int x, y;
      x = 2 * (nu % (W/2)); y = 2 * (nu / (W/2));
      checks++;
      if (int'(u_wr_addr) != nu || int'(u_wr_data.u) != half(fu[y][x]) ||
          int'(u_wr_data.v) != half(fv[y][x]) || u_wr_data.xi != 0) begin
        failures++;
        if (failures < 5) $display("upper %0d: got %0d,%0d exp %0d,%0d", nu, u_wr_data.u, u_wr_data.v, half(fu[y][x]), half(fv[y][x]));
      end
      nu++;
    end
    if (l_wr_en) begin
      int x, y;
      x = nl % W; y = nl / W;
      checks++;
      if (int'(l_wr_addr) != nl || int'(l_wr_data.u) != fu[y][x] - pu(x, y) ||
          int'(l_wr_data.v) != fv[y][x] - pv(x, y) || l_wr_data.xi != 0) begin
        failures++;
        if (failures < 5) $display("lower %0d mismatch", nl);
      end
      nl++;
    end
    if (u_done) ndu++;
    if (l_done) ndl++;
  end

  initial begin
    rst_n = 0; start = 0; in_valid = 0; in_flow = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      fu[y][x] = int'($signed($urandom % 4001)) - 2000;
      fv[y][x] = int'($signed($urandom % 4001)) - 2000;
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      while ($urandom % 4 == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_flow.u = flow_val_t'(fu[y][x]); in_flow.v = flow_val_t'(fv[y][x]);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++; if (nu != (W/2)*(H/2)) begin failures++; $display("upper writes %0d", nu); end
    checks++; if (nl != W*H) begin failures++; $display("lower writes %0d", nl); end
    checks++; if (ndu != 1 || ndl != 1) failures++;
    checks++; if (u_ready || l_ready) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
