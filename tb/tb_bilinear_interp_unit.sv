// tb_bilinear_interp_unit: self-checking test of the bilinear interpolation
// unit. Writes random upper-layer flows into both banks, then queries every
// lower-layer pixel of both banks on both ports and compares with a
// reference: twice the bilinear mean of the upper samples at (x/2, y/2)
// and their right/lower neighbours for odd coordinates (clamped at the
// edge). Also checks that the banks are independent.
module tb_bilinear_interp_unit;
  import of_pkg::*;
  localparam int WU = 8, HU = 5, NQ = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en, wr_bank;
  coord_t wr_x, wr_y;
  flow2_t wr_flow;
  logic q_bank [NQ];
  coord_t q_x [NQ], q_y [NQ];
  flow2_t q_flow [NQ];
  int checks = 0, failures = 0;
  int ru [2][HU][WU], rv [2][HU][WU];

  bilinear_interp_unit #(.WU(WU), .HU(HU), .NQ(NQ)) dut (.*);

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int floordiv2(int s);
    return (s >= 0) ? s / 2 : -((-s + 1) / 2);
  endfunction

  function automatic int interp(int b, int x, int y, bit is_v);
    int x0 = x / 2, y0 = y / 2;
    int x1 = (x % 2 == 1 && x0 + 1 < WU) ? x0 + 1 : x0;
    int y1 = (y % 2 == 1 && y0 + 1 < HU) ? y0 + 1 : y0;
    int s;
    if (is_v) s = rv[b][y0][x0] + rv[b][y0][x1] + rv[b][y1][x0] + rv[b][y1][x1];
    else      s = ru[b][y0][x0] + ru[b][y0][x1] + ru[b][y1][x0] + ru[b][y1][x1];
    return floordiv2(s);
  endfunction

  initial begin
    wr_en = 0; wr_bank = 0; wr_x = 0; wr_y = 0; wr_flow = '0;
    for (int k = 0; k < NQ; k++) begin q_bank[k] = 0; q_x[k] = 0; q_y[k] = 0; end
    for (int b = 0; b < 2; b++)
      for (int y = 0; y < HU; y++)
        for (int x = 0; x < WU; x++) begin
          @(negedge clk);
          wr_en = 1; wr_bank = b[0]; wr_x = coord_t'(x); wr_y = coord_t'(y);
          ru[b][y][x] = int'($signed($urandom % 2001)) - 1000;
          rv[b][y][x] = int'($signed($urandom % 2001)) - 1000;
          wr_flow.u = flow_val_t'(ru[b][y][x]);
          wr_flow.v = flow_val_t'(rv[b][y][x]);
        end
    @(negedge clk); wr_en = 0;
    for (int b = 0; b < 2; b++)
      for (int y = 0; y < 2*HU; y++)
        for (int x = 0; x < 2*WU; x++) begin
          q_bank[0] = b[0];  q_x[0] = coord_t'(x); q_y[0] = coord_t'(y);
          q_bank[1] = ~b[0]; q_x[1] = coord_t'(2*WU-1-x); q_y[1] = coord_t'(y);
          #1;
          checks++;
          if (int'(q_flow[0].u) != interp(b, x, y, 0) || int'(q_flow[0].v) != interp(b, x, y, 1)) begin
            failures++;
            if (failures < 5) $display("bank %0d (%0d,%0d): got %0d,%0d exp %0d,%0d", b, x, y,
              q_flow[0].u, q_flow[0].v, interp(b, x, y, 0), interp(b, x, y, 1));
          end
          checks++;
          if (int'(q_flow[1].u) != interp(1-b, 2*WU-1-x, y, 0) ||
              int'(q_flow[1].v) != interp(1-b, 2*WU-1-x, y, 1)) failures++;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
