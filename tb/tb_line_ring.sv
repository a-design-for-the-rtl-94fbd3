// tb_line_ring: self-checking test of the circular line buffer.
// Writes several rows of pseudo-random words into a 4-line ring, keeps a
// reference copy of the rows, and checks every read port against it,
// including that a row is overwritten after LINES newer rows.
module tb_line_ring;
  localparam int DW = 24, LINES = 4, LW = 20, NRD = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [1:0] wr_slot;
  logic [4:0] wr_x;
  logic [DW-1:0] wr_data;
  logic [1:0] rd_slot [NRD];
  logic [4:0] rd_x [NRD];
  logic [DW-1:0] rd_data [NRD];
  int checks = 0, failures = 0;
  logic [DW-1:0] ref_rows [16][LW];

  line_ring #(.DW(DW), .LINES(LINES), .LINE_W(LW), .NRD(NRD)) dut (.*);

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wr_slot = 0; wr_x = 0; wr_data = 0;
    for (int k = 0; k < NRD; k++) begin rd_slot[k] = 0; rd_x[k] = 0; end
    for (int row = 0; row < 10; row++) begin
      for (int x = 0; x < LW; x++) begin
        @(negedge clk);
        we = 1; wr_slot = 2'(row % LINES); wr_x = 5'(x);
        wr_data = DW'($urandom);
        ref_rows[row][x] = wr_data;
      end
      @(negedge clk); we = 0;
      // all rows still held: row-LINES+1 .. row
      for (int r = (row - LINES + 1 < 0 ? 0 : row - LINES + 1); r <= row; r++)
        for (int x = 0; x < LW; x++) begin
          rd_slot[0] = 2'(r % LINES); rd_x[0] = 5'(x);
          rd_slot[1] = 2'(r % LINES); rd_x[1] = 5'(LW - 1 - x);
          #1;
          checks++;
          if (rd_data[0] !== ref_rows[r][x] || rd_data[1] !== ref_rows[r][LW-1-x]) begin
            failures++;
            if (failures < 5) $display("mismatch row %0d x %0d", r, x);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
