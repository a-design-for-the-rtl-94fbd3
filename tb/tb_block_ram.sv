// tb_block_ram: self-checking test of the block memory.
// Fills a small memory with pseudo-random words through the write port and
// reads every address back through all read ports against a reference copy;
// then overwrites random addresses through both write ports at once (port A
// taking precedence when both hit the same word) and checks again.
module tb_block_ram;
  localparam int DW = 36, DEPTH = 300, NRD = 3, AW = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [AW-1:0] wr_addr;
  logic [DW-1:0] wr_data;
  logic we_b;
  logic [AW-1:0] wr_addr_b;
  logic [DW-1:0] wr_data_b;
  logic [AW-1:0] rd_addr [NRD];
  logic [DW-1:0] rd_data [NRD];
  logic [DW-1:0] refm [DEPTH];
  int checks = 0, failures = 0;

  block_ram #(.DW(DW), .DEPTH(DEPTH), .NRD(NRD)) dut (.*);

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a < DEPTH; a++) begin
      for (int k = 0; k < NRD; k++) rd_addr[k] = AW'((a + k*7) % DEPTH);
      #1;
      for (int k = 0; k < NRD; k++) begin
        checks++;
        if (rd_data[k] !== refm[(a + k*7) % DEPTH]) failures++;
      end
    end
  endtask

  initial begin
    we = 0; wr_addr = 0; wr_data = 0; we_b = 0; wr_addr_b = 0; wr_data_b = 0;
    for (int k = 0; k < NRD; k++) rd_addr[k] = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; wr_addr = AW'(a); wr_data = {4'($urandom), $urandom};
      refm[a] = wr_data;
    end
    @(negedge clk); we = 0;
    check_all();
    for (int n = 0; n < 400; n++) begin
      int a, b;
      a = $urandom % DEPTH;
      b = (n % 8 == 0) ? a : $urandom % DEPTH;   // some same-word collisions
      @(negedge clk);
      we   = ($urandom % 4 != 0); wr_addr   = AW'(a); wr_data   = {4'($urandom), $urandom};
      we_b = ($urandom % 4 != 0); wr_addr_b = AW'(b); wr_data_b = {4'($urandom), $urandom};
      if (we_b) refm[b] = wr_data_b;
      if (we)   refm[a] = wr_data;
    end
    @(negedge clk); we = 0; we_b = 0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
