// block_ram: block-sized embedded memory with two write ports and NRD
// asynchronous read ports, DEPTH words of DW bits.
//
// It serves as the luminance gradient memory and the motion memory of each
// layer, which hold one value per pixel of the divided block (244 x 192 in
// the lower layer). Thanks to the image division method these memories only
// need one block, not a whole frame. The number of read ports is this
// design's choice: the motion memory is read at five addresses per cycle
// (the pixel and its four diagonal neighbours).
//
// The second write port lets the motion memory take initial values for
// rows ahead while the first sweep writes back rows behind them.
//
// Interface: we/wr_addr/wr_data and we_b/wr_addr_b/wr_data_b write on the
// clock edge (port A wins if both hit the same word); rd_addr[k] gives
// rd_data[k] in the same cycle. Out-of-range addresses read word 0.
module block_ram #(
  parameter int DW    = 48,
  parameter int DEPTH = 46848,
  parameter int NRD   = 1,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic           clk,
  input  logic           we,
  input  logic [AW-1:0]  wr_addr,
  input  logic [DW-1:0]  wr_data,
  input  logic           we_b,
  input  logic [AW-1:0]  wr_addr_b,
  input  logic [DW-1:0]  wr_data_b,
  input  logic [AW-1:0]  rd_addr [NRD],
  output logic [DW-1:0]  rd_data [NRD]
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_b && int'(wr_addr_b) < DEPTH && !(we && wr_addr == wr_addr_b))
      mem[wr_addr_b] <= wr_data_b;
    if (we && int'(wr_addr) < DEPTH) mem[wr_addr] <= wr_data;
  end

  always_comb begin
    for (int k = 0; k < NRD; k++)
      rd_data[k] = (int'(rd_addr[k]) < DEPTH) ? mem[rd_addr[k]] : '0;
  end

endmodule
