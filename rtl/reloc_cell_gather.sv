// reloc_cell_gather: collects the three programming bytes of one 6200 cell.
//
// Programming writes arrive as {address[13:0], data[7:0]}, the address being
// {column[5:0], column_offset[1:0], row[5:0]}. The routing of a cell is spread over
// the bytes at column offsets 00, 01 and 10 (X2 and X3 are split between bytes 01
// and 10), so a cell can only be relocated once all three are known. This block
// holds bytes 00 and 01 and, when byte 10 arrives, emits the whole cell (cell_o) one clock
// later. It assumes each cell's bytes arrive in the order 00, 01, 10 with the same
// column and row; writes with column offset 11 carry no cell routing and are
// dropped (both are this design's choices). At most one write per clock, so at most
// one cell every three clocks.
module reloc_cell_gather
  import reloc6200_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_valid,
  input  logic [13:0] wr_addr,
  input  logic [7:0]  wr_data,
  output logic        cell_valid,
  output cell_t       cell_o
);

  logic [7:0] b0_q, b1_q;
  logic [1:0] ofs;
  coord_t     col, row;

  assign col = wr_addr[13:8];
  assign ofs = wr_addr[7:6];
  assign row = wr_addr[5:0];

  always_ff @(posedge clk) begin
    if (wr_valid && ofs == 2'b00) b0_q <= wr_data;
    if (wr_valid && ofs == 2'b01) b1_q <= wr_data;
    if (wr_valid && ofs == 2'b10) cell_o <= cell_from_bytes(col, row, b0_q, b1_q, wr_data);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cell_valid <= 1'b0;
    else        cell_valid <= wr_valid && ofs == 2'b10;
  end

endmodule
