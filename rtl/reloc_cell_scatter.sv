// reloc_cell_scatter: turns one relocated 6200 cell back into three programming writes.
//
// A cell accepted on `cell_valid` is written out on the next three clocks as the
// bytes at column offsets 00, 01 and 10, each with the 14-bit address
// {column, column_offset, row} of the cell's new position. A new cell may be
// accepted in the clock that emits the last byte of the previous one, which
// matches the fastest rate the gather side can deliver (one cell per three writes).
// An assertion flags a cell offered while the previous one is still being written.
module reloc_cell_scatter
  import reloc6200_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cell_valid,
  input  cell_t       cell_i,
  output logic        wr_valid,
  output logic [13:0] wr_addr,
  output logic [7:0]  wr_data
);

  cell_t      cell_q;
  logic [1:0] cnt_q;
  logic       busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      cnt_q  <= 2'd0;
    end else if (cell_valid) begin
      busy_q <= 1'b1;
      cnt_q  <= 2'd0;
    end else if (busy_q) begin
      busy_q <= cnt_q != 2'd2;
      cnt_q  <= cnt_q + 2'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (cell_valid) cell_q <= cell_i;
  end

  assign wr_valid = busy_q;
  assign wr_addr  = {cell_q.col, cnt_q, cell_q.row};
  assign wr_data  = cell_byte(cell_q, cnt_q);

  // A new cell may only arrive when idle or on the last byte of the previous one.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 cell_valid |-> (!busy_q || cnt_q == 2'd2));

endmodule
