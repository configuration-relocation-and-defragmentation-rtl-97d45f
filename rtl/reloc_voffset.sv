// reloc_voffset: vertical-offset stage of the 6200 relocation pipeline.
//
// Adds the row offset n to the cell's row address (<c,r> becomes <c,r+n>). The
// offset is a two's complement value of the address width, so a negative offset
// moves the cell north; the sum wraps modulo 64 like the 6-bit row field. Routing
// bits are not touched: on the idealised array a pure shift needs no routing change.
// Interface: one cell per cycle, registered output, latency one clock.
module reloc_voffset
  import reloc6200_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  coord_t row_ofs,
  input  logic   in_valid,
  input  cell_t  in_cell,
  output logic   out_valid,
  output cell_t  out_cell
);

  cell_t nxt;

  always_comb begin
    nxt     = in_cell;
    nxt.row = in_cell.row + row_ofs;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) out_cell <= nxt;
  end

endmodule
