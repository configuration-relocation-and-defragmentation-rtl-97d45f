// reloc_hoffset: horizontal-offset stage of the 6200 relocation pipeline.
//
// Adds the column offset m to the cell's column address (<c,r> becomes <c+m,r>).
// The offset is two's complement of the address width, so a negative offset moves
// the cell west; the sum wraps modulo 64 like the 6-bit column field. Routing bits
// are not touched. Interface: one cell per cycle, registered output, latency one
// clock.
module reloc_hoffset
  import reloc6200_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  coord_t col_ofs,
  input  logic   in_valid,
  input  cell_t  in_cell,
  output logic   out_valid,
  output cell_t  out_cell
);

  cell_t nxt;

  always_comb begin
    nxt     = in_cell;
    nxt.col = in_cell.col + col_ofs;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) out_cell <= nxt;
  end

endmodule
