// rd_virtual_io: location-independent (virtualised) I/O of a row-based R/D FPGA.
//
// Every column of cells shares IN_LINES external input lines and OUT_LINES external
// output lines that run past all cell rows. Each cell has CELL_INS input
// multiplexers that pick one of its column's input lines, so what a cell reads
// depends only on its multiplexer setting, never on which row the configuration was
// placed in. Cell output k can drive output line k of its column only while the
// enable of line k for that cell's row is high; several rows may read an input
// line, but only one row may drive an output line at a time.
// The shared output lines are tri-state busses in silicon; here each is an AND-OR
// of the enabled drivers, and `oe_conflict[k]` flags two or more rows enabled on
// line k (a fault the enable control must prevent).
// Defaults: four input lines and two output lines per column and two input
// multiplexers per cell, as in the published example; 32 columns (one cell per bit
// of a 32-bit host word) and 32 cell rows are this design's choices. All paths are
// combinational.
module rd_virtual_io #(
  parameter int unsigned CELL_ROWS = 32,
  parameter int unsigned COLS      = 32,
  parameter int unsigned IN_LINES  = 4,
  parameter int unsigned OUT_LINES = 2,
  parameter int unsigned CELL_INS  = 2,
  localparam int unsigned SEL_W    = (IN_LINES > 1) ? $clog2(IN_LINES) : 1
) (
  input  logic [COLS-1:0][IN_LINES-1:0]                  ext_in,
  input  logic [CELL_ROWS-1:0][COLS-1:0][CELL_INS-1:0][SEL_W-1:0] in_sel,
  output logic [CELL_ROWS-1:0][COLS-1:0][CELL_INS-1:0]   cell_in,
  input  logic [CELL_ROWS-1:0][COLS-1:0][OUT_LINES-1:0]  cell_out,
  input  logic [CELL_ROWS-1:0][OUT_LINES-1:0]            row_oe,
  output logic [COLS-1:0][OUT_LINES-1:0]                 ext_out,
  output logic [OUT_LINES-1:0]                           oe_conflict
);

  // Input multiplexers.
  always_comb begin
    for (int unsigned r = 0; r < CELL_ROWS; r++)
      for (int unsigned c = 0; c < COLS; c++)
        for (int unsigned i = 0; i < CELL_INS; i++)
          cell_in[r][c][i] = ext_in[c][in_sel[r][c][i]];
  end

  // Enabled output drivers onto the shared column lines.
  always_comb begin
    ext_out = '0;
    for (int unsigned r = 0; r < CELL_ROWS; r++)
      for (int unsigned c = 0; c < COLS; c++)
        for (int unsigned k = 0; k < OUT_LINES; k++)
          ext_out[c][k] = ext_out[c][k] | (row_oe[r][k] & cell_out[r][c][k]);
  end

  // Two or more rows driving the same output line.
  always_comb begin
    for (int unsigned k = 0; k < OUT_LINES; k++) begin
      logic seen;
      seen           = 1'b0;
      oe_conflict[k] = 1'b0;
      for (int unsigned r = 0; r < CELL_ROWS; r++) begin
        if (row_oe[r][k] && seen) oe_conflict[k] = 1'b1;
        if (row_oe[r][k])         seen = 1'b1;
      end
    end
  end

endmodule
