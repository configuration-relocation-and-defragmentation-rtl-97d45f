// reloc_rotate90: 90-degree clockwise rotation stage of the 6200 relocation pipeline.
//
// When `en` is set, every routing direction moves to the next compass point
// clockwise (N->E, E->S, S->W, W->N, likewise for the length-4 lines). The output
// multiplexers rotate with the cell: the new Eout takes the old Nout's source, the
// new Sout the old Eout's, the new Wout the old Sout's and the new Nout the old
// Wout's, each source rotated and re-coded. The cell moves from <c,r> to
// <maxcol-r, c>. Function-unit bits pass unchanged; with `en` clear the whole cell
// passes unchanged.
// The published per-bit logic equations for this stage are not used: the same
// mapping is computed here by decoding each multiplexer code to a direction,
// rotating it and re-encoding it, which reproduces the published before/after code
// table exactly. Interface: one cell per cycle, registered output, latency one clock.
module reloc_rotate90
  import reloc6200_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  coord_t maxcol,
  input  logic   in_valid,
  input  cell_t  in_cell,
  output logic   out_valid,
  output cell_t  out_cell
);

  cell_t nxt;

  always_comb begin
    nxt = in_cell;
    if (en) begin
      nxt.nout = nout_enc(dir_rot90(wout_dec(in_cell.wout)));
      nxt.eout = eout_enc(dir_rot90(nout_dec(in_cell.nout)));
      nxt.sout = sout_enc(dir_rot90(eout_dec(in_cell.eout)));
      nxt.wout = wout_enc(dir_rot90(sout_dec(in_cell.sout)));
      nxt.x1   = x13_enc(dir_rot90(x13_dec(in_cell.x1)));
      nxt.x2   = x2_enc(dir_rot90(x2_dec(in_cell.x2)));
      nxt.x3   = x13_enc(dir_rot90(x13_dec(in_cell.x3)));
      nxt.col  = maxcol - in_cell.row;
      nxt.row  = in_cell.col;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) out_cell <= nxt;
  end

endmodule
