// reloc_flip_h: horizontal-flip stage of the 6200 relocation pipeline.
//
// When `en` is set, east and west references trade places (E<->W and E4<->W4 in
// the X1/X2/X3 input multiplexers; the Eout and Wout multiplexers swap, each
// re-coded into the other's code), and the column moves from c to maxcol-c.
// North/south routing, the row and the function-unit bits are unchanged. When `en`
// is clear the cell passes unchanged.
// Interface: one cell per cycle with a valid flag, registered output, latency one
// clock. Coordinate rule and codes follow the published relocation tables; the
// stage register is this design's choice.
module reloc_flip_h
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
      nxt.eout = eout_enc(dir_hflip(wout_dec(in_cell.wout)));
      nxt.wout = wout_enc(dir_hflip(eout_dec(in_cell.eout)));
      nxt.nout = nout_enc(dir_hflip(nout_dec(in_cell.nout)));
      nxt.sout = sout_enc(dir_hflip(sout_dec(in_cell.sout)));
      nxt.x1   = x13_enc(dir_hflip(x13_dec(in_cell.x1)));
      nxt.x2   = x2_enc(dir_hflip(x2_dec(in_cell.x2)));
      nxt.x3   = x13_enc(dir_hflip(x13_dec(in_cell.x3)));
      nxt.col  = maxcol - in_cell.col;
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
