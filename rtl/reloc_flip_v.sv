// reloc_flip_v: vertical-flip stage of the 6200 relocation pipeline.
//
// When `en` is set, every north reference in the cell's routing becomes south and
// vice versa (N<->S and N4<->S4 in the X1/X2/X3 input multiplexers; the Nout and
// Sout multiplexers trade places, each re-coded into the other's code), and the row
// moves from r to maxrow-r. East/west routing and the column are unchanged, as are
// the function-unit bits. When `en` is clear the cell passes unchanged.
// Interface: one cell per cycle with a valid flag; the result is registered, so
// the latency is one clock. The coordinate rule and the codes follow the published
// relocation tables; the register after each stage is this design's choice.
module reloc_flip_v
  import reloc6200_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  coord_t maxrow,
  input  logic   in_valid,
  input  cell_t  in_cell,
  output logic   out_valid,
  output cell_t  out_cell
);

  cell_t nxt;

  always_comb begin
    nxt = in_cell;
    if (en) begin
      nxt.nout = nout_enc(dir_vflip(sout_dec(in_cell.sout)));
      nxt.sout = sout_enc(dir_vflip(nout_dec(in_cell.nout)));
      nxt.eout = eout_enc(dir_vflip(eout_dec(in_cell.eout)));
      nxt.wout = wout_enc(dir_vflip(wout_dec(in_cell.wout)));
      nxt.x1   = x13_enc(dir_vflip(x13_dec(in_cell.x1)));
      nxt.x2   = x2_enc(dir_vflip(x2_dec(in_cell.x2)));
      nxt.x3   = x13_enc(dir_vflip(x13_dec(in_cell.x3)));
      nxt.row  = maxrow - in_cell.row;
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
