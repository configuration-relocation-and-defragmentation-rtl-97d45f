// reloc_pipeline: relocation hardware for a 6200-style partially reconfigurable array.
//
// The CPU sends a configuration's programming writes unchanged, plus one set of
// relocation settings (vertical flip, horizontal flip, 90-degree rotation, row
// offset n, column offset m, and the maxrow/maxcol used by the flip and rotate
// rules). Every cell passes through five stages in the fixed order
//   flip vertical -> flip horizontal -> rotate 90 -> vertical offset -> horizontal offset
// and leaves as three programming writes to its new address with re-coded routing.
// So the CPU's work is constant per configuration, independent of its size.
//
// Interface: `ctrl_load` latches `ctrl_in` into the settings register (reset:
// everything off, zero offsets, maxrow = maxcol = 63, the 64x64 array). Input writes
// {wr_addr, wr_data} one per clock on `wr_valid`; output writes on `out_valid`.
// Timing: the first output byte of a cell appears 7 clocks after its last input
// byte (1 gather + 5 stages + 1 scatter); throughput is one cell per three writes.
// The stage order and the per-stage rules are the published ones; the byte
// gathering, settings register and latency are this design's choices.
module reloc_pipeline
  import reloc6200_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ctrl_load,
  input  reloc_ctrl_t ctrl_in,
  input  logic        wr_valid,
  input  logic [13:0] wr_addr,
  input  logic [7:0]  wr_data,
  output logic        out_valid,
  output logic [13:0] out_addr,
  output logic [7:0]  out_data,
  output reloc_ctrl_t ctrl_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q        <= '0;
      ctrl_q.maxrow <= '1;
      ctrl_q.maxcol <= '1;
    end else if (ctrl_load) begin
      ctrl_q <= ctrl_in;
    end
  end

  logic  v0, v1, v2, v3, v4, v5;
  cell_t c0, c1, c2, c3, c4, c5;

  reloc_cell_gather u_gather (
    .clk, .rst_n, .wr_valid, .wr_addr, .wr_data,
    .cell_valid(v0), .cell_o(c0)
  );

  reloc_flip_v u_flip_v (
    .clk, .rst_n, .en(ctrl_q.vflip), .maxrow(ctrl_q.maxrow),
    .in_valid(v0), .in_cell(c0), .out_valid(v1), .out_cell(c1)
  );

  reloc_flip_h u_flip_h (
    .clk, .rst_n, .en(ctrl_q.hflip), .maxcol(ctrl_q.maxcol),
    .in_valid(v1), .in_cell(c1), .out_valid(v2), .out_cell(c2)
  );

  reloc_rotate90 u_rotate (
    .clk, .rst_n, .en(ctrl_q.rot90), .maxcol(ctrl_q.maxcol),
    .in_valid(v2), .in_cell(c2), .out_valid(v3), .out_cell(c3)
  );

  reloc_voffset u_voffset (
    .clk, .rst_n, .row_ofs(ctrl_q.row_ofs),
    .in_valid(v3), .in_cell(c3), .out_valid(v4), .out_cell(c4)
  );

  reloc_hoffset u_hoffset (
    .clk, .rst_n, .col_ofs(ctrl_q.col_ofs),
    .in_valid(v4), .in_cell(c4), .out_valid(v5), .out_cell(c5)
  );

  reloc_cell_scatter u_scatter (
    .clk, .rst_n, .cell_valid(v5), .cell_i(c5),
    .wr_valid(out_valid), .wr_addr(out_addr), .wr_data(out_data)
  );

endmodule
