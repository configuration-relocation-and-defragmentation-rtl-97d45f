// rd_vio_oe_cam: output-enable control for the virtualised I/O lines.
//
// Each cell row has a small content-addressable entry holding a configuration
// number, a valid bit and a mask of the output lines that row may drive. When the
// CPU wants a configuration's result it presents that configuration number on
// `sel_cfg` with `sel_en`; every row whose valid entry matches raises its
// output enables for the lines in its mask. The loader writes the entries of the
// rows it places (`tag_we`), and sets a mask bit in only one row per configuration
// and line, so at most one row drives each line. `multi_match` reports a violation
// of that rule (two matching rows with a common line).
// The matching scheme follows the CAM-per-row example the design borrows from an
// earlier row-based architecture; the line mask is this design's addition so that
// only a configuration's output row is enabled. Entries reset to invalid. Lookup is
// combinational; entry writes take effect at the clock edge.
module rd_vio_oe_cam #(
  parameter int unsigned CELL_ROWS = 32,
  parameter int unsigned OUT_LINES = 2,
  parameter int unsigned CFG_W     = 8,
  localparam int unsigned RW       = (CELL_ROWS > 1) ? $clog2(CELL_ROWS) : 1
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 tag_we,
  input  logic [RW-1:0]                        tag_row,
  input  logic                                 tag_valid,
  input  logic [CFG_W-1:0]                     tag_cfg,
  input  logic [OUT_LINES-1:0]                 tag_mask,
  input  logic                                 sel_en,
  input  logic [CFG_W-1:0]                     sel_cfg,
  output logic [CELL_ROWS-1:0][OUT_LINES-1:0]  row_oe,
  output logic                                 multi_match
);

  typedef struct packed {
    logic                 valid;
    logic [CFG_W-1:0]     cfg;
    logic [OUT_LINES-1:0] mask;
  } entry_t;

  entry_t entry_q [CELL_ROWS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned r = 0; r < CELL_ROWS; r++) entry_q[r] <= '0;
    end else if (tag_we) begin
      entry_q[tag_row] <= '{valid: tag_valid, cfg: tag_cfg, mask: tag_mask};
    end
  end

  always_comb begin
    logic [OUT_LINES-1:0] used;
    used        = '0;
    multi_match = 1'b0;
    for (int unsigned r = 0; r < CELL_ROWS; r++) begin
      if (sel_en && entry_q[r].valid && entry_q[r].cfg == sel_cfg) begin
        row_oe[r] = entry_q[r].mask;
        if ((used & entry_q[r].mask) != '0) multi_match = 1'b1;
        used = used | entry_q[r].mask;
      end else begin
        row_oe[r] = '0;
      end
    end
  end

endmodule
