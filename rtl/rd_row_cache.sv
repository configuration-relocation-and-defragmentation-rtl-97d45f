// rd_row_cache: on-chip cache of configuration rows attached to the staging area.
//
// Holds whole configuration rows so that a cached row reaches the staging area in
// one operation instead of one CPU write per word. A row is identified by its
// configuration number together with its row position inside that configuration.
// Organisation (this design's choice, none is prescribed): direct-mapped, ENTRIES
// lines, line index = low index bits of (row position XOR configuration number),
// full {configuration number, row position} kept as the tag, one valid bit per line
// cleared by reset.
// Interface: `fill` writes `fill_data` under key {cfg_id, row_idx} at the clock
// edge. Lookup is combinational on the same key: `hit` and `rdata` are valid in the
// same clock, so the staging area can load the row at the next edge.
module rd_row_cache #(
  parameter int unsigned ROW_BITS = 1024,
  parameter int unsigned ENTRIES  = 64,
  parameter int unsigned RA_W     = 10,
  parameter int unsigned CFG_W    = 8,
  localparam int unsigned IW      = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [CFG_W-1:0]    cfg_id,
  input  logic [RA_W-1:0]     row_idx,
  input  logic                fill,
  input  logic [ROW_BITS-1:0] fill_data,
  output logic                hit,
  output logic [ROW_BITS-1:0] rdata
);

  typedef struct packed {
    logic [CFG_W-1:0] cfg;
    logic [RA_W-1:0]  row;
  } tag_t;

  logic [ROW_BITS-1:0] data_mem [ENTRIES];
  tag_t                tag_mem  [ENTRIES];
  logic [ENTRIES-1:0]  valid_q;

  logic [IW-1:0] idx;
  tag_t          key;

  assign idx = IW'(row_idx) ^ IW'(cfg_id);
  assign key = '{cfg: cfg_id, row: row_idx};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    valid_q      <= '0;
    else if (fill) valid_q[idx] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (fill) begin
      data_mem[idx] <= fill_data;
      tag_mem[idx]  <= key;
    end
  end

  assign hit   = valid_q[idx] && tag_mem[idx] == key;
  assign rdata = data_mem[idx];

endmodule
