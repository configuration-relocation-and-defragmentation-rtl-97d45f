// rd_fpga: programming side of the R/D (relocation / defragmentation) FPGA.
//
// A row-based partially reconfigurable configuration memory whose column decoder is
// replaced by a word-addressable staging area one row wide, and whose row decoder is
// fed through an adder that adds one of two offset registers (write / read) to the
// row address. Configurations are compiled as if placed from row 0; relocating one
// costs a single offset-register write, and moving one (defragmentation) costs a
// read and a write per row. A row cache behind the staging area can supply whole
// rows.
//
// Every operation (`op`, see rd_pkg) completes in one clock, which gives the
// operation counts
//   load a configuration:          rows * (WORDS + 1) + 1
//   move a configuration:          rows * 2 + 2
//   patch part of rows:            rows_altered * 2 + changed_words + 1
//   load a fully cached config:    rows + 2
// For the cached load, RD_CACHE_LOAD with `wb` set writes the row fetched by the
// previous RD_CACHE_LOAD to the array (at that row address plus the selected
// offset) in the same clock as it fetches the next one; a final RD_ARRAY_WR stores
// the last row. On a cache miss RD_CACHE_LOAD changes nothing and raises
// `cache_miss`. The operation set, the one-clock timing and the cache policy are
// this design's choices; the structure (staging area, two offset registers,
// 2:1 select, adder, row-wide transfers) and the operation counts are the
// published ones.
// Ports: `rdata` is the staging word at `word_addr`, valid (`rdata_valid`) in the
// clock of RD_STAGE_RD. `cfg_bits` is the whole configuration memory as seen by
// the logic fabric.
module rd_fpga
  import rd_pkg::*;
#(
  parameter int unsigned ROWS          = rd_pkg::ROWS_DEF,
  parameter int unsigned WORD_W        = rd_pkg::WORD_W_DEF,
  parameter int unsigned WORDS         = rd_pkg::WORDS_DEF,
  parameter int unsigned CACHE_ENTRIES = 64,
  parameter int unsigned CFG_W         = 8,
  localparam int unsigned RA_W         = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned WA_W         = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned ROW_BITS     = WORDS * WORD_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  rd_op_e              op,
  input  logic [RA_W-1:0]     row_addr,
  input  logic [WA_W-1:0]     word_addr,
  input  logic                ofs_sel,
  input  logic                wb,
  input  logic [CFG_W-1:0]    cfg_id,
  input  logic [WORD_W-1:0]   wdata,
  output logic [WORD_W-1:0]   rdata,
  output logic                rdata_valid,
  output logic                cache_hit,
  output logic                cache_miss,
  output logic [RA_W-1:0]     phys_row,
  output logic [ROW_BITS-1:0] cfg_bits [ROWS]
);

  logic [WORDS-1:0][WORD_W-1:0] stage_row;
  logic [ROW_BITS-1:0]          array_rdata, cache_rdata;
  logic                         hit;
  logic [RA_W-1:0]              prev_row_q, row_sel;
  logic                         is_cload, array_we, stage_load;

  assign is_cload   = op == RD_CACHE_LOAD;
  assign row_sel    = is_cload ? prev_row_q : row_addr;
  assign array_we   = op == RD_ARRAY_WR || (is_cload && hit && wb);
  assign stage_load = op == RD_ARRAY_RD || (is_cload && hit);

  rd_row_offset #(.RA_W(RA_W)) u_offset (
    .clk, .rst_n,
    .wofs_we (op == RD_WOFS_WR),
    .rofs_we (op == RD_ROFS_WR),
    .ofs_din (wdata[RA_W-1:0]),
    .ofs_sel,
    .row_addr(row_sel),
    .phys_row,
    .wofs_q  (),
    .rofs_q  ()
  );

  rd_staging_area #(.WORD_W(WORD_W), .WORDS(WORDS)) u_stage (
    .clk,
    .wr_en   (op == RD_STAGE_WR),
    .wr_addr (word_addr),
    .wr_data (wdata),
    .rd_addr (word_addr),
    .rd_data (rdata),
    .row_load(stage_load),
    .row_in  (op == RD_ARRAY_RD ? array_rdata : cache_rdata),
    .row_out (stage_row)
  );

  rd_config_array #(.ROWS(ROWS), .ROW_BITS(ROW_BITS)) u_array (
    .clk,
    .we      (array_we),
    .addr    (phys_row),
    .wdata   (stage_row),
    .rdata   (array_rdata),
    .cfg_bits
  );

  rd_row_cache #(.ROW_BITS(ROW_BITS), .ENTRIES(CACHE_ENTRIES), .RA_W(RA_W),
                 .CFG_W(CFG_W)) u_cache (
    .clk, .rst_n,
    .cfg_id,
    .row_idx  (row_addr),
    .fill     (op == RD_CACHE_FILL),
    .fill_data(stage_row),
    .hit,
    .rdata    (cache_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               prev_row_q <= '0;
    else if (is_cload && hit) prev_row_q <= row_addr;
  end

  assign rdata_valid = op == RD_STAGE_RD;
  assign cache_hit   = is_cload && hit;
  assign cache_miss  = is_cload && !hit;

endmodule
