// reloc_defrag_top: configuration relocation and defragmentation hardware, two designs
// side by side.
//
// 1. The R/D FPGA programming system (rd_fpga): staging area, read/write offset
//    registers with the row-address adder, configuration SRAM array and row cache,
//    together with the virtualised column I/O (rd_virtual_io) whose row output
//    enables come from a per-row configuration-number CAM (rd_vio_oe_cam). The
//    logic cells and routing of this FPGA are left open, so their side of the
//    design is brought out: `cfg_bits` (every configuration bit), `vio_cell_in`
//    (what each cell reads from the input lines) and `vio_cell_out` (what each cell
//    offers to the output lines).
// 2. The relocation pipeline for a 6200-style array (reloc_pipeline): programming
//    writes go in, relocated programming writes to the cell array come out on
//    `px_out_*`.
// The two share only clock and reset. All timing is that of the blocks: every
// R/D operation takes one clock; the pipeline delivers a cell's first relocated
// write 7 clocks after its last input write.
module reloc_defrag_top
  import rd_pkg::*;
  import reloc6200_pkg::*;
#(
  parameter int unsigned ROWS          = rd_pkg::ROWS_DEF,
  parameter int unsigned WORD_W        = rd_pkg::WORD_W_DEF,
  parameter int unsigned WORDS         = rd_pkg::WORDS_DEF,
  parameter int unsigned CACHE_ENTRIES = 64,
  parameter int unsigned CFG_W         = 8,
  parameter int unsigned CELL_ROWS     = 32,
  parameter int unsigned COLS          = 32,
  parameter int unsigned IN_LINES      = 4,
  parameter int unsigned OUT_LINES     = 2,
  parameter int unsigned CELL_INS      = 2,
  localparam int unsigned RA_W         = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned WA_W         = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned ROW_BITS     = WORDS * WORD_W,
  localparam int unsigned SEL_W        = (IN_LINES > 1) ? $clog2(IN_LINES) : 1,
  localparam int unsigned CRW          = (CELL_ROWS > 1) ? $clog2(CELL_ROWS) : 1
) (
  input  logic                clk,
  input  logic                rst_n,

  // R/D FPGA host port
  input  rd_op_e              rd_op,
  input  logic [RA_W-1:0]     rd_row_addr,
  input  logic [WA_W-1:0]     rd_word_addr,
  input  logic                rd_ofs_sel,
  input  logic                rd_wb,
  input  logic [CFG_W-1:0]    rd_cfg_id,
  input  logic [WORD_W-1:0]   rd_wdata,
  output logic [WORD_W-1:0]   rd_rdata,
  output logic                rd_rdata_valid,
  output logic                rd_cache_hit,
  output logic                rd_cache_miss,
  output logic [RA_W-1:0]     rd_phys_row,
  output logic [ROW_BITS-1:0] cfg_bits [ROWS],

  // Virtualised I/O: pins, cell side, and output-enable CAM
  input  logic [COLS-1:0][IN_LINES-1:0]                           vio_ext_in,
  output logic [COLS-1:0][OUT_LINES-1:0]                          vio_ext_out,
  input  logic [CELL_ROWS-1:0][COLS-1:0][CELL_INS-1:0][SEL_W-1:0] vio_in_sel,
  output logic [CELL_ROWS-1:0][COLS-1:0][CELL_INS-1:0]            vio_cell_in,
  input  logic [CELL_ROWS-1:0][COLS-1:0][OUT_LINES-1:0]           vio_cell_out,
  output logic [OUT_LINES-1:0]                                    vio_oe_conflict,
  input  logic                cam_tag_we,
  input  logic [CRW-1:0]      cam_tag_row,
  input  logic                cam_tag_valid,
  input  logic [CFG_W-1:0]    cam_tag_cfg,
  input  logic [OUT_LINES-1:0] cam_tag_mask,
  input  logic                cam_sel_en,
  input  logic [CFG_W-1:0]    cam_sel_cfg,
  output logic                cam_multi_match,

  // 6200 relocation pipeline
  input  logic                px_ctrl_load,
  input  reloc_ctrl_t         px_ctrl,
  input  logic                px_wr_valid,
  input  logic [13:0]         px_wr_addr,
  input  logic [7:0]          px_wr_data,
  output logic                px_out_valid,
  output logic [13:0]         px_out_addr,
  output logic [7:0]          px_out_data,
  output reloc_ctrl_t         px_ctrl_q
);

  logic [CELL_ROWS-1:0][OUT_LINES-1:0] row_oe;

  rd_fpga #(
    .ROWS(ROWS), .WORD_W(WORD_W), .WORDS(WORDS),
    .CACHE_ENTRIES(CACHE_ENTRIES), .CFG_W(CFG_W)
  ) u_rd (
    .clk, .rst_n,
    .op         (rd_op),
    .row_addr   (rd_row_addr),
    .word_addr  (rd_word_addr),
    .ofs_sel    (rd_ofs_sel),
    .wb         (rd_wb),
    .cfg_id     (rd_cfg_id),
    .wdata      (rd_wdata),
    .rdata      (rd_rdata),
    .rdata_valid(rd_rdata_valid),
    .cache_hit  (rd_cache_hit),
    .cache_miss (rd_cache_miss),
    .phys_row   (rd_phys_row),
    .cfg_bits
  );

  rd_vio_oe_cam #(
    .CELL_ROWS(CELL_ROWS), .OUT_LINES(OUT_LINES), .CFG_W(CFG_W)
  ) u_cam (
    .clk, .rst_n,
    .tag_we     (cam_tag_we),
    .tag_row    (cam_tag_row),
    .tag_valid  (cam_tag_valid),
    .tag_cfg    (cam_tag_cfg),
    .tag_mask   (cam_tag_mask),
    .sel_en     (cam_sel_en),
    .sel_cfg    (cam_sel_cfg),
    .row_oe,
    .multi_match(cam_multi_match)
  );

  rd_virtual_io #(
    .CELL_ROWS(CELL_ROWS), .COLS(COLS), .IN_LINES(IN_LINES),
    .OUT_LINES(OUT_LINES), .CELL_INS(CELL_INS)
  ) u_vio (
    .ext_in     (vio_ext_in),
    .in_sel     (vio_in_sel),
    .cell_in    (vio_cell_in),
    .cell_out   (vio_cell_out),
    .row_oe,
    .ext_out    (vio_ext_out),
    .oe_conflict(vio_oe_conflict)
  );

  reloc_pipeline u_px (
    .clk, .rst_n,
    .ctrl_load(px_ctrl_load),
    .ctrl_in  (px_ctrl),
    .wr_valid (px_wr_valid),
    .wr_addr  (px_wr_addr),
    .wr_data  (px_wr_data),
    .out_valid(px_out_valid),
    .out_addr (px_out_addr),
    .out_data (px_out_data),
    .ctrl_q   (px_ctrl_q)
  );

endmodule
