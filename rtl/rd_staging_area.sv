// rd_staging_area: the staging area of the R/D FPGA.
//
// A one-row SRAM buffer exactly as wide as a row of the configuration array
// (WORDS words of WORD_W bits). The CPU fills or reads it one word at a time through
// a small word decoder, in any order; the array (or the row cache) reads it or
// overwrites it as a whole row in one operation, so no column decoder is needed
// between the buffer and the array.
// Interface: `wr_en` writes `wr_data` to word `wr_addr`; `rd_data` is the word at
// `rd_addr`, available in the same clock (it stands for the per-bit output drivers
// towards the CPU). `row_load` replaces the whole row with `row_in`; `row_out` is
// the whole row, always visible to the array. If `row_load` and `wr_en` fall in the
// same clock, the word write wins for its word (this design's choice; the
// operations of the top never do both).
module rd_staging_area #(
  parameter int unsigned WORD_W = 32,
  parameter int unsigned WORDS  = 32,
  localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                          clk,
  input  logic                          wr_en,
  input  logic [AW-1:0]                 wr_addr,
  input  logic [WORD_W-1:0]             wr_data,
  input  logic [AW-1:0]                 rd_addr,
  output logic [WORD_W-1:0]             rd_data,
  input  logic                          row_load,
  input  logic [WORDS-1:0][WORD_W-1:0]  row_in,
  output logic [WORDS-1:0][WORD_W-1:0]  row_out
);

  logic [WORDS-1:0][WORD_W-1:0] stage_q;

  always_ff @(posedge clk) begin
    for (int unsigned i = 0; i < WORDS; i++) begin
      if (wr_en && wr_addr == AW'(i)) stage_q[i] <= wr_data;
      else if (row_load)              stage_q[i] <= row_in[i];
    end
  end

  assign rd_data = stage_q[rd_addr];
  assign row_out = stage_q;

endmodule
