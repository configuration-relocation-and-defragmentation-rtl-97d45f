// rd_config_array: configuration SRAM array of the R/D FPGA with its row decoder.
//
// ROWS rows of ROW_BITS configuration bits. Each bit column is wired to exactly one
// staging-area bit, so a whole row is written or read in one operation; the row
// decoder is the address index. Every bit also drives the programmable fabric,
// which is why the complete contents are an output (`cfg_bits`).
// Interface: `we` writes `wdata` into row `addr` at the clock edge; `rdata` is row
// `addr`, read combinationally so that a row can be copied into the staging area
// in the same clock. The SRAM has no reset: rows hold whatever was last written.
// Sizes default to the 1-megabit square array of the area estimate.
module rd_config_array #(
  parameter int unsigned ROWS     = 1024,
  parameter int unsigned ROW_BITS = 1024,
  localparam int unsigned RA_W    = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                clk,
  input  logic                we,
  input  logic [RA_W-1:0]     addr,
  input  logic [ROW_BITS-1:0] wdata,
  output logic [ROW_BITS-1:0] rdata,
  output logic [ROW_BITS-1:0] cfg_bits [ROWS]
);

  logic [ROW_BITS-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata    = mem[addr];
  assign cfg_bits = mem;

endmodule
