// rd_row_offset: relocating row-address path of the R/D FPGA row decoder.
//
// Two offset registers as wide as the row address: the write offset (where a
// configuration is being placed) and the read offset (where a configuration to be
// moved currently sits). A 2:1 multiplexer, steered by the one-bit `ofs_sel`
// (0 = write register, 1 = read register), picks one, and an adder sums it with the
// row address supplied for the operation. Configurations are compiled as if they
// start at row 0, so the sum is the physical row. The sum wraps modulo 2**RA_W
// (this design's choice; software keeps configurations inside the array).
// Interface: `wofs_we` / `rofs_we` load `ofs_din` at the clock edge; both registers
// reset to 0. `phys_row` is combinational from `row_addr`, `ofs_sel` and the
// registers.
module rd_row_offset #(
  parameter int unsigned RA_W = 10
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wofs_we,
  input  logic            rofs_we,
  input  logic [RA_W-1:0] ofs_din,
  input  logic            ofs_sel,
  input  logic [RA_W-1:0] row_addr,
  output logic [RA_W-1:0] phys_row,
  output logic [RA_W-1:0] wofs_q,
  output logic [RA_W-1:0] rofs_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wofs_q <= '0;
      rofs_q <= '0;
    end else begin
      if (wofs_we) wofs_q <= ofs_din;
      if (rofs_we) rofs_q <= ofs_din;
    end
  end

  assign phys_row = row_addr + ((ofs_sel == rd_pkg::OFS_READ) ? rofs_q : wofs_q);

endmodule
