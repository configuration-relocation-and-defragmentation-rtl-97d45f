// rd_pkg: operation codes and default sizes of the R/D (relocation /
// defragmentation) FPGA programming interface.
//
// Default sizes are those of the 1-megabit square configuration memory used for the
// area estimate: 1024 configuration rows (10-bit row address), each row 32 words of
// 32 bits (5-bit staging-area word address). Every operation takes one clock.
package rd_pkg;

  localparam int unsigned ROWS_DEF   = 1024;
  localparam int unsigned WORD_W_DEF = 32;
  localparam int unsigned WORDS_DEF  = 32;

  typedef enum logic [3:0] {
    RD_NOP        = 4'd0,
    RD_STAGE_WR   = 4'd1,  // staging[word_addr] <= wdata
    RD_STAGE_RD   = 4'd2,  // rdata <= staging[word_addr] (same clock)
    RD_WOFS_WR    = 4'd3,  // write offset register <= wdata
    RD_ROFS_WR    = 4'd4,  // read offset register  <= wdata
    RD_ARRAY_WR   = 4'd5,  // array[row_addr + offset(ofs_sel)] <= staging
    RD_ARRAY_RD   = 4'd6,  // staging <= array[row_addr + offset(ofs_sel)]
    RD_CACHE_FILL = 4'd7,  // cache{cfg_id,row_addr} <= staging
    RD_CACHE_LOAD = 4'd8   // staging <= cache{cfg_id,row_addr}; on a hit, the old
                           // staging row goes to the array at the previous cache
                           // load's row address (when wb is set)
  } rd_op_e;

  // Offset select: which offset register is added to the row address.
  localparam logic OFS_WRITE = 1'b0;
  localparam logic OFS_READ  = 1'b1;

endpackage
