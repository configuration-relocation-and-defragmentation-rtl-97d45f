// tb_rd_virtual_io: self-checking test of the virtualised column I/O at its default
// size (32 cell rows, 32 columns, 4 input and 2 output lines per column, 2 input
// multiplexers per cell). Random patterns: every cell input must equal the
// selected line of its own column, whatever its row; each output line must carry
// the value of the one row enabled on it, or 0 with none enabled; and the conflict
// flag must rise exactly when two rows are enabled on the same line.
module tb_rd_virtual_io;
  localparam int CELL_ROWS = 32, COLS = 32, IN_LINES = 4, OUT_LINES = 2, CELL_INS = 2;

  logic [COLS-1:0][IN_LINES-1:0]                       ext_in;
  logic [CELL_ROWS-1:0][COLS-1:0][CELL_INS-1:0][1:0]   in_sel;
  logic [CELL_ROWS-1:0][COLS-1:0][CELL_INS-1:0]        cell_in;
  logic [CELL_ROWS-1:0][COLS-1:0][OUT_LINES-1:0]       cell_out;
  logic [CELL_ROWS-1:0][OUT_LINES-1:0]                 row_oe;
  logic [COLS-1:0][OUT_LINES-1:0]                      ext_out;
  logic [OUT_LINES-1:0]                                oe_conflict;
  int checks = 0, failures = 0;

  rd_virtual_io dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 60; t++) begin
      int en_row [OUT_LINES];
      for (int c = 0; c < COLS; c++) ext_in[c] = 4'($urandom);
      for (int r = 0; r < CELL_ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          in_sel[r][c]   = 4'($urandom);
          cell_out[r][c] = 2'($urandom);
        end
      row_oe = '0;
      for (int k = 0; k < OUT_LINES; k++) begin
        int mode;
        mode = int'($urandom_range(3));   // 0: none, 1-2: one row, 3: two rows
        en_row[k] = -1;
        if (mode == 1 || mode == 2) begin
          en_row[k] = int'($urandom_range(CELL_ROWS - 1));
          row_oe[en_row[k]][k] = 1'b1;
        end else if (mode == 3) begin
          int a, b;
          a = int'($urandom_range(CELL_ROWS - 1));
          b = (a + 1 + int'($urandom_range(CELL_ROWS - 2))) % CELL_ROWS;
          row_oe[a][k] = 1'b1;
          row_oe[b][k] = 1'b1;
          en_row[k] = -2;
        end
      end
      #1;
      for (int r = 0; r < CELL_ROWS; r++)
        for (int c = 0; c < COLS; c++)
          for (int i = 0; i < CELL_INS; i++)
            check("cell input", cell_in[r][c][i], ext_in[c][in_sel[r][c][i]]);
      for (int k = 0; k < OUT_LINES; k++) begin
        check("conflict flag", oe_conflict[k], en_row[k] == -2);
        if (en_row[k] >= -1)
          for (int c = 0; c < COLS; c++)
            check("output line", ext_out[c][k], en_row[k] < 0 ? 0 : cell_out[en_row[k]][c][k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
