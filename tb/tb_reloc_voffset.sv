// tb_reloc_voffset: self-checking test of the vertical-offset stage.
// Random cells and two's complement offsets: the row must become row + offset
// modulo 64 and everything else must pass unchanged; also the worked example step
// <2,0> -> <2,1> with n = 1, and the one-clock latency.
module tb_reloc_voffset;
  import reloc6200_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   in_valid;
  cell_t  in_cell, out_cell;
  logic   out_valid;
  coord_t row_ofs;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  reloc_voffset dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic apply(cell_t c);
    @(negedge clk);
    in_cell  = c;
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    check("out_valid after one clock", out_valid, 1);
  endtask

  function automatic cell_t rand_cell();
    cell_t c;
    c = cell_t'({$urandom, $urandom});
    return c;
  endfunction

  initial begin
    cell_t c, e;
    row_ofs = '0; in_valid = 1'b0; in_cell = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    for (int i = 0; i < 60; i++) begin
      c = rand_cell();
      row_ofs = coord_t'($urandom);
      apply(c);
      e = c;
      e.row = coord_t'((int'(c.row) + int'(row_ofs)) % 64);
      check("row + offset", out_cell.row, e.row);
      check("rest unchanged", out_cell, e);
    end

    // Negative offset (-1) moves towards lower addresses.
    c = rand_cell();
    c.row = 6'd5;
    row_ofs = 6'h3f;
    apply(c);
    check("offset -1", out_cell.row, 6'd4);

    // Worked example.
    c = rand_cell();
    c.row = 6'd0;
    c.col = 6'd2;
    row_ofs = 6'd1;
    apply(c);
    check("example row", out_cell.row, 6'd1);
    check("example col", out_cell.col, 6'd2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
