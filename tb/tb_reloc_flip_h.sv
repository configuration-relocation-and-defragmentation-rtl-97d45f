// tb_reloc_flip_h: self-checking test of the horizontal-flip stage.
// Expected codes are written out by hand from the multiplexer code tables (E<->W,
// E4<->W4; Eout and Wout trade sources), the column rule c -> maxcol-c is checked
// on random cells, plus the second step of the worked cell #1 example,
// pass-through when disabled, and the one-clock latency.
module tb_reloc_flip_h;
  import reloc6200_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   in_valid;
  cell_t  in_cell, out_cell;
  logic   out_valid;
  logic en; coord_t maxcol;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  reloc_flip_h dut (.*);

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

  localparam logic [2:0] X13_IN  [8] = '{3'b011, 3'b000, 3'b001, 3'b010, 3'b111, 3'b101, 3'b110, 3'b100};
  localparam logic [2:0] X13_OUT [8] = '{3'b011, 3'b000, 3'b010, 3'b001, 3'b111, 3'b101, 3'b100, 3'b110};
  localparam logic [2:0] X2_IN   [8] = '{3'b011, 3'b000, 3'b010, 3'b001, 3'b111, 3'b110, 3'b101, 3'b100};
  localparam logic [2:0] X2_OUT  [8] = '{3'b011, 3'b000, 3'b001, 3'b010, 3'b111, 3'b110, 3'b100, 3'b101};
  // New Eout from old Wout (F,W,N,S -> F,E,N,S), new Wout from old Eout (F,N,E,S -> F,N,W,S).
  localparam logic [1:0] CODE   [4] = '{2'b00, 2'b01, 2'b10, 2'b11};
  localparam logic [1:0] E_FROM_W [4] = '{2'b00, 2'b10, 2'b01, 2'b11};
  localparam logic [1:0] W_FROM_E [4] = '{2'b00, 2'b10, 2'b01, 2'b11};
  // Nout (F,N,E,W) and Sout (F,E,W,S) re-coded in place.
  localparam logic [1:0] N_OUT  [4] = '{2'b00, 2'b01, 2'b11, 2'b10};
  localparam logic [1:0] S_OUT  [4] = '{2'b00, 2'b10, 2'b01, 2'b11};

  initial begin
    cell_t c;
    en = 1'b1; maxcol = 6'd63; in_valid = 1'b0; in_cell = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    for (int i = 0; i < 8; i++) begin
      c = rand_cell();
      c.x1 = X13_IN[i]; c.x3 = X13_IN[(i + 5) % 8]; c.x2 = X2_IN[i];
      c.wout = CODE[i % 4]; c.eout = CODE[(i + 1) % 4];
      c.nout = CODE[(i + 2) % 4]; c.sout = CODE[(i + 3) % 4];
      apply(c);
      check("x1", out_cell.x1, X13_OUT[i]);
      check("x3", out_cell.x3, X13_OUT[(i + 5) % 8]);
      check("x2", out_cell.x2, X2_OUT[i]);
      check("eout", out_cell.eout, E_FROM_W[i % 4]);
      check("wout", out_cell.wout, W_FROM_E[(i + 1) % 4]);
      check("nout", out_cell.nout, N_OUT[(i + 2) % 4]);
      check("sout", out_cell.sout, S_OUT[(i + 3) % 4]);
      check("row kept", out_cell.row, c.row);
      check("function bits", {out_cell.cs, out_cell.rp, out_cell.y2, out_cell.y3, out_cell.spare},
                             {c.cs, c.rp, c.y2, c.y3, c.spare});
    end

    for (int i = 0; i < 40; i++) begin
      c = rand_cell();
      maxcol = coord_t'($urandom);
      apply(c);
      check("col = maxcol - c", out_cell.col, coord_t'(maxcol - c.col));
    end

    // Worked example, cell #1 after the vertical flip: X1 E4, X2 S, X3 N;
    // Nout E, Eout S, Sout F, Wout N; <4,2>, maxcol 4.
    maxcol = 6'd4;
    c = rand_cell();
    c.x1 = 3'b110; c.x2 = 3'b000; c.x3 = 3'b011;
    c.nout = 2'b10; c.eout = 2'b11; c.sout = 2'b00; c.wout = 2'b10;
    c.col = 6'd4; c.row = 6'd2;
    apply(c);
    check("ex x1 W4", out_cell.x1, 3'b100);
    check("ex x2 S", out_cell.x2, 3'b000);
    check("ex x3 N", out_cell.x3, 3'b011);
    check("ex nout W", out_cell.nout, 2'b11);
    check("ex eout N", out_cell.eout, 2'b01);
    check("ex sout F", out_cell.sout, 2'b00);
    check("ex wout S", out_cell.wout, 2'b11);
    check("ex col", out_cell.col, 6'd0);
    check("ex row", out_cell.row, 6'd2);

    en = 1'b0;
    for (int i = 0; i < 10; i++) begin
      c = rand_cell();
      apply(c);
      check("pass-through", out_cell, c);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
