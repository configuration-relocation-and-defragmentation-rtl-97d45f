// tb_reloc_flip_v: self-checking test of the vertical-flip stage.
// Expected codes are written out by hand from the multiplexer code tables (N<->S,
// N4<->S4; Nout and Sout trade sources), the row rule r -> maxrow-r is checked on
// random cells, plus the first step of the worked cell #1 example, pass-through when
// disabled, and the one-clock latency.
module tb_reloc_flip_v;
  import reloc6200_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   in_valid;
  cell_t  in_cell, out_cell;
  logic   out_valid;
  logic en; coord_t maxrow;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  reloc_flip_v dut (.*);

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

  // X1/X3 code in -> out, X2 code in -> out (only N/S kinds change).
  localparam logic [2:0] X13_IN  [8] = '{3'b011, 3'b000, 3'b001, 3'b010, 3'b111, 3'b101, 3'b110, 3'b100};
  localparam logic [2:0] X13_OUT [8] = '{3'b000, 3'b011, 3'b001, 3'b010, 3'b101, 3'b111, 3'b110, 3'b100};
  localparam logic [2:0] X2_IN   [8] = '{3'b011, 3'b000, 3'b010, 3'b001, 3'b111, 3'b110, 3'b101, 3'b100};
  localparam logic [2:0] X2_OUT  [8] = '{3'b000, 3'b011, 3'b010, 3'b001, 3'b110, 3'b111, 3'b101, 3'b100};
  // New Nout from old Sout (F,E,W,S -> F,E,W,N), new Sout from old Nout.
  localparam logic [1:0] S_IN   [4] = '{2'b00, 2'b01, 2'b10, 2'b11};
  localparam logic [1:0] N_OUT  [4] = '{2'b00, 2'b10, 2'b11, 2'b01};
  localparam logic [1:0] N_IN   [4] = '{2'b00, 2'b01, 2'b10, 2'b11};
  localparam logic [1:0] S_OUT  [4] = '{2'b00, 2'b11, 2'b01, 2'b10};
  // Eout (F,N,E,S) and Wout (F,W,N,S) re-coded in place.
  localparam logic [1:0] EW_IN  [4] = '{2'b00, 2'b01, 2'b10, 2'b11};
  localparam logic [1:0] E_OUT  [4] = '{2'b00, 2'b11, 2'b10, 2'b01};
  localparam logic [1:0] W_OUT  [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  initial begin
    cell_t c;
    en = 1'b1; maxrow = 6'd63; in_valid = 1'b0; in_cell = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    for (int i = 0; i < 8; i++) begin
      c = rand_cell();
      c.x1 = X13_IN[i]; c.x3 = X13_IN[(i + 5) % 8]; c.x2 = X2_IN[i];
      c.sout = S_IN[i % 4]; c.nout = N_IN[(i + 1) % 4];
      c.eout = EW_IN[i % 4]; c.wout = EW_IN[(i + 2) % 4];
      apply(c);
      check("x1", out_cell.x1, X13_OUT[i]);
      check("x3", out_cell.x3, X13_OUT[(i + 5) % 8]);
      check("x2", out_cell.x2, X2_OUT[i]);
      check("nout", out_cell.nout, N_OUT[i % 4]);
      check("sout", out_cell.sout, S_OUT[(i + 1) % 4]);
      check("eout", out_cell.eout, E_OUT[i % 4]);
      check("wout", out_cell.wout, W_OUT[(i + 2) % 4]);
      check("col kept", out_cell.col, c.col);
      check("function bits", {out_cell.cs, out_cell.rp, out_cell.y2, out_cell.y3, out_cell.spare},
                             {c.cs, c.rp, c.y2, c.y3, c.spare});
    end

    for (int i = 0; i < 40; i++) begin
      c = rand_cell();
      maxrow = coord_t'($urandom);
      apply(c);
      check("row = maxrow - r", out_cell.row, coord_t'(maxrow - c.row));
    end

    // Worked example, cell #1 as loaded: X1 E4, X2 N, X3 S; Nout F, Eout N,
    // Sout E, Wout S; <4,2>, maxrow 4.
    maxrow = 6'd4;
    c = rand_cell();
    c.x1 = 3'b110; c.x2 = 3'b011; c.x3 = 3'b000;
    c.nout = 2'b00; c.eout = 2'b01; c.sout = 2'b01; c.wout = 2'b11;
    c.col = 6'd4; c.row = 6'd2;
    apply(c);
    check("ex x1 E4", out_cell.x1, 3'b110);
    check("ex x2 S", out_cell.x2, 3'b000);
    check("ex x3 N", out_cell.x3, 3'b011);
    check("ex nout E", out_cell.nout, 2'b10);
    check("ex eout S", out_cell.eout, 2'b11);
    check("ex sout F", out_cell.sout, 2'b00);
    check("ex wout N", out_cell.wout, 2'b10);
    check("ex col", out_cell.col, 6'd4);
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
