// tb_reloc_rotate90: self-checking test of the 90-degree rotation stage.
// Checks every row of the published before/after code table for the X1/X3, X2,
// Eout and Wout multiplexers, the Nout/Sout mappings that follow from rotating
// W->N and E->S, the coordinate rule <c,r> -> <maxcol-r, c> on random cells, the
// worked cell #1 example, pass-through with the stage disabled, and the one-clock
// latency.
module tb_reloc_rotate90;
  import reloc6200_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   en;
  coord_t maxcol;
  logic   in_valid;
  cell_t  in_cell, out_cell;
  logic   out_valid;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  reloc_rotate90 dut (.*);

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

  // Published table: X1/X3 codes and X2 codes before and after rotation.
  localparam logic [2:0] X13_IN  [8] = '{3'b011, 3'b000, 3'b001, 3'b010, 3'b111, 3'b101, 3'b110, 3'b100};
  localparam logic [2:0] X13_OUT [8] = '{3'b001, 3'b010, 3'b000, 3'b011, 3'b110, 3'b100, 3'b101, 3'b111};
  localparam logic [2:0] X2_IN   [8] = '{3'b011, 3'b000, 3'b010, 3'b001, 3'b111, 3'b110, 3'b101, 3'b100};
  localparam logic [2:0] X2_OUT  [8] = '{3'b010, 3'b001, 3'b000, 3'b011, 3'b101, 3'b100, 3'b110, 3'b111};
  // Eout after = f(Nout before), Wout after = f(Sout before).
  localparam logic [1:0] N_IN  [4] = '{2'b01, 2'b10, 2'b11, 2'b00};
  localparam logic [1:0] E_OUT [4] = '{2'b10, 2'b11, 2'b01, 2'b00};
  localparam logic [1:0] S_IN  [4] = '{2'b11, 2'b01, 2'b10, 2'b00};
  localparam logic [1:0] W_OUT [4] = '{2'b01, 2'b11, 2'b10, 2'b00};
  // Nout after = f(Wout before): W->N, N->E, S->W map to equal codes.
  localparam logic [1:0] WI [4] = '{2'b00, 2'b01, 2'b10, 2'b11};
  localparam logic [1:0] NO [4] = '{2'b00, 2'b01, 2'b10, 2'b11};
  // Sout after = f(Eout before): N->E, E->S, S->W.
  localparam logic [1:0] EI [4] = '{2'b00, 2'b01, 2'b10, 2'b11};
  localparam logic [1:0] SO [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  initial begin
    cell_t c;
    en = 1'b1; maxcol = 6'd63; in_valid = 1'b0; in_cell = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    for (int i = 0; i < 8; i++) begin
      c = rand_cell();
      c.x1 = X13_IN[i]; c.x3 = X13_IN[(i + 3) % 8]; c.x2 = X2_IN[i];
      c.nout = N_IN[i % 4]; c.sout = S_IN[i % 4];
      c.wout = WI[i % 4]; c.eout = EI[i % 4];
      apply(c);
      check("x1", out_cell.x1, X13_OUT[i]);
      check("x3", out_cell.x3, X13_OUT[(i + 3) % 8]);
      check("x2", out_cell.x2, X2_OUT[i]);
      check("eout", out_cell.eout, E_OUT[i % 4]);
      check("wout", out_cell.wout, W_OUT[i % 4]);
      check("nout", out_cell.nout, NO[i % 4]);
      check("sout", out_cell.sout, SO[i % 4]);
      check("function bits", {out_cell.cs, out_cell.rp, out_cell.y2, out_cell.y3, out_cell.spare},
                             {c.cs, c.rp, c.y2, c.y3, c.spare});
    end

    // Coordinates.
    for (int i = 0; i < 40; i++) begin
      c = rand_cell();
      maxcol = coord_t'($urandom);
      apply(c);
      check("col = maxcol - r", out_cell.col, coord_t'(maxcol - c.row));
      check("row = c", out_cell.row, c.col);
    end

    // Worked example, cell #1 after the two flips: W4,S,N / W,N,F,S at <0,2>.
    maxcol = 6'd4;
    c = rand_cell();
    c.x1 = 3'b100; c.x2 = 3'b000; c.x3 = 3'b011;
    c.nout = 2'b11; c.eout = 2'b01; c.sout = 2'b00; c.wout = 2'b11;
    c.col = 6'd0; c.row = 6'd2;
    apply(c);
    check("ex x1 N4", out_cell.x1, 3'b111);
    check("ex x2 W", out_cell.x2, 3'b001);
    check("ex x3 E", out_cell.x3, 3'b001);
    check("ex nout W", out_cell.nout, 2'b11);
    check("ex eout N", out_cell.eout, 2'b01);
    check("ex sout E", out_cell.sout, 2'b01);
    check("ex wout F", out_cell.wout, 2'b00);
    check("ex col", out_cell.col, 6'd2);
    check("ex row", out_cell.row, 6'd0);

    // Disabled: unchanged.
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
