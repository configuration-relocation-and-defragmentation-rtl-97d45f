// tb_rd_vio_oe_cam: self-checking test of the per-row configuration-number CAM that
// drives the output enables (32 rows, 2 lines, 8-bit configuration numbers).
// Checks: nothing enabled after reset; selecting a configuration enables only the
// lines of its rows whose mask allows them; nothing without `sel_en`; an
// invalidated row stops matching; and `multi_match` when two rows of one
// configuration claim the same line.
module tb_rd_vio_oe_cam;
  localparam int CELL_ROWS = 32, OUT_LINES = 2, CFG_W = 8;

  logic                                clk = 1'b0;
  logic                                rst_n = 1'b0;
  logic                                tag_we, tag_valid, sel_en, multi_match;
  logic [4:0]                          tag_row;
  logic [CFG_W-1:0]                    tag_cfg, sel_cfg;
  logic [OUT_LINES-1:0]                tag_mask;
  logic [CELL_ROWS-1:0][OUT_LINES-1:0] row_oe, exp_oe;
  int checks = 0, failures = 0;

  // reference copy of the entries
  logic       m_v [CELL_ROWS];
  logic [7:0] m_c [CELL_ROWS];
  logic [1:0] m_m [CELL_ROWS];

  always #5 clk = ~clk;

  rd_vio_oe_cam dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic put(int r, logic v, int c, int m);
    @(negedge clk);
    tag_we = 1'b1; tag_row = 5'(r); tag_valid = v; tag_cfg = 8'(c); tag_mask = 2'(m);
    @(negedge clk);
    tag_we = 1'b0;
    m_v[r] = v; m_c[r] = 8'(c); m_m[r] = 2'(m);
  endtask

  task automatic probe(logic en, int c);
    logic [1:0] used;
    logic       mm;
    sel_en = en; sel_cfg = 8'(c);
    #1;
    used = '0; mm = 1'b0;
    for (int r = 0; r < CELL_ROWS; r++) begin
      exp_oe[r] = (en && m_v[r] && m_c[r] == 8'(c)) ? m_m[r] : 2'b00;
      if ((used & exp_oe[r]) != 0) mm = 1'b1;
      used |= exp_oe[r];
    end
    check("row enables", row_oe, exp_oe);
    check("multi match", multi_match, mm);
  endtask

  initial begin
    tag_we = 1'b0; tag_row = '0; tag_valid = 1'b0; tag_cfg = '0; tag_mask = '0;
    sel_en = 1'b0; sel_cfg = '0;
    for (int r = 0; r < CELL_ROWS; r++) begin m_v[r] = 0; m_c[r] = 0; m_m[r] = 0; end
    #12 rst_n = 1'b1;
    probe(1'b1, 0);
    check("nothing after reset", row_oe, 0);

    // Configuration 5 in rows 3..6, output row 6 drives both lines.
    for (int r = 3; r <= 6; r++) put(r, 1'b1, 5, r == 6 ? 3 : 0);
    // Configuration 9 in rows 7..8, row 8 drives line 0, row 7 line 1.
    put(7, 1'b1, 9, 2);
    put(8, 1'b1, 9, 1);
    probe(1'b1, 5);
    check("config 5 row 6", row_oe[6], 2'b11);
    check("config 5 single row", multi_match, 0);
    probe(1'b1, 9);
    check("config 9 rows 7,8", {row_oe[8], row_oe[7]}, 4'b0110);
    probe(1'b0, 9);
    check("no select", row_oe, 0);
    put(6, 1'b0, 5, 3);
    probe(1'b1, 5);
    check("invalidated", row_oe, 0);
    put(10, 1'b1, 9, 1);
    probe(1'b1, 9);
    check("two rows on line 0", multi_match, 1);

    for (int i = 0; i < 300; i++) begin
      put(int'($urandom_range(31)), 1'($urandom), int'($urandom_range(7)), int'($urandom_range(3)));
      probe(1'($urandom), int'($urandom_range(7)));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
