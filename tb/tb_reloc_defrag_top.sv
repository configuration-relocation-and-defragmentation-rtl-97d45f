// tb_reloc_defrag_top: end-to-end test of the whole design with every parameter at
// its default: 1024 configuration rows of 32 x 32-bit words, a 64-line row cache,
// 32 x 32 cells of virtualised I/O, and the 6200 relocation pipeline.
// R/D side: configurations are loaded (one at row 0, one relocated), one is
// defragmented upwards over an overlap and then moved down, one is patched in place,
// one is loaded from the cache; every sequence must take the published number of
// operations and leave the array as a model here predicts. The output-enable CAM
// then lets the relocated configuration, and only it, drive the output pins, and
// cells read their inputs from the column lines whatever their row.
// 6200 side: the worked cell is relocated by all five stages and must come out as
// the published bytes at <4,1>, 7 clocks after it went in.
// Each mechanism is counted; one that never happens counts as a failure.
module tb_reloc_defrag_top;
  import rd_pkg::*;
  import reloc6200_pkg::*;

  localparam int ROWS = 1024, WORDS = 32, RB = 1024;
  localparam int CELL_ROWS = 32, COLS = 32;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  rd_op_e        rd_op;
  logic [9:0]    rd_row_addr, rd_phys_row;
  logic [4:0]    rd_word_addr;
  logic          rd_ofs_sel, rd_wb;
  logic [7:0]    rd_cfg_id;
  logic [31:0]   rd_wdata, rd_rdata;
  logic          rd_rdata_valid, rd_cache_hit, rd_cache_miss;
  logic [RB-1:0] cfg_bits [ROWS];

  logic [COLS-1:0][3:0]                       vio_ext_in;
  logic [COLS-1:0][1:0]                       vio_ext_out;
  logic [CELL_ROWS-1:0][COLS-1:0][1:0][1:0]   vio_in_sel;
  logic [CELL_ROWS-1:0][COLS-1:0][1:0]        vio_cell_in;
  logic [CELL_ROWS-1:0][COLS-1:0][1:0]        vio_cell_out;
  logic [1:0]                                 vio_oe_conflict;
  logic          cam_tag_we, cam_tag_valid, cam_sel_en, cam_multi_match;
  logic [4:0]    cam_tag_row;
  logic [7:0]    cam_tag_cfg, cam_sel_cfg;
  logic [1:0]    cam_tag_mask;

  logic          px_ctrl_load, px_wr_valid, px_out_valid;
  reloc_ctrl_t   px_ctrl, px_ctrl_q;
  logic [13:0]   px_wr_addr, px_out_addr;
  logic [7:0]    px_wr_data, px_out_data;

  int            checks = 0, failures = 0, nops = 0;
  int            n_reloc = 0, n_defrag_up = 0, n_defrag_down = 0, n_partial = 0;
  int            n_hit = 0, n_miss = 0, n_readback = 0, n_vio_out = 0, n_vio_in = 0;
  int            n_px_cells = 0;
  logic [RB-1:0] model [int];

  always #5 clk = ~clk;

  reloc_defrag_top dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [RB-1:0] got, logic [RB-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic run(rd_op_e o, int ra = 0, int wa = 0, logic sel = 0, logic w = 0,
                     int cfg = 0, logic [31:0] d = '0);
    rd_op = o; rd_row_addr = 10'(ra); rd_word_addr = 5'(wa); rd_ofs_sel = sel; rd_wb = w;
    rd_cfg_id = 8'(cfg); rd_wdata = d;
    #1;
    if (o == RD_CACHE_LOAD && rd_cache_hit) n_hit++;
    if (o == RD_CACHE_LOAD && rd_cache_miss) n_miss++;
    nops++;
    @(negedge clk);
    rd_op = RD_NOP;
  endtask

  function automatic logic [RB-1:0] rand_row();
    logic [RB-1:0] r;
    for (int i = 0; i < WORDS; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  task automatic load_config(logic [RB-1:0] cfg [], int ofs);
    run(RD_WOFS_WR, 0, 0, 0, 0, 0, 32'(ofs));
    foreach (cfg[r]) begin
      for (int w = 0; w < WORDS; w++) run(RD_STAGE_WR, 0, w, 0, 0, 0, cfg[r][w*32 +: 32]);
      run(RD_ARRAY_WR, r, 0, OFS_WRITE);
      model[r + ofs] = cfg[r];
    end
    if (ofs != 0) n_reloc++;
  endtask

  task automatic move_config(int nrows, int from, int to);
    run(RD_ROFS_WR, 0, 0, 0, 0, 0, 32'(from));
    run(RD_WOFS_WR, 0, 0, 0, 0, 0, 32'(to));
    for (int i = 0; i < nrows; i++) begin
      int r;
      r = (to < from) ? i : nrows - 1 - i;
      run(RD_ARRAY_RD, r, 0, OFS_READ);
      run(RD_ARRAY_WR, r, 0, OFS_WRITE);
    end
    if (to < from) n_defrag_up++; else n_defrag_down++;
  endtask

  task automatic check_model(string what);
    foreach (model[a]) check(what, cfg_bits[a], model[a]);
  endtask

  task automatic cam_put(int r, logic v, int cfg, int m);
    @(negedge clk);
    cam_tag_we = 1'b1; cam_tag_row = 5'(r); cam_tag_valid = v; cam_tag_cfg = 8'(cfg);
    cam_tag_mask = 2'(m);
    @(negedge clk);
    cam_tag_we = 1'b0;
  endtask

  initial begin
    logic [RB-1:0] a [] = new[40];
    logic [RB-1:0] b [] = new[8];
    logic [RB-1:0] c [] = new[8];
    logic [RB-1:0] d [] = new[4];
    longint        t_in;

    rd_op = RD_NOP; rd_row_addr = '0; rd_word_addr = '0; rd_ofs_sel = 1'b0; rd_wb = 1'b0;
    rd_cfg_id = '0; rd_wdata = '0;
    vio_ext_in = '0; vio_in_sel = '0; vio_cell_out = '0;
    cam_tag_we = 1'b0; cam_tag_row = '0; cam_tag_valid = 1'b0; cam_tag_cfg = '0;
    cam_tag_mask = '0; cam_sel_en = 1'b0; cam_sel_cfg = '0;
    px_ctrl_load = 1'b0; px_ctrl = '0; px_wr_valid = 1'b0; px_wr_addr = '0; px_wr_data = '0;
    foreach (a[i]) a[i] = rand_row();
    foreach (b[i]) b[i] = rand_row();
    foreach (c[i]) c[i] = rand_row();
    foreach (d[i]) d[i] = rand_row();
    #12 rst_n = 1'b1;
    @(negedge clk);

    // ---- R/D FPGA ---------------------------------------------------------------
    nops = 0;
    load_config(a, 0);
    check("A: rows*(words+1)+1 operations", nops, 40 * (WORDS + 1) + 1);
    nops = 0;
    load_config(b, 40);
    check("B relocated: rows*(words+1)+1 operations", nops, 8 * (WORDS + 1) + 1);
    check_model("A and B placed");

    for (int w = 0; w < WORDS; w += 7) begin
      run(RD_STAGE_RD, 0, w);
      check("staging read-back", rd_rdata, b[7][w*32 +: 32]);
      n_readback++;
    end

    // C loaded at row 52, then defragmented up to row 48 (overlap of 4 rows).
    load_config(c, 52);
    nops = 0;
    move_config(8, 52, 48);
    check("defragment up: rows*2+2 operations", nops, 8 * 2 + 2);
    for (int r = 56; r < 60; r++) model.delete(r);
    foreach (c[r]) model[48 + r] = c[r];
    check_model("C compacted to row 48");
    // and moved down again by 3 rows, bottom row first.
    nops = 0;
    move_config(8, 48, 51);
    check("move down: rows*2+2 operations", nops, 8 * 2 + 2);
    for (int r = 48; r < 51; r++) model.delete(r);
    foreach (c[r]) model[51 + r] = c[r];
    check_model("C moved to row 51");

    // Partial reconfiguration of B (offset 40): 2 rows, 5 words.
    nops = 0;
    run(RD_WOFS_WR, 0, 0, 0, 0, 0, 32'd40);
    run(RD_ARRAY_RD, 3, 0, OFS_WRITE);
    for (int w = 0; w < 3; w++) run(RD_STAGE_WR, 0, 10 + w, 0, 0, 0, 32'hC0DE_0000 | w);
    run(RD_ARRAY_WR, 3, 0, OFS_WRITE);
    run(RD_ARRAY_RD, 6, 0, OFS_WRITE);
    for (int w = 0; w < 2; w++) run(RD_STAGE_WR, 0, 30 + w, 0, 0, 0, 32'hBEEF_0000 | w);
    run(RD_ARRAY_WR, 6, 0, OFS_WRITE);
    check("partial: rows*2+words+1 operations", nops, 2 * 2 + 5 + 1);
    for (int w = 0; w < 3; w++) model[43][(10 + w)*32 +: 32] = 32'hC0DE_0000 | w;
    for (int w = 0; w < 2; w++) model[46][(30 + w)*32 +: 32] = 32'hBEEF_0000 | w;
    check_model("B patched");
    n_partial++;

    // Cache: store D (configuration 7), then load it from the cache to row 100.
    foreach (d[r]) begin
      for (int w = 0; w < WORDS; w++) run(RD_STAGE_WR, 0, w, 0, 0, 0, d[r][w*32 +: 32]);
      run(RD_CACHE_FILL, r, 0, 0, 0, 7);
    end
    nops = 0;
    run(RD_WOFS_WR, 0, 0, 0, 0, 0, 32'd100);
    foreach (d[r]) run(RD_CACHE_LOAD, r, 0, OFS_WRITE, r != 0, 7);
    run(RD_ARRAY_WR, 3, 0, OFS_WRITE);
    check("cached load: rows+2 operations", nops, 4 + 2);
    foreach (d[r]) model[100 + r] = d[r];
    check_model("D loaded from cache");
    run(RD_CACHE_LOAD, 0, 0, OFS_WRITE, 1'b1, 8);
    check_model("miss changes nothing");

    // ---- virtualised I/O ----------------------------------------------------------
    // Cell rows: A in 0-4 (number 1), B in 5 (number 2); each configuration's last
    // row drives both output lines. Cells output (row + column) parity patterns.
    for (int r = 0; r <= 4; r++) cam_put(r, 1'b1, 1, r == 4 ? 3 : 0);
    cam_put(5, 1'b1, 2, 3);
    for (int r = 0; r < CELL_ROWS; r++)
      for (int cc = 0; cc < COLS; cc++) vio_cell_out[r][cc] = 2'((r * 7 + cc) ^ (cc >> 1));
    for (int s = 1; s <= 2; s++) begin
      @(negedge clk);
      cam_sel_en = 1'b1; cam_sel_cfg = 8'(s);
      #1;
      check("one driver per line", {vio_oe_conflict, cam_multi_match}, 0);
      for (int cc = 0; cc < COLS; cc++)
        check("pins carry the selected configuration", vio_ext_out[cc],
              vio_cell_out[s == 1 ? 4 : 5][cc]);
      n_vio_out++;
    end
    cam_sel_en = 1'b0;
    #1;
    check("no configuration selected", vio_ext_out, 0);
    for (int cc = 0; cc < COLS; cc++) vio_ext_in[cc] = 4'($urandom);
    for (int r = 0; r < CELL_ROWS; r++)
      for (int cc = 0; cc < COLS; cc++) vio_in_sel[r][cc] = {2'(r), 2'(cc)};
    #1;
    for (int r = 0; r < CELL_ROWS; r += 5)
      for (int cc = 0; cc < COLS; cc++) begin
        check("cell input from its column", vio_cell_in[r][cc][0], vio_ext_in[cc][cc % 4]);
        check("cell input, any row", vio_cell_in[r][cc][1], vio_ext_in[cc][r % 4]);
      end
    n_vio_in++;

    // ---- 6200 relocation pipeline -----------------------------------------------
    @(negedge clk);
    px_ctrl = '{vflip: 1'b1, hflip: 1'b1, rot90: 1'b1, row_ofs: 6'd1, col_ofs: 6'd2,
                maxrow: 6'd4, maxcol: 6'd4};
    px_ctrl_load = 1'b1;
    @(negedge clk);
    px_ctrl_load = 1'b0;
    px_wr_valid = 1'b1; px_wr_addr = {6'd4, 2'd0, 6'd2}; px_wr_data = 8'h1D;
    @(negedge clk);
    px_wr_addr = {6'd4, 2'd1, 6'd2}; px_wr_data = 8'h6C;
    @(negedge clk);
    px_wr_addr = {6'd4, 2'd2, 6'd2}; px_wr_data = 8'h00;
    @(negedge clk);
    px_wr_valid = 1'b0;
    t_in = 0;
    while (!px_out_valid && t_in < 20) begin
      @(negedge clk);
      t_in++;
    end
    check("pipeline latency", t_in, 6);  // first output 7 clocks after the last input edge
    check("byte 00", {px_out_addr, px_out_data}, {6'd4, 2'd0, 6'd1, 8'hD1});
    @(negedge clk);
    check("byte 01", {px_out_addr, px_out_data}, {6'd4, 2'd1, 6'd1, 8'h75});
    @(negedge clk);
    check("byte 10", {px_out_addr, px_out_data}, {6'd4, 2'd2, 6'd1, 8'h00});
    n_px_cells++;

    // ---- every mechanism happened --------------------------------------------------
    $display("mechanisms: relocate=%0d defrag_up=%0d defrag_down=%0d partial=%0d cache_hit=%0d cache_miss=%0d readback=%0d vio_out=%0d vio_in=%0d px_cells=%0d",
             n_reloc, n_defrag_up, n_defrag_down, n_partial, n_hit, n_miss, n_readback,
             n_vio_out, n_vio_in, n_px_cells);
    check("relocation happened", n_reloc > 0, 1);
    check("defragmentation up happened", n_defrag_up > 0, 1);
    check("move down happened", n_defrag_down > 0, 1);
    check("partial reconfiguration happened", n_partial > 0, 1);
    check("cache hits happened", n_hit == 4, 1);
    check("cache miss happened", n_miss == 1, 1);
    check("read-back happened", n_readback > 0, 1);
    check("virtual output happened", n_vio_out > 0, 1);
    check("virtual input happened", n_vio_in > 0, 1);
    check("6200 relocation happened", n_px_cells > 0, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
