// tb_rd_fpga: operation-level test of the R/D FPGA programming interface, reduced
// to 64 rows of 8 words x 32 bits and a 16-line cache. Operations are issued one per
// clock, back to back, and counted; a model array here tracks what every row must
// hold. Scenarios and the operation counts they must take:
//   load 3-row configuration A at row 0             3*(8+1)+1 = 28
//   load 2-row configuration B relocated to row 3   2*(8+1)+1 = 19
//   load 3-row configuration C at row 7, then move it up to row 5 (overlapping,
//   topmost row first)                               3*2+2 = 8
//   move C down one row (bottommost row first)       3*2+2 = 8
//   patch 3 words in rows 1 and 2 of A               2*2+3+1 = 8
//   load 3-row configuration D from the cache to row 20   3+2 = 5
// plus staging-area read-back and a cache miss that must leave everything alone.
module tb_rd_fpga;
  import rd_pkg::*;

  localparam int ROWS = 64, WORD_W = 32, WORDS = 8, RB = WORDS * WORD_W;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  rd_op_e        op;
  logic [5:0]    row_addr, phys_row;
  logic [2:0]    word_addr;
  logic          ofs_sel, wb;
  logic [7:0]    cfg_id;
  logic [31:0]   wdata, rdata;
  logic          rdata_valid, cache_hit, cache_miss;
  logic [RB-1:0] cfg_bits [ROWS];

  int            checks = 0, failures = 0, nops = 0;
  int            hits = 0, misses = 0;
  logic [RB-1:0] model [int];

  always #5 clk = ~clk;

  rd_fpga #(.ROWS(ROWS), .WORD_W(WORD_W), .WORDS(WORDS), .CACHE_ENTRIES(16)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
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

  // One operation in one clock; calls run back to back, each ending on the
  // negedge where the next one starts.
  task automatic run(rd_op_e o, int ra = 0, int wa = 0, logic sel = 0, logic w = 0,
                     int cfg = 0, logic [31:0] d = '0);
    op = o; row_addr = 6'(ra); word_addr = 3'(wa); ofs_sel = sel; wb = w;
    cfg_id = 8'(cfg); wdata = d;
    #1;
    if (o == RD_CACHE_LOAD) begin
      if (cache_hit) hits++;
      if (cache_miss) misses++;
    end
    nops++;
    @(negedge clk);
  endtask

  function automatic logic [RB-1:0] rand_row();
    logic [RB-1:0] r;
    for (int i = 0; i < WORDS; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  task automatic load_config(logic [RB-1:0] cfg [], int ofs);
    run(RD_WOFS_WR, 0, 0, 0, 0, 0, 32'(ofs));
    foreach (cfg[r]) begin
      for (int w = WORDS - 1; w >= 0; w--) run(RD_STAGE_WR, 0, w, 0, 0, 0, cfg[r][w*32 +: 32]);
      run(RD_ARRAY_WR, r, 0, OFS_WRITE);
      model[r + ofs] = cfg[r];
    end
  endtask

  task automatic move_config(int nrows, int from, int to);
    run(RD_ROFS_WR, 0, 0, 0, 0, 0, 32'(from));
    run(RD_WOFS_WR, 0, 0, 0, 0, 0, 32'(to));
    if (to < from) begin
      for (int r = 0; r < nrows; r++) begin
        run(RD_ARRAY_RD, r, 0, OFS_READ);
        run(RD_ARRAY_WR, r, 0, OFS_WRITE);
      end
    end else begin
      for (int r = nrows - 1; r >= 0; r--) begin
        run(RD_ARRAY_RD, r, 0, OFS_READ);
        run(RD_ARRAY_WR, r, 0, OFS_WRITE);
      end
    end
  endtask

  task automatic check_model(string what);
    foreach (model[a]) check(what, cfg_bits[a], model[a]);
  endtask

  initial begin
    logic [RB-1:0] a [] = new[3];
    logic [RB-1:0] b [] = new[2];
    logic [RB-1:0] c [] = new[3];
    logic [RB-1:0] d [] = new[3];
    op = RD_NOP; row_addr = '0; word_addr = '0; ofs_sel = 1'b0; wb = 1'b0; cfg_id = '0; wdata = '0;
    foreach (a[i]) a[i] = rand_row();
    foreach (b[i]) b[i] = rand_row();
    foreach (c[i]) c[i] = rand_row();
    foreach (d[i]) d[i] = rand_row();
    #12 rst_n = 1'b1;
    @(negedge clk);

    // Configuration A at row 0.
    nops = 0;
    load_config(a, 0);
    check("A: 28 operations", nops, 3 * (WORDS + 1) + 1);
    check_model("A in rows 0-2");

    // Configuration B relocated below A with write offset 3.
    nops = 0;
    load_config(b, 3);
    check("B: 19 operations", nops, 2 * (WORDS + 1) + 1);
    check_model("B in rows 3-4");
    check("physical row of B row 1", phys_row, 4);

    // Staging area read-back: it still holds B's last row.
    for (int w = 0; w < WORDS; w++) begin
      run(RD_STAGE_RD, 0, w);
      check("read-back valid", rdata_valid, 1);
      check("read-back word", rdata, b[1][w*32 +: 32]);
    end

    // Configuration C at row 7, then defragment it up to row 5 (overlaps row 7).
    load_config(c, 7);
    nops = 0;
    move_config(3, 7, 5);
    check("move up: 8 operations", nops, 3 * 2 + 2);
    model[5] = c[0]; model[6] = c[1]; model[7] = c[2];
    model.delete(8); model.delete(9);
    check_model("C moved to rows 5-7");
    check("A untouched", cfg_bits[0], a[0]);

    // Move C down by one (overlaps two rows), bottommost row first.
    nops = 0;
    move_config(3, 5, 6);
    check("move down: 8 operations", nops, 3 * 2 + 2);
    model.delete(5);
    model[6] = c[0]; model[7] = c[1]; model[8] = c[2];
    check_model("C moved to rows 6-8");

    // Partial run-time reconfiguration of A (offset 0): rows 1 and 2, 3 words.
    nops = 0;
    run(RD_WOFS_WR, 0, 0, 0, 0, 0, 32'd0);
    run(RD_ARRAY_RD, 1, 0, OFS_WRITE);
    run(RD_STAGE_WR, 0, 2, 0, 0, 0, 32'hF1F0_0002);
    run(RD_STAGE_WR, 0, 5, 0, 0, 0, 32'hF1F0_0005);
    run(RD_ARRAY_WR, 1, 0, OFS_WRITE);
    run(RD_ARRAY_RD, 2, 0, OFS_WRITE);
    run(RD_STAGE_WR, 0, 0, 0, 0, 0, 32'hF2F0_0000);
    run(RD_ARRAY_WR, 2, 0, OFS_WRITE);
    check("partial: 8 operations", nops, 2 * 2 + 3 + 1);
    model[1][2*32 +: 32] = 32'hF1F0_0002;
    model[1][5*32 +: 32] = 32'hF1F0_0005;
    model[2][0 +: 32]    = 32'hF2F0_0000;
    check_model("A patched");

    // Put D (configuration number 4) into the cache, row by row.
    foreach (d[r]) begin
      for (int w = 0; w < WORDS; w++) run(RD_STAGE_WR, 0, w, 0, 0, 0, d[r][w*32 +: 32]);
      run(RD_CACHE_FILL, r, 0, 0, 0, 4);
    end
    check_model("cache fill leaves array alone");

    // Cached load of D to row 20: offset write, 3 overlapped loads, final write.
    nops = 0;
    run(RD_WOFS_WR, 0, 0, 0, 0, 0, 32'd20);
    run(RD_CACHE_LOAD, 0, 0, OFS_WRITE, 1'b0, 4);
    run(RD_CACHE_LOAD, 1, 0, OFS_WRITE, 1'b1, 4);
    run(RD_CACHE_LOAD, 2, 0, OFS_WRITE, 1'b1, 4);
    run(RD_ARRAY_WR, 2, 0, OFS_WRITE);
    check("cached load: 5 operations", nops, 3 + 2);
    check("three hits", hits, 3);
    model[20] = d[0]; model[21] = d[1]; model[22] = d[2];
    check_model("D in rows 20-22");

    // Miss: configuration 9 was never cached.
    run(RD_CACHE_LOAD, 0, 0, OFS_WRITE, 1'b1, 9);
    check("one miss", misses, 1);
    run(RD_STAGE_RD, 0, 3);
    check("staging kept on miss", rdata, d[2][3*32 +: 32]);
    check_model("array kept on miss");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
