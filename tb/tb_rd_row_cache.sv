// tb_rd_row_cache: self-checking test of the configuration row cache, reduced to
// 128-bit rows (8 lines, 6-bit row index, 4-bit configuration number) to keep
// the reference model small. Checks: empty after reset, hit and data after a fill,
// a miss when another {configuration, row} maps to the same line and after it
// evicts the first, and random fills against a model of a direct-mapped cache
// indexed by (row XOR configuration) with full tags.
module tb_rd_row_cache;
  localparam int ROW_BITS = 128;
  localparam int ENTRIES  = 8;
  localparam int RA_W     = 6;
  localparam int CFG_W    = 4;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic [CFG_W-1:0]    cfg_id;
  logic [RA_W-1:0]     row_idx;
  logic                fill, hit;
  logic [ROW_BITS-1:0] fill_data, rdata;
  int                  checks = 0, failures = 0;

  logic                m_valid [ENTRIES];
  logic [9:0]          m_tag   [ENTRIES];
  logic [ROW_BITS-1:0] m_data  [ENTRIES];

  always #5 clk = ~clk;

  rd_row_cache #(.ROW_BITS(ROW_BITS), .ENTRIES(ENTRIES), .RA_W(RA_W), .CFG_W(CFG_W)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [ROW_BITS-1:0] got, logic [ROW_BITS-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic int line_of(int c, int r);
    return (r ^ c) % ENTRIES;
  endfunction

  task automatic do_fill(int c, int r, logic [ROW_BITS-1:0] d);
    int l;
    @(negedge clk);
    cfg_id = CFG_W'(c); row_idx = RA_W'(r); fill_data = d; fill = 1'b1;
    @(negedge clk);
    fill = 1'b0;
    l = line_of(c, r);
    m_valid[l] = 1'b1; m_tag[l] = {4'(c), 6'(r)}; m_data[l] = d;
  endtask

  task automatic probe(int c, int r);
    int   l;
    logic h;
    cfg_id = CFG_W'(c); row_idx = RA_W'(r);
    #1;
    l = line_of(c, r);
    h = m_valid[l] && m_tag[l] == {4'(c), 6'(r)};
    check("hit", hit, h);
    if (h) check("data", rdata, m_data[l]);
  endtask

  initial begin
    fill = 1'b0; cfg_id = '0; row_idx = '0; fill_data = '0;
    for (int l = 0; l < ENTRIES; l++) m_valid[l] = 1'b0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    for (int r = 0; r < 16; r++) probe(1, r);

    do_fill(2, 5, {4{32'hA5A5_0005}});
    probe(2, 5);
    check("hit after fill", hit, 1);
    // (3,4) maps to the same line as (2,5): 5^2 = 7 = 4^3.
    probe(3, 4);
    check("same line, other tag misses", hit, 0);
    do_fill(3, 4, {4{32'h0000_0304}});
    probe(2, 5);
    check("evicted", hit, 0);
    probe(3, 4);

    for (int i = 0; i < 200; i++) begin
      int c, r;
      c = int'($urandom_range(15)); r = int'($urandom_range(63));
      if ($urandom_range(1)) do_fill(c, r, {$urandom, $urandom, $urandom, $urandom});
      probe(int'($urandom_range(15)), int'($urandom_range(63)));
      probe(c, r);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
