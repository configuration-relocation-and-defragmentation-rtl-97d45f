// tb_rd_row_offset: self-checking test of the offset registers, 2:1 select and
// row-address adder at the default 10-bit row address. Checks reset to zero, the
// write offset of 3 used to place a configuration under one already loaded, the
// read offset 6 / write offset 4 pair of the defragmentation example (moving a
// configuration up two rows), independence of the two registers, and random sums
// modulo 1024.
module tb_rd_row_offset;
  localparam int RA_W = 10;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            wofs_we, rofs_we, ofs_sel;
  logic [RA_W-1:0] ofs_din, row_addr, phys_row, wofs_q, rofs_q;
  int              checks = 0, failures = 0;

  always #5 clk = ~clk;

  rd_row_offset dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
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

  task automatic load(logic w, int v);
    @(negedge clk);
    ofs_din = RA_W'(v);
    wofs_we = w; rofs_we = !w;
    @(negedge clk);
    wofs_we = 1'b0; rofs_we = 1'b0;
  endtask

  initial begin
    wofs_we = 1'b0; rofs_we = 1'b0; ofs_sel = 1'b0; ofs_din = '0; row_addr = '0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    for (int s = 0; s < 2; s++) begin
      ofs_sel = 1'(s); row_addr = 10'd7; #1;
      check("reset offset is zero", phys_row, 7);
    end

    // Relocation on load: write offset 3.
    load(1'b1, 3);
    ofs_sel = 1'b0;
    for (int r = 0; r < 4; r++) begin
      row_addr = RA_W'(r); #1;
      check("write offset 3", phys_row, r + 3);
    end

    // Defragmentation: read offset 6, write offset 4.
    load(1'b0, 6);
    load(1'b1, 4);
    check("write register", wofs_q, 4);
    check("read register", rofs_q, 6);
    for (int r = 0; r < 3; r++) begin
      row_addr = RA_W'(r);
      ofs_sel = 1'b1; #1;
      check("read row", phys_row, r + 6);
      ofs_sel = 1'b0; #1;
      check("write row", phys_row, r + 4);
    end

    // Random.
    for (int i = 0; i < 100; i++) begin
      int w, rd, a;
      w = int'($urandom_range(1023)); rd = int'($urandom_range(1023));
      load(1'b1, w);
      load(1'b0, rd);
      a = int'($urandom_range(1023));
      row_addr = RA_W'(a);
      ofs_sel = 1'b0; #1;
      check("random write sum", phys_row, (a + w) % 1024);
      ofs_sel = 1'b1; #1;
      check("random read sum", phys_row, (a + rd) % 1024);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
