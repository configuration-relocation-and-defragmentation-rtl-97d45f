// tb_rd_config_array: self-checking test of the configuration SRAM array at its
// default size (1024 rows of 1024 bits). Writes random rows at random addresses,
// keeps a copy here, and checks every written row through the read port and through
// the configuration-bit output, that a write touches only its own row, and that the
// read port follows the address in the same clock.
module tb_rd_config_array;
  localparam int ROWS = 1024;
  localparam int ROW_BITS = 1024;

  logic                clk = 1'b0;
  logic                we;
  logic [9:0]          addr;
  logic [ROW_BITS-1:0] wdata, rdata;
  logic [ROW_BITS-1:0] cfg_bits [ROWS];
  logic [ROW_BITS-1:0] model [int];
  int                  checks = 0, failures = 0;

  always #5 clk = ~clk;

  rd_config_array dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [ROW_BITS-1:0] got, logic [ROW_BITS-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [ROW_BITS-1:0] rand_row();
    logic [ROW_BITS-1:0] r;
    for (int i = 0; i < ROW_BITS / 32; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    we = 1'b0; addr = '0; wdata = '0;
    for (int i = 0; i < 300; i++) begin
      int a;
      a = int'($urandom_range(ROWS - 1));
      @(negedge clk);
      we = 1'b1; addr = 10'(a); wdata = rand_row();
      model[a] = wdata;
      @(negedge clk);
      we = 1'b0;
    end
    // Every row at both ends too.
    foreach (model[a]) begin
      addr = 10'(a);
      #1;
      check("read port", rdata, model[a]);
      check("configuration bits", cfg_bits[a], model[a]);
    end
    // One more write leaves a neighbouring row alone.
    @(negedge clk);
    we = 1'b1; addr = 10'd0; wdata = rand_row(); model[0] = wdata;
    @(negedge clk);
    we = 1'b0; addr = 10'd1; wdata = '0;
    @(negedge clk);
    we = 1'b1; addr = 10'd1; wdata = rand_row(); model[1] = wdata;
    @(negedge clk);
    we = 1'b0;
    check("row 0 kept", cfg_bits[0], model[0]);
    check("row 1 written", cfg_bits[1], model[1]);
    addr = 10'd0; #1;
    check("read follows address", rdata, model[0]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
