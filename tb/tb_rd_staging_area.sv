// tb_rd_staging_area: self-checking test of the staging area at its default size
// (32 words of 32 bits). Fills the row one word at a time in a random order,
// reads every word back in the same clock, checks the whole-row output, a
// whole-row load from the array side, a partial overwrite after a row load (the
// partial-reconfiguration pattern), and the priority of a word write over a row
// load in the same clock.
module tb_rd_staging_area;
  localparam int WORD_W = 32;
  localparam int WORDS  = 32;
  localparam int AW     = 5;

  logic                         clk = 1'b0;
  logic                         wr_en, row_load;
  logic [AW-1:0]                wr_addr, rd_addr;
  logic [WORD_W-1:0]            wr_data, rd_data;
  logic [WORDS-1:0][WORD_W-1:0] row_in, row_out, model;
  int                           checks = 0, failures = 0;

  always #5 clk = ~clk;

  rd_staging_area dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [WORDS*WORD_W-1:0] got, logic [WORDS*WORD_W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic write_word(int a, logic [WORD_W-1:0] d);
    @(negedge clk);
    wr_en = 1'b1; wr_addr = AW'(a); wr_data = d;
    @(negedge clk);
    wr_en = 1'b0;
    model[a] = d;
  endtask

  initial begin
    int order [WORDS];
    wr_en = 1'b0; row_load = 1'b0; wr_addr = '0; rd_addr = '0; wr_data = '0; row_in = '0;

    // Fill in a shuffled order.
    for (int i = 0; i < WORDS; i++) order[i] = i;
    order.shuffle();
    for (int i = 0; i < WORDS; i++) write_word(order[i], $urandom);
    for (int i = 0; i < WORDS; i++) begin
      rd_addr = AW'(i);
      #1;
      check("word readback", rd_data, model[i]);
    end
    check("row out after word writes", row_out, model);

    // Whole-row load.
    @(negedge clk);
    for (int i = 0; i < WORDS; i++) row_in[i] = $urandom;
    row_load = 1'b1;
    @(negedge clk);
    row_load = 1'b0;
    model = row_in;
    check("row load", row_out, model);

    // Partial overwrite of two words keeps the rest.
    write_word(3, 32'hCAFE_0003);
    write_word(17, 32'hCAFE_0017);
    check("partial overwrite", row_out, model);

    // Word write wins over a row load in the same clock.
    @(negedge clk);
    for (int i = 0; i < WORDS; i++) row_in[i] = $urandom;
    row_load = 1'b1; wr_en = 1'b1; wr_addr = 5'd9; wr_data = 32'h1234_5678;
    @(negedge clk);
    row_load = 1'b0; wr_en = 1'b0;
    model = row_in;
    model[9] = 32'h1234_5678;
    check("word write priority", row_out, model);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
