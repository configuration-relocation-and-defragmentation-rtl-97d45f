// tb_reloc_pipeline: end-to-end test of the 6200 relocation pipeline.
// A reference model written here works on routing directions, not codes: every
// multiplexer code is looked up in tables of this testbench, each enabled movement
// maps a direction d to T(d) and an output multiplexer's source s at side d to
// T(s) at side T(d), and coordinates follow the flip / rotate / offset rules.
// Checked: the worked cell #1 example byte for byte (all five stages on), the
// nine-cell example configuration's final cell positions, random cells under
// random settings sent back to back, and the latency of 7 clocks from a cell's
// last input write to its first output write.
module tb_reloc_pipeline;
  import reloc6200_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        ctrl_load;
  reloc_ctrl_t ctrl_in, ctrl_q;
  logic        wr_valid;
  logic [13:0] wr_addr;
  logic [7:0]  wr_data;
  logic        out_valid;
  logic [13:0] out_addr;
  logic [7:0]  out_data;
  int          checks = 0, failures = 0;
  longint      cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  reloc_pipeline dut (.*);

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

  // ---- reference model --------------------------------------------------------
  // Direction index: 0 N, 1 E, 2 S, 3 W, 4 N4, 5 E4, 6 S4, 7 W4, 8 F.
  localparam logic [2:0] C13 [8] = '{3'b011, 3'b001, 3'b000, 3'b010, 3'b111, 3'b110, 3'b101, 3'b100};
  localparam logic [2:0] C2  [8] = '{3'b011, 3'b010, 3'b000, 3'b001, 3'b111, 3'b101, 3'b110, 3'b100};
  // Output multiplexer codes per side (N,E,S,W) for source directions N,E,S,W,F;
  // 3 marks a source the side cannot select.
  localparam logic [2:0] OC [4][5] = '{
    '{3'd1, 3'd2, 3'd7, 3'd3, 3'd0},   // Nout: N01 E10 W11
    '{3'd1, 3'd2, 3'd3, 3'd7, 3'd0},   // Eout: N01 E10 S11
    '{3'd7, 3'd1, 3'd3, 3'd2, 3'd0},   // Sout: E01 W10 S11
    '{3'd2, 3'd7, 3'd3, 3'd1, 3'd0}};  // Wout: N10 W01 S11
  localparam int VF [9] = '{2, 1, 0, 3, 6, 5, 4, 7, 8};
  localparam int HF [9] = '{0, 3, 2, 1, 4, 7, 6, 5, 8};
  localparam int RT [9] = '{1, 2, 3, 0, 5, 6, 7, 4, 8};

  typedef struct {
    int x1, x2, x3;
    int src [4];          // source direction of Nout, Eout, Sout, Wout (0..3 or 8)
    int col, row;
    logic cs, rp, spare;
    logic [1:0] y2, y3;
  } mcell_t;

  function automatic int dec13(logic [2:0] c);
    for (int d = 0; d < 8; d++) if (C13[d] == c) return d;
    return -1;
  endfunction
  function automatic int dec2(logic [2:0] c);
    for (int d = 0; d < 8; d++) if (C2[d] == c) return d;
    return -1;
  endfunction
  function automatic int decout(int side, logic [1:0] c);
    if (c == 2'b00) return 8;
    for (int d = 0; d < 4; d++) if (OC[side][d] == {1'b0, c}) return d;
    return -1;
  endfunction
  function automatic logic [1:0] encout(int side, int d);
    int k;
    k = (d == 8) ? 4 : d;
    return OC[side][k][1:0];
  endfunction

  function automatic mcell_t move(mcell_t c, int kind);  // 0 vflip 1 hflip 2 rot
    mcell_t n;
    int     t [9];
    n = c;
    for (int i = 0; i < 9; i++) t[i] = (kind == 0) ? VF[i] : (kind == 1) ? HF[i] : RT[i];
    n.x1 = t[c.x1]; n.x2 = t[c.x2]; n.x3 = t[c.x3];
    for (int s = 0; s < 4; s++) n.src[t[s]] = t[c.src[s]];
    return n;
  endfunction

  function automatic mcell_t model(mcell_t c, reloc_ctrl_t k);
    mcell_t n;
    int     oc;
    n = c;
    if (k.vflip) begin n = move(n, 0); n.row = (int'(k.maxrow) - n.row) & 63; end
    if (k.hflip) begin n = move(n, 1); n.col = (int'(k.maxcol) - n.col) & 63; end
    if (k.rot90) begin
      n  = move(n, 2);
      oc = n.col;
      n.col = (int'(k.maxcol) - n.row) & 63;
      n.row = oc;
    end
    n.row = (n.row + int'(k.row_ofs)) & 63;
    n.col = (n.col + int'(k.col_ofs)) & 63;
    return n;
  endfunction

  function automatic logic [7:0] mbyte(mcell_t c, int ofs);
    logic [2:0] x2c, x3c;
    x2c = C2[c.x2];
    x3c = C13[c.x3];
    case (ofs)
      0:       return {encout(0, c.src[0]), encout(1, c.src[1]), encout(3, c.src[3]), encout(2, c.src[2])};
      1:       return {c.cs, C13[c.x1], x2c[1:0], x3c[1:0]};
      default: return {c.spare, c.rp, c.y2, c.y3, x3c[2], x2c[2]};
    endcase
  endfunction

  function automatic mcell_t rand_mcell();
    mcell_t c;
    int     pick;
    c.x1 = int'($urandom_range(7)); c.x2 = int'($urandom_range(7)); c.x3 = int'($urandom_range(7));
    for (int s = 0; s < 4; s++) begin
      // a source other than the side's own opposite direction, or F
      do pick = int'($urandom_range(4)); while (pick < 4 && OC[s][pick] == 3'd7);
      c.src[s] = (pick == 4) ? 8 : pick;
    end
    c.col = int'($urandom_range(63)); c.row = int'($urandom_range(63));
    c.cs = 1'($urandom); c.rp = 1'($urandom); c.spare = 1'($urandom);
    c.y2 = 2'($urandom); c.y3 = 2'($urandom);
    return c;
  endfunction

  // ---- stimulus and scoreboard -----------------------------------------------
  logic [21:0] exp_q [$];
  longint      last_in_cyc [$];
  int          lat_checked = 0;

  task automatic send_cell(mcell_t c);
    for (int o = 0; o < 3; o++) begin
      @(negedge clk);
      wr_valid = 1'b1;
      wr_addr  = {6'(c.col), 2'(o), 6'(c.row)};
      wr_data  = mbyte(c, o);
    end
    @(posedge clk);
    last_in_cyc.push_back(cyc);
    @(negedge clk);
    wr_valid = 1'b0;
  endtask

  task automatic expect_cell(mcell_t c);
    mcell_t m;
    m = model(c, ctrl_q);
    for (int o = 0; o < 3; o++) exp_q.push_back({6'(m.col), 2'(o), 6'(m.row), mbyte(m, o)});
  endtask

  int ocount = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (ocount % 3 == 0 && last_in_cyc.size() > 0) begin
        longint t0;
        t0 = last_in_cyc.pop_front();
        check("latency 7 clocks", cyc - t0, 7);
      end
      ocount++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %0h %0h", out_addr, out_data);
      end else begin
        logic [21:0] e;
        e = exp_q.pop_front();
        check("output write", {out_addr, out_data}, e);
      end
    end
  end

  task automatic set_ctrl(reloc_ctrl_t k);
    @(negedge clk);
    ctrl_in   = k;
    ctrl_load = 1'b1;
    @(negedge clk);
    ctrl_load = 1'b0;
  endtask

  task automatic drain();
    repeat (12) @(negedge clk);
    check("all writes out", exp_q.size(), 0);
  endtask

  // Nine-cell example: input positions and expected final positions, cell k at index k-1.
  localparam int EX_C [9] = '{4, 3, 3, 2, 2, 2, 1, 1, 1};
  localparam int EX_R [9] = '{2, 1, 2, 0, 1, 2, 0, 1, 2};
  localparam int FX_C [9] = '{4, 3, 4, 2, 3, 4, 2, 3, 4};
  localparam int FX_R [9] = '{1, 2, 2, 3, 3, 3, 4, 4, 4};

  initial begin
    reloc_ctrl_t k;
    mcell_t      c;
    ctrl_load = 1'b0; ctrl_in = '0; wr_valid = 1'b0; wr_addr = '0; wr_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("reset maxrow", ctrl_q.maxrow, 63);
    check("reset maxcol", ctrl_q.maxcol, 63);

    // Worked example: all stages on, 5x5 array, n = 1, m = 2.
    k = '{vflip: 1'b1, hflip: 1'b1, rot90: 1'b1, row_ofs: 6'd1, col_ofs: 6'd2,
          maxrow: 6'd4, maxcol: 6'd4};
    set_ctrl(k);
    exp_q.push_back({6'd4, 2'd0, 6'd1, 8'hD1});  // Nout W, Eout N, Wout F, Sout E
    exp_q.push_back({6'd4, 2'd1, 6'd1, 8'h75});  // CS 0, X1 N4, X2 W, X3 E
    exp_q.push_back({6'd4, 2'd2, 6'd1, 8'h00});
    @(negedge clk);
    wr_valid = 1'b1; wr_addr = {6'd4, 2'd0, 6'd2}; wr_data = 8'h1D;  // F, N, S, E
    @(negedge clk);
    wr_addr = {6'd4, 2'd1, 6'd2}; wr_data = 8'h6C;                   // X1 E4, X2 N, X3 S
    @(negedge clk);
    wr_addr = {6'd4, 2'd2, 6'd2}; wr_data = 8'h00;
    @(posedge clk);
    last_in_cyc.push_back(cyc);
    @(negedge clk);
    wr_valid = 1'b0;
    drain();

    // Nine-cell example: positions.
    for (int i = 0; i < 9; i++) begin
      mcell_t m;
      c = rand_mcell();
      c.col = EX_C[i]; c.row = EX_R[i];
      m = model(c, ctrl_q);
      check("example final col", m.col, FX_C[i]);
      check("example final row", m.row, FX_R[i]);
      expect_cell(c);
      send_cell(c);
    end
    drain();

    // Random settings, random cells back to back.
    for (int t = 0; t < 12; t++) begin
      k = reloc_ctrl_t'({$urandom, $urandom});
      set_ctrl(k);
      for (int i = 0; i < 20; i++) begin
        c = rand_mcell();
        expect_cell(c);
        send_cell(c);
      end
      drain();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
