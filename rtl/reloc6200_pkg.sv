// reloc6200_pkg: shared types, field layout and routing-direction codes for the
// configuration relocation pipeline of a 6200-style cell array.
//
// A cell is programmed through three data bytes (column offsets 00, 01, 10 of the
// 14-bit programming address {column[5:0], column_offset[1:0], row[5:0]}):
//   byte 00: Nout[7:6] Eout[5:4] Wout[3:2] Sout[1:0]
//   byte 01: CS[7] X1[6:4] X2[1:0] at [3:2] X3[1:0] at [1:0]
//   byte 10: spare[7] RP[6] Y2[5:4] Y3[3:2] X3[2] at [1] X2[2] at [0]
// The byte layout and all multiplexer codes below follow the published tables of
// the relocation example: X1 and X3 share one input code, X2 has its own, and each
// of the four output multiplexers has its own 2-bit code. Bit 7 of byte 10 is not
// named there and is carried through untouched.
package reloc6200_pkg;

  localparam int unsigned COORD_W = 6;
  typedef logic [COORD_W-1:0] coord_t;

  // Routing directions: neighbours, length-4 lines, and the cell's function unit.
  typedef enum logic [3:0] {
    DIR_N, DIR_E, DIR_S, DIR_W, DIR_N4, DIR_E4, DIR_S4, DIR_W4, DIR_F
  } dir_e;

  // One cell in decoded form, as it travels through the pipeline.
  typedef struct packed {
    coord_t     col;
    coord_t     row;
    logic [1:0] nout;
    logic [1:0] eout;
    logic [1:0] wout;
    logic [1:0] sout;
    logic       cs;
    logic [2:0] x1;
    logic [2:0] x2;
    logic [2:0] x3;
    logic       spare;
    logic       rp;
    logic [1:0] y2;
    logic [1:0] y3;
  } cell_t;

  // CPU-supplied relocation settings, constant for a whole configuration.
  typedef struct packed {
    logic   vflip;
    logic   hflip;
    logic   rot90;
    coord_t row_ofs;   // n, two's complement, added modulo 64
    coord_t col_ofs;   // m, two's complement, added modulo 64
    coord_t maxrow;
    coord_t maxcol;
  } reloc_ctrl_t;

  // ---- direction transforms -------------------------------------------------
  function automatic dir_e dir_vflip(dir_e d);
    case (d)
      DIR_N:   return DIR_S;
      DIR_S:   return DIR_N;
      DIR_N4:  return DIR_S4;
      DIR_S4:  return DIR_N4;
      default: return d;
    endcase
  endfunction

  function automatic dir_e dir_hflip(dir_e d);
    case (d)
      DIR_E:   return DIR_W;
      DIR_W:   return DIR_E;
      DIR_E4:  return DIR_W4;
      DIR_W4:  return DIR_E4;
      default: return d;
    endcase
  endfunction

  // Clockwise: N->E, E->S, S->W, W->N.
  function automatic dir_e dir_rot90(dir_e d);
    case (d)
      DIR_N:   return DIR_E;
      DIR_E:   return DIR_S;
      DIR_S:   return DIR_W;
      DIR_W:   return DIR_N;
      DIR_N4:  return DIR_E4;
      DIR_E4:  return DIR_S4;
      DIR_S4:  return DIR_W4;
      DIR_W4:  return DIR_N4;
      default: return d;
    endcase
  endfunction

  // ---- X1 / X3 input multiplexer code ------------------------------------------
  function automatic dir_e x13_dec(logic [2:0] c);
    case (c)
      3'b011:  return DIR_N;
      3'b000:  return DIR_S;
      3'b001:  return DIR_E;
      3'b010:  return DIR_W;
      3'b111:  return DIR_N4;
      3'b101:  return DIR_S4;
      3'b110:  return DIR_E4;
      default: return DIR_W4;   // 3'b100
    endcase
  endfunction

  function automatic logic [2:0] x13_enc(dir_e d);
    case (d)
      DIR_N:   return 3'b011;
      DIR_S:   return 3'b000;
      DIR_E:   return 3'b001;
      DIR_W:   return 3'b010;
      DIR_N4:  return 3'b111;
      DIR_S4:  return 3'b101;
      DIR_E4:  return 3'b110;
      default: return 3'b100;   // DIR_W4
    endcase
  endfunction

  // ---- X2 input multiplexer code -----------------------------------------------
  function automatic dir_e x2_dec(logic [2:0] c);
    case (c)
      3'b011:  return DIR_N;
      3'b000:  return DIR_S;
      3'b010:  return DIR_E;
      3'b001:  return DIR_W;
      3'b111:  return DIR_N4;
      3'b110:  return DIR_S4;
      3'b101:  return DIR_E4;
      default: return DIR_W4;   // 3'b100
    endcase
  endfunction

  function automatic logic [2:0] x2_enc(dir_e d);
    case (d)
      DIR_N:   return 3'b011;
      DIR_S:   return 3'b000;
      DIR_E:   return 3'b010;
      DIR_W:   return 3'b001;
      DIR_N4:  return 3'b111;
      DIR_S4:  return 3'b110;
      DIR_E4:  return 3'b101;
      default: return 3'b100;   // DIR_W4
    endcase
  endfunction

  // ---- output multiplexer codes (00 is always the function unit) ------------
  // Nout selects F/N/E/W, Eout F/N/E/S, Sout F/E/W/S, Wout F/W/N/S.
  function automatic dir_e nout_dec(logic [1:0] c);
    case (c)
      2'b01:   return DIR_N;
      2'b10:   return DIR_E;
      2'b11:   return DIR_W;
      default: return DIR_F;
    endcase
  endfunction

  function automatic logic [1:0] nout_enc(dir_e d);
    case (d)
      DIR_N:   return 2'b01;
      DIR_E:   return 2'b10;
      DIR_W:   return 2'b11;
      default: return 2'b00;
    endcase
  endfunction

  function automatic dir_e eout_dec(logic [1:0] c);
    case (c)
      2'b01:   return DIR_N;
      2'b10:   return DIR_E;
      2'b11:   return DIR_S;
      default: return DIR_F;
    endcase
  endfunction

  function automatic logic [1:0] eout_enc(dir_e d);
    case (d)
      DIR_N:   return 2'b01;
      DIR_E:   return 2'b10;
      DIR_S:   return 2'b11;
      default: return 2'b00;
    endcase
  endfunction

  function automatic dir_e sout_dec(logic [1:0] c);
    case (c)
      2'b01:   return DIR_E;
      2'b10:   return DIR_W;
      2'b11:   return DIR_S;
      default: return DIR_F;
    endcase
  endfunction

  function automatic logic [1:0] sout_enc(dir_e d);
    case (d)
      DIR_E:   return 2'b01;
      DIR_W:   return 2'b10;
      DIR_S:   return 2'b11;
      default: return 2'b00;
    endcase
  endfunction

  function automatic dir_e wout_dec(logic [1:0] c);
    case (c)
      2'b01:   return DIR_W;
      2'b10:   return DIR_N;
      2'b11:   return DIR_S;
      default: return DIR_F;
    endcase
  endfunction

  function automatic logic [1:0] wout_enc(dir_e d);
    case (d)
      DIR_W:   return 2'b01;
      DIR_N:   return 2'b10;
      DIR_S:   return 2'b11;
      default: return 2'b00;
    endcase
  endfunction

  // ---- byte packing of one cell ------------------------------------------------
  function automatic logic [7:0] cell_byte(cell_t c, logic [1:0] ofs);
    case (ofs)
      2'b00:   return {c.nout, c.eout, c.wout, c.sout};
      2'b01:   return {c.cs, c.x1, c.x2[1:0], c.x3[1:0]};
      default: return {c.spare, c.rp, c.y2, c.y3, c.x3[2], c.x2[2]};
    endcase
  endfunction

  function automatic cell_t cell_from_bytes(coord_t col, coord_t row,
                                            logic [7:0] b0, logic [7:0] b1,
                                            logic [7:0] b2);
    cell_t c;
    c.col   = col;
    c.row   = row;
    c.nout  = b0[7:6];
    c.eout  = b0[5:4];
    c.wout  = b0[3:2];
    c.sout  = b0[1:0];
    c.cs    = b1[7];
    c.x1    = b1[6:4];
    c.x2    = {b2[0], b1[3:2]};
    c.x3    = {b2[1], b1[1:0]};
    c.spare = b2[7];
    c.rp    = b2[6];
    c.y2    = b2[5:4];
    c.y3    = b2[3:2];
    return c;
  endfunction

endpackage
