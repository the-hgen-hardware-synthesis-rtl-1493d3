// spam2_decoder: instruction decode logic of the SPAM2 processor.
//
// The decoder is the disassembly function of the instruction set: it matches
// the constant bits of every operation's signature against the instruction
// word and raises one decode line per operation ("identification code" of the
// field). Each decode line is a two-level AND of instruction bits; register
// operands are the RA/RB/RC and SRC/DEST subfields themselves and need no
// reversal beyond the bus location code split done in spam2_bus.
//
// The DMf and IM fields own no bits of their own: DM_ld/DM_st/IM_ld/IM_st
// borrow the DB1 and DB2 fields (DB1 carries the data, DB2 the address, its
// DEST being the DM or IM address code). When a memory operation is decoded
// it takes precedence and the DB1/DB2 move decode lines are forced off, as
// the precedence predicates of the decode method require.
//
// Encodings that match no operation raise the field's illegal flag and leave
// all of that field's decode lines low, so the field does nothing. The
// `violation` output flags words that break the instruction-set constraints:
// a bus move whose source and destination are in the same register file, and
// two bus writes to the same register. Which malformed words count as illegal,
// and that illegal fields are inert, are this design's choices; the instruction set
// leaves invalid words undefined.
//
// Purely combinational; no clock.
module spam2_decoder
  import spam2_pkg::*;
(
  input  instr_t   instr,
  output unit_id_t u1_id,
  output unit_id_t u2_id,
  output unit_id_t u3_id,
  output bus_id_t  db1_id,
  output bus_id_t  db2_id,
  output mem_id_t  dm_id,
  output mem_id_t  im_id,
  output logic     db1_en,     // DB1 transfers a value this cycle
  output logic     db2_en,     // DB2 transfers a value this cycle
  output logic     illegal,    // some field held an encoding of no operation
  output logic     violation   // the word breaks an instruction-set constraint
);

  logic u1_ill, u3_ill, db1_ill, db2_ill, mem_ill;

  function automatic logic is_reg(input logic [4:0] loc);
    return loc < 5'h0C;
  endfunction

  // ---------------------------------------------------------------- units
  always_comb begin
    u1_id     = '0;
    u1_id.add = instr.u1.op == U1_OP_ADD;
    u1_id.sub = instr.u1.op == U1_OP_SUB;
    u1_id.nop = instr.u1.op == U1_OP_NOP;
    u1_ill    = instr.u1.op == 2'd2;

    u2_id     = '0;
    u2_id.add = instr.u2.op == U2_OP_ADD;
    u2_id.sub = instr.u2.op == U2_OP_SUB;
    u2_id.mul = instr.u2.op == U2_OP_MUL;
    u2_id.nop = instr.u2.op == U2_OP_NOP;

    u3_id     = '0;
    u3_id.add = instr.u3.op == U3_OP_ADD;
    u3_id.mul = instr.u3.op == U3_OP_MUL;
    u3_id.nop = instr.u3.op == U3_OP_NOP;
    u3_ill    = instr.u3.op == 2'd2;
  end

  // ------------------------------------------------------ memory operations
  logic dm_sel, im_sel, mem_sel;
  logic dm_ld, dm_st, im_ld, im_st;

  always_comb begin
    dm_sel = instr.db2.dest == LOC_DM_ADDR;
    im_sel = instr.db2.dest == LOC_IM_ADDR;
    mem_sel = dm_sel | im_sel;

    dm_ld = dm_sel && is_reg(instr.db2.src) &&
            instr.db1.src == LOC_DM_DATA && is_reg(instr.db1.dest);
    dm_st = dm_sel && is_reg(instr.db2.src) &&
            instr.db1.dest == LOC_DM_DATA && is_reg(instr.db1.src);
    im_ld = im_sel && is_reg(instr.db2.src) &&
            instr.db1.src == LOC_IM_DATA && is_reg(instr.db1.dest);
    im_st = im_sel && is_reg(instr.db2.src) &&
            instr.db1.dest == LOC_IM_DATA && is_reg(instr.db1.src);

    dm_id   = '{ld: dm_ld, st: dm_st};
    im_id   = '{ld: im_ld, st: im_st};
    mem_ill = mem_sel && !(dm_ld || dm_st || im_ld || im_st);
  end

  // ------------------------------------------------------------ data buses
  // A bus field on its own is a move (register source), an immediate move
  // (SRC = 0x10 | INT) or a nop (DEST = 0x1F). Disabled by any memory op.
  function automatic bus_id_t decode_bus(input bus_field_t f);
    bus_id_t id;
    id.nop     = f.dest == LOC_NOP;
    id.move    = is_reg(f.dest) && is_reg(f.src);
    id.move_im = is_reg(f.dest) && f.src[4];
    return id;
  endfunction

  bus_id_t db1_raw, db2_raw;

  always_comb begin
    db1_raw = decode_bus(instr.db1);
    db2_raw = decode_bus(instr.db2);
    db1_id  = mem_sel ? '0 : db1_raw;
    db2_id  = mem_sel ? '0 : db2_raw;
    db1_ill = !mem_sel && (db1_raw == '0);
    db2_ill = !mem_sel && (db2_raw == '0);

    db1_en  = db1_id.move | db1_id.move_im | dm_ld | dm_st | im_ld | im_st;
    db2_en  = db2_id.move | db2_id.move_im | dm_ld | dm_st | im_ld | im_st;

    illegal = u1_ill | u3_ill | db1_ill | db2_ill | mem_ill;

    violation =
      // a bus has one port per register file: no move within one file
      (db1_id.move && loc_rf(instr.db1.src) == loc_rf(instr.db1.dest)) ||
      (db2_id.move && loc_rf(instr.db2.src) == loc_rf(instr.db2.dest)) ||
      // the two buses may not write the same register
      ((db1_id.move || db1_id.move_im) && (db2_id.move || db2_id.move_im) &&
       instr.db1.dest == instr.db2.dest);
  end

endmodule
