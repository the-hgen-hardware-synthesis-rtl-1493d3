// spam2_pkg: types and constants shared by the SPAM2 processor.
//
// SPAM2 is a small VLIW load/store machine with three 8-bit arithmetic units
// (U1, U2, U3), each owning a 4-entry register file, and two 8-bit data buses
// (DB1, DB2) that move values between the register files, the 32 x 8 data
// memory and the 256 x 44 instruction memory.
//
// The 44-bit instruction word holds five fields, most significant first:
//   U1 [43:36]  U2 [35:28]  U3 [27:20]     each OP[2] RA[2] RB[2] RC[2]
//   DB1[19:10]  DB2[9:0]                   each SRC[5] DEST[5]
// Field order, widths, storage sizes, operation codes and the bus location
// codes below follow the architecture's machine description. The decoded
// identification-code structs are this design's own representation.
package spam2_pkg;

  // Storage sizes
  localparam int unsigned DW       = 8;    // datapath width
  localparam int unsigned IW       = 44;   // instruction word width (0x2C)
  localparam int unsigned PCW      = 8;    // program counter width
  localparam int unsigned RF_DEPTH = 4;    // registers per register file
  localparam int unsigned DM_DEPTH = 32;   // data memory words (0x20)
  localparam int unsigned IM_DEPTH = 256;  // instruction memory words (0x100)
  localparam int unsigned NUM_RF   = 3;

  // Instruction word fields
  typedef struct packed {
    logic [1:0] op;
    logic [1:0] ra;
    logic [1:0] rb;
    logic [1:0] rc;   // destination register
  } unit_field_t;

  typedef struct packed {
    logic [4:0] src;
    logic [4:0] dest;
  } bus_field_t;

  typedef struct packed {
    unit_field_t u1;
    unit_field_t u2;
    unit_field_t u3;
    bus_field_t  db1;
    bus_field_t  db2;
  } instr_t;

  // Operation codes of the unit fields (OP subfield)
  localparam logic [1:0] U1_OP_ADD = 2'd0, U1_OP_SUB = 2'd1, U1_OP_NOP = 2'd3;
  localparam logic [1:0] U2_OP_ADD = 2'd0, U2_OP_SUB = 2'd1, U2_OP_MUL = 2'd2,
                         U2_OP_NOP = 2'd3;
  localparam logic [1:0] U3_OP_ADD = 2'd0, U3_OP_MUL = 2'd1, U3_OP_NOP = 2'd3;

  // Bus location codes (SRC / DEST subfields)
  //   0x00-0x03 U1.R0-R3, 0x04-0x07 U2.R0-R3, 0x08-0x0B U3.R0-R3
  //   0x0C DM data, 0x0D DM address, 0x0E IM data, 0x0F IM address
  //   SRC 0x10-0x1F: 4-bit immediate in SRC[3:0];  DEST 0x1F: bus nop
  localparam logic [4:0] LOC_DM_DATA = 5'h0C;
  localparam logic [4:0] LOC_DM_ADDR = 5'h0D;
  localparam logic [4:0] LOC_IM_DATA = 5'h0E;
  localparam logic [4:0] LOC_IM_ADDR = 5'h0F;
  localparam logic [4:0] LOC_NOP     = 5'h1F;

  // Instruction in which every field is a nop; used as the pipeline bubble
  localparam instr_t NOP_WORD = '{
    u1: '{op: U1_OP_NOP, ra: 2'd0, rb: 2'd0, rc: 2'd0},
    u2: '{op: U2_OP_NOP, ra: 2'd0, rb: 2'd0, rc: 2'd0},
    u3: '{op: U3_OP_NOP, ra: 2'd0, rb: 2'd0, rc: 2'd0},
    db1: '{src: 5'h00, dest: LOC_NOP},
    db2: '{src: 5'h00, dest: LOC_NOP}
  };

  // Identification codes: one decode line per operation of a field
  typedef struct packed {
    logic add;
    logic sub;
    logic mul;
    logic nop;
  } unit_id_t;

  typedef struct packed {
    logic move;      // register-to-register move
    logic move_im;   // immediate to register
    logic nop;
  } bus_id_t;

  typedef struct packed {
    logic ld;
    logic st;
  } mem_id_t;

  // Per-register-file port request generated by one bus
  typedef struct packed {
    logic       en;     // port in use this cycle
    logic       we;     // 1: write bus value, 0: drive register onto bus
    logic [1:0] addr;
  } rf_bus_req_t;

  // Register-file number addressed by a register location code (0..2),
  // or 3 when the code does not name a register.
  function automatic logic [1:0] loc_rf(input logic [4:0] loc);
    return (loc < 5'h0C) ? loc[3:2] : 2'd3;
  endfunction

endpackage
