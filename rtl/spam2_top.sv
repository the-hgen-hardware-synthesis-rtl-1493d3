// spam2_top: the SPAM2 VLIW processor.
//
// Structure (one instruction per cycle, no branches):
//   fetch   : spam2_fetch holds PC and the instruction register; the
//             instruction memory is read at PC each cycle.
//   decode  : spam2_decoder turns the 44-bit word into identification codes
//             for the fields U1f, U2f, U3f, DB1, DB2, DMf and IM.
//   execute : U1, U2 and U3 read two registers of their own file, compute
//             and write RC at the clock edge (multiplies MUL_LATENCY cycles
//             later). DB1 and DB2 each move one 8-bit value between register
//             files, from a 4-bit immediate, or, for memory operations,
//             between a register and memory: DB2 carries the address from a
//             register, DB1 the data.
//   storage : three 4 x 8 register files, a 32 x 8 data memory and a
//             256 x 44 instruction memory whose single port is shared by
//             fetch and IM_ld/IM_st (an IM operation costs one bubble).
// All units of one instruction act in the same cycle; an IM_ld returns the
// low 8 bits of the addressed word, an IM_st writes the register value
// zero-extended to 44 bits, a DM address uses the low 5 bits of DB2.
//
// Interface: synchronous active-high `rst`. While `rst` is high the program
// is loaded through load_we/load_addr/load_data into the instruction memory;
// after it falls, execution starts at address 0. `pc`, all register contents
// (`regs`) and a data-memory read port (dbg_dm_*) make the state visible.
// `illegal` and `violation` flag, for the instruction in execution, an
// encoding of no operation and a broken instruction-set constraint.
//
// The units, storage sizes, encodings and bus sharing follow the SPAM2
// machine description and its generated model; the load/observation ports,
// reset values, the IM port bubble and the write priority among register
// writes (DB2 > DB1 > unit > delayed multiply) are this design's choices.
module spam2_top
  import spam2_pkg::*;
#(
  parameter int unsigned MUL_LATENCY = 4
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           load_we,
  input  logic [PCW-1:0] load_addr,
  input  logic [IW-1:0]  load_data,
  input  logic [4:0]     dbg_dm_addr,
  output logic [DW-1:0]  dbg_dm_data,
  output logic [PCW-1:0] pc,
  output logic           ir_valid,
  output logic [DW-1:0]  regs [NUM_RF][RF_DEPTH],
  output logic           illegal,
  output logic           violation
);

  // ---------------------------------------------------------------- fetch
  instr_t        ir;
  logic [IW-1:0] im_rdata;
  logic          im_busy;

  spam2_fetch u_fetch (
    .clk, .rst, .im_busy, .im_rdata, .pc, .ir, .ir_valid
  );

  // --------------------------------------------------------------- decode
  unit_id_t u1_id, u2_id, u3_id;
  bus_id_t  db1_id, db2_id;
  mem_id_t  dm_id, im_id;
  logic     db1_en, db2_en;

  spam2_decoder u_dec (
    .instr (ir),
    .u1_id, .u2_id, .u3_id, .db1_id, .db2_id, .dm_id, .im_id,
    .db1_en, .db2_en, .illegal, .violation
  );

  assign im_busy = im_id.ld | im_id.st;

  // ---------------------------------------------------------------- buses
  logic [DW-1:0] rf_b1_rdata [NUM_RF];
  logic [DW-1:0] rf_b2_rdata [NUM_RF];
  rf_bus_req_t   rf_b1_req   [NUM_RF];
  rf_bus_req_t   rf_b2_req   [NUM_RF];
  logic [DW-1:0] db1_value, db2_value;
  logic [DW-1:0] dm_rdata;
  logic          b1_dm_data, b1_dm_addr, b1_im_data, b1_im_addr;
  logic          b2_dm_data, b2_dm_addr, b2_im_data, b2_im_addr;

  spam2_bus u_db1 (
    .en (db1_en), .src (ir.db1.src), .dest (ir.db1.dest),
    .rf_rdata (rf_b1_rdata),
    .dm_rdata (dm_rdata),
    .im_rdata (im_rdata[DW-1:0]),
    .value (db1_value), .rf_req (rf_b1_req),
    .dm_data_dst (b1_dm_data), .dm_addr_dst (b1_dm_addr),
    .im_data_dst (b1_im_data), .im_addr_dst (b1_im_addr)
  );

  // DB2 is the address bus: it never carries memory data.
  spam2_bus u_db2 (
    .en (db2_en), .src (ir.db2.src), .dest (ir.db2.dest),
    .rf_rdata (rf_b2_rdata),
    .dm_rdata ('0),
    .im_rdata ('0),
    .value (db2_value), .rf_req (rf_b2_req),
    .dm_data_dst (b2_dm_data), .dm_addr_dst (b2_dm_addr),
    .im_data_dst (b2_im_data), .im_addr_dst (b2_im_addr)
  );

  // ------------------------------------------------- units and reg files
  logic [DW-1:0] ra_data [NUM_RF];
  logic [DW-1:0] rb_data [NUM_RF];
  logic          wr_en   [NUM_RF];
  logic [1:0]    wr_addr [NUM_RF];
  logic [DW-1:0] wr_data [NUM_RF];
  logic          wb_en   [NUM_RF];
  logic [1:0]    wb_addr [NUM_RF];
  logic [DW-1:0] wb_data [NUM_RF];

  spam2_u1_unit u_u1 (
    .id (u1_id), .ra_data (ra_data[0]), .rb_data (rb_data[0]), .rc (ir.u1.rc),
    .wr_en (wr_en[0]), .wr_addr (wr_addr[0]), .wr_data (wr_data[0])
  );
  // U1 has no multiplier: its delayed write port is unused
  assign wb_en[0]   = 1'b0;
  assign wb_addr[0] = '0;
  assign wb_data[0] = '0;

  spam2_u2_unit #(.MUL_LATENCY(MUL_LATENCY)) u_u2 (
    .clk, .rst,
    .id (u2_id), .ra_data (ra_data[1]), .rb_data (rb_data[1]), .rc (ir.u2.rc),
    .wr_en (wr_en[1]), .wr_addr (wr_addr[1]), .wr_data (wr_data[1]),
    .wb_en (wb_en[1]), .wb_addr (wb_addr[1]), .wb_data (wb_data[1])
  );

  spam2_u3_unit #(.MUL_LATENCY(MUL_LATENCY)) u_u3 (
    .clk, .rst,
    .id (u3_id), .ra_data (ra_data[2]), .rb_data (rb_data[2]), .rc (ir.u3.rc),
    .wr_en (wr_en[2]), .wr_addr (wr_addr[2]), .wr_data (wr_data[2]),
    .wb_en (wb_en[2]), .wb_addr (wb_addr[2]), .wb_data (wb_data[2])
  );

  logic [1:0] ra_addr [NUM_RF];
  logic [1:0] rb_addr [NUM_RF];
  assign ra_addr = '{ir.u1.ra, ir.u2.ra, ir.u3.ra};
  assign rb_addr = '{ir.u1.rb, ir.u2.rb, ir.u3.rb};

  for (genvar k = 0; k < NUM_RF; k++) begin : g_rf
    spam2_regfile u_rf (
      .clk, .rst,
      .ra_addr (ra_addr[k]), .ra_data (ra_data[k]),
      .rb_addr (rb_addr[k]), .rb_data (rb_data[k]),
      .wr_en (wr_en[k]), .wr_addr (wr_addr[k]), .wr_data (wr_data[k]),
      .wb_en (wb_en[k]), .wb_addr (wb_addr[k]), .wb_data (wb_data[k]),
      .bus1_req (rf_b1_req[k]), .bus1_wdata (db1_value), .bus1_rdata (rf_b1_rdata[k]),
      .bus2_req (rf_b2_req[k]), .bus2_wdata (db2_value), .bus2_rdata (rf_b2_rdata[k]),
      .regs_o (regs[k])
    );
  end

  // ------------------------------------------------------------- memories
  // DM: address from DB2, data on DB1. A store needs DB1 -> DM data and
  // DB2 -> DM address in the same word, which the decoder reports as dm_id.st.
  spam2_dmem #(.DEPTH(DM_DEPTH), .DW(DW)) u_dm (
    .clk,
    .addr     (db2_value[$clog2(DM_DEPTH)-1:0]),
    .we       (!rst && dm_id.st && b1_dm_data && b2_dm_addr),
    .wdata    (db1_value),
    .rdata    (dm_rdata),
    .dbg_addr (dbg_dm_addr),
    .dbg_data (dbg_dm_data)
  );

  // IM: one port, shared by the loader (in reset), IM_ld/IM_st and fetch.
  logic [PCW-1:0] im_addr;
  logic           im_we;
  logic [IW-1:0]  im_wdata;

  always_comb begin
    if (rst) begin
      im_addr  = load_addr;
      im_we    = load_we;
      im_wdata = load_data;
    end else if (im_busy) begin
      im_addr  = db2_value;
      im_we    = im_id.st && b1_im_data && b2_im_addr;
      im_wdata = IW'(db1_value);
    end else begin
      im_addr  = pc;
      im_we    = 1'b0;
      im_wdata = '0;
    end
  end

  spam2_imem #(.DEPTH(IM_DEPTH), .IW(IW)) u_im (
    .clk, .addr (im_addr), .we (im_we), .wdata (im_wdata), .rdata (im_rdata)
  );

  // Unused location flags: DB1 never addresses memory, DB2 never carries data
  logic unused_flags;
  assign unused_flags = ^{b1_dm_addr, b1_im_addr, b2_dm_data, b2_im_data,
                          db1_id, db2_id, u1_id.mul};

  // ----------------------------------------------------------- assertions
  // A running program must respect the instruction-set constraints.
  a_constraints : assert property (@(posedge clk) disable iff (rst) !violation)
    else $error("SPAM2: instruction at pc=%0d breaks an instruction-set constraint", pc);
  a_legal : assert property (@(posedge clk) disable iff (rst) !illegal)
    else $error("SPAM2: illegal instruction word before pc=%0d", pc);

endmodule
