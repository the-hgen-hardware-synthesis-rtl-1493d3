// spam2_regfile: one SPAM2 register file, 4 x 8 bits (U1, U2 or U3).
//
// Ports:
//   * two asynchronous read ports (RA, RB) feeding the file's arithmetic unit;
//   * one write port for the unit's single-cycle result (RC);
//   * one write port for a delayed multiply result (wb_*);
//   * all four registers as an observation output (regs_o);
//   * one read-or-write port per data bus (DB1, DB2). A bus port either
//     drives register `addr` onto the bus (we = 0) or writes the bus value
//     into it (we = 1), never both, which is why a bus cannot move a value
//     between two registers of the same file.
// All writes happen at the rising clock edge. When several writes hit one
// register in the same cycle the priority is, from highest: DB2, DB1, unit,
// delayed multiply. The port set follows the storage-port derivation of the
// method (one port per accessing field, merged into a bidirectional port when
// a field only reads or only writes); the delayed-multiply port, the write
// priority and the synchronous reset to zero are this design's choices.
module spam2_regfile
  import spam2_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic [1:0]    ra_addr,
  output logic [DW-1:0] ra_data,
  input  logic [1:0]    rb_addr,
  output logic [DW-1:0] rb_data,
  input  logic          wr_en,
  input  logic [1:0]    wr_addr,
  input  logic [DW-1:0] wr_data,
  input  logic          wb_en,
  input  logic [1:0]    wb_addr,
  input  logic [DW-1:0] wb_data,
  input  rf_bus_req_t   bus1_req,
  input  logic [DW-1:0] bus1_wdata,
  output logic [DW-1:0] bus1_rdata,
  input  rf_bus_req_t   bus2_req,
  input  logic [DW-1:0] bus2_wdata,
  output logic [DW-1:0] bus2_rdata,
  output logic [DW-1:0] regs_o [RF_DEPTH]   // current contents, for observation
);

  logic [DW-1:0] regs [RF_DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < RF_DEPTH; i++) regs[i] <= '0;
    end else begin
      // later assignments take priority
      if (wb_en)                      regs[wb_addr]       <= wb_data;
      if (wr_en)                      regs[wr_addr]       <= wr_data;
      if (bus1_req.en && bus1_req.we) regs[bus1_req.addr] <= bus1_wdata;
      if (bus2_req.en && bus2_req.we) regs[bus2_req.addr] <= bus2_wdata;
    end
  end

  assign regs_o     = regs;
  assign ra_data    = regs[ra_addr];
  assign rb_data    = regs[rb_addr];
  assign bus1_rdata = (bus1_req.en && !bus1_req.we) ? regs[bus1_req.addr] : '0;
  assign bus2_rdata = (bus2_req.en && !bus2_req.we) ? regs[bus2_req.addr] : '0;

endmodule
