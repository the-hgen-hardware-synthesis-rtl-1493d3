// spam2_bus: one 8-bit SPAM2 data bus (instantiated as DB1 and as DB2).
//
// The bus is a multiplexer from the location named by the 5-bit SRC code to
// the location named by the 5-bit DEST code, using the shared location codes:
//   0x00-0x0B  register R(code[1:0]) of file U(code[3:2]+1)
//   0x0C / 0x0E  data-memory / instruction-memory data (source or destination)
//   0x0D / 0x0F  data-memory / instruction-memory address (destination)
//   SRC 0x10-0x1F  the 4-bit immediate SRC[3:0], zero-extended
//   DEST 0x1F  nothing (bus nop)
// For every register file it emits a port request: read register SRC[1:0]
// when the source is in that file, write register DEST[1:0] when the
// destination is. The bus value is returned to the files as write data and
// to the memories through the top level. A memory operation uses the same
// datapath: DB1 links the memory data to a register, DB2 carries the address
// from a register, so moves, loads and stores share the two buses. The code
// map and this sharing follow the instruction set; tri-state wiring is
// replaced by explicit multiplexers, and undefined codes read as zero and
// write nothing. With `en` low the bus is idle. Combinational.
module spam2_bus
  import spam2_pkg::*;
(
  input  logic          en,
  input  logic [4:0]    src,
  input  logic [4:0]    dest,
  input  logic [DW-1:0] rf_rdata [NUM_RF],
  input  logic [DW-1:0] dm_rdata,
  input  logic [DW-1:0] im_rdata,
  output logic [DW-1:0] value,
  output rf_bus_req_t   rf_req [NUM_RF],
  output logic          dm_data_dst,   // DEST = DM data
  output logic          dm_addr_dst,   // DEST = DM address
  output logic          im_data_dst,   // DEST = IM data
  output logic          im_addr_dst    // DEST = IM address
);

  logic [1:0] src_rf, dest_rf;

  assign src_rf  = loc_rf(src);
  assign dest_rf = loc_rf(dest);

  // source multiplexer
  always_comb begin
    value = '0;
    if (en) begin
      if (src_rf != 2'd3)          value = rf_rdata[src_rf];
      else if (src == LOC_DM_DATA) value = dm_rdata;
      else if (src == LOC_IM_DATA) value = im_rdata;
      else if (src[4])             value = DW'(src[3:0]);
    end
  end

  // destination decode and register-file port requests (code only)
  always_comb begin
    for (int k = 0; k < NUM_RF; k++) begin
      rf_req[k].we   = en && (dest_rf == 2'(k));
      rf_req[k].en   = en && ((dest_rf == 2'(k)) || (src_rf == 2'(k)));
      rf_req[k].addr = (dest_rf == 2'(k)) ? dest[1:0] : src[1:0];
    end

    dm_data_dst = en && dest == LOC_DM_DATA;
    dm_addr_dst = en && dest == LOC_DM_ADDR;
    im_data_dst = en && dest == LOC_IM_DATA;
    im_addr_dst = en && dest == LOC_IM_ADDR;
  end

endmodule
