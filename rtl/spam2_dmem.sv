// spam2_dmem: SPAM2 data memory, DEPTH x DW bits (32 x 8 by default).
//
// One access port used by the DM_ld / DM_st operations: the address arrives
// on data bus DB2 (low log2(DEPTH) bits of the 8-bit bus value), read data
// is combinational and goes onto DB1, and a store writes the DB1 value at the
// rising clock edge when `we` is high. A second, read-only port (dbg_*)
// lets the environment inspect the contents; it is an addition of this
// design. Size follows the storage declaration; the contents are not reset.
module spam2_dmem #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned DW    = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  input  logic [AW-1:0] dbg_addr,
  output logic [DW-1:0] dbg_data
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata    = mem[addr];
  assign dbg_data = mem[dbg_addr];

endmodule
