// spam2_imem: SPAM2 instruction memory, DEPTH x IW bits (256 x 44 by default).
//
// A single port serves both instruction fetch (address = PC) and the IM_ld /
// IM_st data operations (address from data bus DB2); the top level selects
// the address. Reads are combinational; a write of `wdata` to `addr` happens
// at the rising clock edge when `we` is high. The top level also uses this
// port to load a program while the processor is held in reset. The single
// shared port is this design's reading of the two-cycle cost of IM
// operations; the size follows the storage declaration. Not reset.
module spam2_imem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned IW    = 44,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [IW-1:0] wdata,
  output logic [IW-1:0] rdata
);

  logic [IW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
