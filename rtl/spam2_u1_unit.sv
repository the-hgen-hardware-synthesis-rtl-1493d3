// spam2_u1_unit: the U1 arithmetic unit of SPAM2 (ADD, SUB, NOP).
//
// Takes the U1 field's identification code from the decoder and the two
// operands read from the U1 register file at RA and RB, and returns a write
// request for register RC: RC <- RA + RB or RC <- RA - RB, 8 bits wide with
// the carry/borrow dropped. Both operations take one cycle and their result is
// written at the next clock edge by the register file (latency 1). NOP and an
// inactive field request no write. Operation set, width and latency follow the
// instruction set; the module is combinational.
module spam2_u1_unit
  import spam2_pkg::*;
(
  input  unit_id_t      id,
  input  logic [DW-1:0] ra_data,
  input  logic [DW-1:0] rb_data,
  input  logic [1:0]    rc,
  output logic          wr_en,
  output logic [1:0]    wr_addr,
  output logic [DW-1:0] wr_data
);

  always_comb begin
    wr_en   = id.add | id.sub;
    wr_addr = rc;
    unique case (1'b1)
      id.add:  wr_data = ra_data + rb_data;
      id.sub:  wr_data = ra_data - rb_data;
      default: wr_data = '0;
    endcase
  end

endmodule
