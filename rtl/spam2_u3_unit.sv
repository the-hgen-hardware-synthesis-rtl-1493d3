// spam2_u3_unit: the U3 arithmetic unit of SPAM2 (ADD, MUL, NOP).
//
// ADD behaves as in U1: one cycle, result written to RC at the next
// clock edge through the wr_* port. MUL forms the low 8 bits of RA * RB and
// delivers them MUL_LATENCY cycles after issue through the late write port
// (wb_*), using spam2_mul_pipe; the unit can start a new operation every
// cycle. The multiply latency of 4 and the single-cycle add follow the
// instruction set; a separate write port for the delayed product is this
// design's choice (see spam2_regfile for the write priority).
module spam2_u3_unit
  import spam2_pkg::*;
#(
  parameter int unsigned MUL_LATENCY = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  unit_id_t      id,
  input  logic [DW-1:0] ra_data,
  input  logic [DW-1:0] rb_data,
  input  logic [1:0]    rc,
  output logic          wr_en,
  output logic [1:0]    wr_addr,
  output logic [DW-1:0] wr_data,
  output logic          wb_en,
  output logic [1:0]    wb_addr,
  output logic [DW-1:0] wb_data
);

  always_comb begin
    wr_en   = id.add;
    wr_addr = rc;
    unique case (1'b1)
      id.add:  wr_data = ra_data + rb_data;
      default: wr_data = '0;
    endcase
  end

  spam2_mul_pipe #(.LATENCY(MUL_LATENCY), .DW(DW)) u_mul (
    .clk, .rst,
    .issue  (id.mul),
    .dst    (rc),
    .a      (ra_data),
    .b      (rb_data),
    .wb_en, .wb_addr, .wb_data
  );

endmodule
