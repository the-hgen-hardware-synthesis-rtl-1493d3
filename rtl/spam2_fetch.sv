// spam2_fetch: program counter and instruction register of SPAM2.
//
// Every cycle the instruction memory is read at `pc`; the word is loaded into
// the instruction register `ir` and `pc` advances by one (wrapping at 2^PCW;
// SPAM2 has no branches). While the instruction in `ir` is an IM_ld or IM_st
// (`im_busy`), the memory port is taken by that data access, so no word is
// fetched: `ir` receives a nop bubble and `pc` holds. An IM operation thus
// occupies two cycles, matching its cycle cost of 2, while all other
// instructions take one. `ir_valid` is low for a bubble or after reset.
// Synchronous active-high reset: pc = 0, ir = nop. The 8-bit PC and the
// fetch register follow the architecture; the bubble mechanism is this
// design's choice.
module spam2_fetch
  import spam2_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  logic           im_busy,
  input  logic [IW-1:0]  im_rdata,
  output logic [PCW-1:0] pc,
  output instr_t         ir,
  output logic           ir_valid
);

  always_ff @(posedge clk) begin
    if (rst) begin
      pc       <= '0;
      ir       <= NOP_WORD;
      ir_valid <= 1'b0;
    end else if (im_busy) begin
      ir       <= NOP_WORD;
      ir_valid <= 1'b0;
    end else begin
      pc       <= pc + 1'b1;
      ir       <= instr_t'(im_rdata);
      ir_valid <= 1'b1;
    end
  end

endmodule
