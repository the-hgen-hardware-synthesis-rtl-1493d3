// tb_spam2_fetch: self-checking test of the SPAM2 fetch unit.
//
// The memory is modelled as a function of the address (word = hash(pc)).
// With `im_busy` raised at random, the test checks after each rising edge
// that a fetch cycle loads the word at the old PC and increments PC, and that
// a busy cycle loads a nop bubble and holds PC. Counts fetches and bubbles,
// and checks that the PC wraps from 255 to 0. Also checks the reset state.
module tb_spam2_fetch;
  import spam2_pkg::*;

  logic clk = 0, rst = 1, busy;
  logic [43:0] rdata;
  logic [7:0]  pc;
  instr_t      ir;
  logic        vld;
  int checks = 0, failures = 0, bubbles = 0, fetches = 0, wraps = 0;

  spam2_fetch dut (.clk, .rst, .im_busy (busy), .im_rdata (rdata), .pc, .ir, .ir_valid (vld));

  function automatic logic [43:0] word(input logic [7:0] a);
    return {a, 4'hA, a ^ 8'h5C, 8'(a * 8'd7), 8'(a + 8'd33), 8'(~a)};
  endfunction

  assign rdata = word(pc);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s pc=%0d", s, pc); end
  endtask

  initial begin
    logic [7:0] old_pc;
    busy = 0;
    repeat (2) @(posedge clk);
    #1;
    chk(pc == 0 && ir == NOP_WORD && !vld, "reset state");
    rst = 0;
    repeat (3000) begin
      @(negedge clk);
      busy = $urandom_range(0, 3) == 0;
      old_pc = pc;
      @(posedge clk); #1;
      if (busy) begin
        bubbles++;
        chk(pc == old_pc && ir == NOP_WORD && !vld, "bubble");
      end else begin
        fetches++;
        if (old_pc == 8'd255) wraps++;
        chk(pc == 8'(old_pc + 1) && ir == word(old_pc) && vld, "fetch");
      end
    end
    chk(bubbles > 100 && fetches > 1000 && wraps > 2, "coverage");
    $display("fetches=%0d bubbles=%0d wraps=%0d", fetches, bubbles, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
