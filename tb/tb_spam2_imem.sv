// tb_spam2_imem: self-checking test of the SPAM2 instruction memory
// (256 x 44, one port).
//
// Fills all 256 words, then runs 4000 cycles of random reads and writes,
// comparing the combinational read data with a model array. Writes take
// effect at the rising edge.
module tb_spam2_imem;
  logic clk = 0;
  logic [7:0]  addr;
  logic        we;
  logic [43:0] wdata, rdata;
  logic [43:0] m [256];
  int checks = 0, failures = 0;

  spam2_imem dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); addr = 8'(i); we = 1; wdata = {12'($urandom()), 32'($urandom())};
      m[i] = wdata;
    end
    repeat (4000) begin
      @(negedge clk);
      addr = 8'($urandom()); we = 1'($urandom());
      wdata = {12'($urandom()), 32'($urandom())};
      #1;
      checks++;
      if (rdata != m[addr]) begin
        failures++;
        if (failures < 20) $display("FAIL addr=%0d got %h exp %h", addr, rdata, m[addr]);
      end
      @(posedge clk);
      if (we) m[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
