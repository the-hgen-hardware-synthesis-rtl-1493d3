// tb_spam2_dmem: self-checking test of the SPAM2 data memory (32 x 8).
//
// Fills every word, then runs 4000 cycles of random reads and writes on the
// access port and random reads on the observation port, comparing both read
// ports with a model array. Writes take effect at the rising edge; reads are
// combinational and checked before the edge.
module tb_spam2_dmem;
  logic clk = 0;
  logic [4:0] addr, daddr;
  logic       we;
  logic [7:0] wdata, rdata, ddata;
  logic [7:0] m [32];
  int checks = 0, failures = 0;

  spam2_dmem dut (.clk, .addr, .we, .wdata, .rdata, .dbg_addr (daddr), .dbg_data (ddata));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    daddr = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); addr = 5'(i); we = 1; wdata = 8'($urandom()); m[i] = wdata;
    end
    repeat (4000) begin
      @(negedge clk);
      addr = 5'($urandom()); daddr = 5'($urandom());
      we = 1'($urandom()); wdata = 8'($urandom());
      #1;
      checks++;
      if (rdata != m[addr] || ddata != m[daddr]) begin
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
