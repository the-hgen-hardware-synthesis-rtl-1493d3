// tb_spam2_regfile: self-checking test of one SPAM2 register file.
//
// Every cycle drives random requests on all ports: both read ports, the unit
// write port, the delayed-multiply write port and the two bus ports (idle,
// read or write). A model array applies the writes in the stated
// priority (DB2 over DB1 over unit over delayed multiply) and the test
// compares both read ports, both bus read ports and the observation output
// with it before each rising edge. Also checks the synchronous reset.
module tb_spam2_regfile;
  import spam2_pkg::*;

  logic clk = 0, rst = 1;
  logic [1:0] raa, rba, wra, wba;
  logic [7:0] rad, rbd, wrd, wbd, b1w, b2w, b1r, b2r;
  logic       wre, wbe;
  rf_bus_req_t q1, q2;
  logic [7:0] obs [4];
  logic [7:0] m [4];
  int checks = 0, failures = 0, collisions = 0;

  spam2_regfile dut (
    .clk, .rst, .ra_addr (raa), .ra_data (rad), .rb_addr (rba), .rb_data (rbd),
    .wr_en (wre), .wr_addr (wra), .wr_data (wrd),
    .wb_en (wbe), .wb_addr (wba), .wb_data (wbd),
    .bus1_req (q1), .bus1_wdata (b1w), .bus1_rdata (b1r),
    .bus2_req (q2), .bus2_wdata (b2w), .bus2_rdata (b2r), .regs_o (obs));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  function automatic rf_bus_req_t rnd_req();
    rf_bus_req_t r;
    r.en = $urandom_range(0, 2) != 0; r.we = 1'($urandom()); r.addr = 2'($urandom());
    return r;
  endfunction

  initial begin
    raa = 0; rba = 0; wre = 0; wbe = 0; q1 = '0; q2 = '0;
    wra = 0; wba = 0; wrd = 0; wbd = 0; b1w = 0; b2w = 0;
    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < 4; i++) begin m[i] = '0; chk(obs[i] == 0, "reset"); end
    rst = 0;
    repeat (5000) begin
      @(negedge clk);
      raa = 2'($urandom()); rba = 2'($urandom());
      wre = 1'($urandom()); wra = 2'($urandom()); wrd = 8'($urandom());
      wbe = 1'($urandom()); wba = 2'($urandom()); wbd = 8'($urandom());
      q1 = rnd_req(); q2 = rnd_req(); b1w = 8'($urandom()); b2w = 8'($urandom());
      #1;
      chk(rad == m[raa] && rbd == m[rba], "read ports");
      chk(b1r == ((q1.en && !q1.we) ? m[q1.addr] : 8'h00), "bus1 read");
      chk(b2r == ((q2.en && !q2.we) ? m[q2.addr] : 8'h00), "bus2 read");
      for (int i = 0; i < 4; i++) chk(obs[i] == m[i], "observation");
      if (wre && q2.en && q2.we && wra == q2.addr) collisions++;
      @(posedge clk);
      if (wbe) m[wba] = wbd;
      if (wre) m[wra] = wrd;
      if (q1.en && q1.we) m[q1.addr] = b1w;
      if (q2.en && q2.we) m[q2.addr] = b2w;
    end
    chk(collisions > 50, "write collisions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
