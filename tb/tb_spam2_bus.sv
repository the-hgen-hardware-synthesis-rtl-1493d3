// tb_spam2_bus: self-checking test of one SPAM2 data bus.
//
// Sweeps all 1024 SRC/DEST code pairs with the bus enabled and disabled and
// random register and memory read data, and checks the bus value, the three
// register-file port requests and the four memory location flags against a
// table of the location codes written out here. Combinational.
module tb_spam2_bus;
  import spam2_pkg::*;

  logic en;
  logic [4:0] src, dest;
  logic [7:0] rfd [3];
  logic [7:0] dmd, imd, v;
  rf_bus_req_t req [3];
  logic f_dd, f_da, f_id, f_ia;
  int checks = 0, failures = 0;

  spam2_bus dut (.en, .src, .dest, .rf_rdata (rfd), .dm_rdata (dmd), .im_rdata (imd),
                 .value (v), .rf_req (req), .dm_data_dst (f_dd), .dm_addr_dst (f_da),
                 .im_data_dst (f_id), .im_addr_dst (f_ia));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s src=%h dest=%h en=%0b", s, src, dest, en);
    end
  endtask

  initial begin
    logic [7:0] ev;
    int sf, df;
    for (int e = 0; e < 2; e++)
      for (int s = 0; s < 32; s++)
        for (int d = 0; d < 32; d++) begin
          en = 1'(e); src = 5'(s); dest = 5'(d);
          for (int k = 0; k < 3; k++) rfd[k] = 8'($urandom());
          dmd = 8'($urandom()); imd = 8'($urandom());
          #1;
          sf = (s < 4) ? 0 : (s < 8) ? 1 : (s < 12) ? 2 : -1;
          df = (d < 4) ? 0 : (d < 8) ? 1 : (d < 12) ? 2 : -1;
          if (!en)          ev = 0;
          else if (sf >= 0) ev = rfd[sf];
          else if (s == 12) ev = dmd;
          else if (s == 14) ev = imd;
          else if (s >= 16) ev = 8'(s - 16);
          else              ev = 0;
          chk(v == ev, "value");
          for (int k = 0; k < 3; k++) begin
            chk(req[k].we == (en && df == k), "req we");
            chk(req[k].en == (en && (df == k || sf == k)), "req en");
            if (en && df == k)                chk(req[k].addr == 2'(d), "req dest addr");
            else if (en && sf == k)           chk(req[k].addr == 2'(s), "req src addr");
          end
          chk(f_dd == (en && d == 12) && f_da == (en && d == 13) &&
              f_id == (en && d == 14) && f_ia == (en && d == 15), "memory flags");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
