// tb_spam2_decoder: self-checking test of the SPAM2 instruction decoder.
//
// Drives the worked example word from the instruction-set description
// (U1_add U1.R1, U1.R2 -> U1.R3), hand-built memory-operation words and
// 20000 random words biased toward bus and memory encodings. The expected
// decode lines are computed from raw bit slices of the word, independent
// of the decoder's struct types. Combinational; a 1 ns step per vector.
module tb_spam2_decoder;
  import spam2_pkg::*;

  logic [43:0] w;
  unit_id_t u1_id, u2_id, u3_id;
  bus_id_t  db1_id, db2_id;
  mem_id_t  dm_id, im_id;
  logic db1_en, db2_en, illegal, violation;
  int checks = 0, failures = 0;

  spam2_decoder dut (
    .instr (instr_t'(w)), .u1_id, .u2_id, .u3_id, .db1_id, .db2_id,
    .dm_id, .im_id, .db1_en, .db2_en, .illegal, .violation
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s word=%011h", what, w);
    end
  endtask

  function automatic logic r(input logic [4:0] x); return x <= 5'd11; endfunction

  task automatic check_word();
    logic [1:0] o1, o2, o3;
    logic [4:0] s1, d1, s2, d2;
    logic mem, dl, ds, il, is_, mv1, mi1, n1, mv2, mi2, n2, ill, vio;
    o1 = w[43:42]; o2 = w[35:34]; o3 = w[27:26];
    s1 = w[19:15]; d1 = w[14:10]; s2 = w[9:5]; d2 = w[4:0];
    #1;
    check(u1_id == {o1 == 0, o1 == 1, 1'b0, o1 == 3}, "u1_id");
    check(u2_id == {o2 == 0, o2 == 1, o2 == 2, o2 == 3}, "u2_id");
    check(u3_id == {o3 == 0, 1'b0, o3 == 1, o3 == 3}, "u3_id");
    mem = (d2 == 13) || (d2 == 15);
    dl  = d2 == 13 && r(s2) && s1 == 12 && r(d1);
    ds  = d2 == 13 && r(s2) && d1 == 12 && r(s1);
    il  = d2 == 15 && r(s2) && s1 == 14 && r(d1);
    is_ = d2 == 15 && r(s2) && d1 == 14 && r(s1);
    check(dm_id == {dl, ds} && im_id == {il, is_}, "mem ids");
    mv1 = !mem && r(d1) && r(s1);   mi1 = !mem && r(d1) && s1 >= 16;  n1 = !mem && d1 == 31;
    mv2 = !mem && r(d2) && r(s2);   mi2 = !mem && r(d2) && s2 >= 16;  n2 = !mem && d2 == 31;
    check(db1_id == {mv1, mi1, n1}, "db1_id");
    check(db2_id == {mv2, mi2, n2}, "db2_id");
    check(db1_en == (mv1 || mi1 || dl || ds || il || is_), "db1_en");
    check(db2_en == (mv2 || mi2 || dl || ds || il || is_), "db2_en");
    ill = o1 == 2 || o3 == 2 || (mem && !(dl || ds || il || is_)) ||
          (!mem && !(mv1 || mi1 || n1)) || (!mem && !(mv2 || mi2 || n2));
    check(illegal == ill, "illegal");
    vio = (mv1 && s1[3:2] == d1[3:2]) || (mv2 && s2[3:2] == d2[3:2]) ||
          ((mv1 || mi1) && (mv2 || mi2) && d1 == d2);
    check(violation == vio, "violation");
  endtask

  function automatic logic [4:0] rand_loc();
    case ($urandom_range(0, 5))
      0, 1, 2: return 5'($urandom_range(0, 11));
      3:       return 5'($urandom_range(12, 15));
      4:       return 5'($urandom_range(16, 31));
      default: return 5'h1F;
    endcase
  endfunction

  initial begin
    // Worked example: U1_add RA=1, RB=2, RC=3 -> leading bits 00011011
    w = {8'b00011011, 8'hFF, 8'hFF, 5'd0, 5'h1F, 5'd0, 5'h1F};
    check_word();
    check(u1_id.add && !illegal, "example U1_add");
    // DM_ld U2.R1 <- DM[U3.R2]
    w = {8'hFF, 8'hFF, 8'hFF, 5'h0C, 5'h05, 5'h0A, 5'h0D};
    check_word();
    check(dm_id.ld && !dm_id.st && db1_id == '0 && db2_id == '0 && !illegal, "DM_ld");
    // IM_st DM[U1.R0] <- U3.R3
    w = {8'hFF, 8'hFF, 8'hFF, 5'h0B, 5'h0E, 5'h00, 5'h0F};
    check_word();
    check(im_id.st && !illegal, "IM_st");
    // move within one register file is a constraint violation
    w = {8'hFF, 8'hFF, 8'hFF, 5'h04, 5'h06, 5'h00, 5'h1F};
    check_word();
    check(violation, "same-file move");
    // both buses writing U3.R1
    w = {8'hFF, 8'hFF, 8'hFF, 5'h00, 5'h09, 5'h13, 5'h09};
    check_word();
    check(violation && db2_id.move_im, "double write");
    repeat (20000) begin
      w = {32'($urandom()), 12'($urandom())};
      w[19:0] = {rand_loc(), rand_loc(), rand_loc(), rand_loc()};
      if ($urandom_range(0, 3) == 0) w[4:0] = $urandom_range(0, 1) ? 5'h0D : 5'h0F;
      check_word();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
