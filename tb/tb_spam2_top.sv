// tb_spam2_top: end-to-end test of the SPAM2 processor at its default size.
//
// For each of NRUNS runs the test
//   1. reads the data memory through the observation port (it is not reset),
//   2. builds a random, constraint-respecting program of PROG_LEN words with a
//      cycle-level reference model of the instruction set: every word is
//      chosen when the model is about to execute it, so memory addresses can
//      be taken from registers whose values are known (IM_ld/IM_st only touch
//      the data region 0xC0-0xFF of the instruction memory),
//   3. loads program and data region through the load port during reset,
//   4. runs the processor and compares PC, ir_valid and all 12 registers with
//      the model after every clock edge, and at the end the whole data memory
//      and the instruction-memory data region.
// The model follows the instruction set: 8-bit truncating ADD/SUB/MUL,
// multiply results written 4 cycles after issue with no bypass, bus moves,
// 4-bit immediates, DM/IM loads and stores over DB1 (data) and DB2 (address),
// IM operations taking two cycles, and the register write priority
// DB2 > DB1 > unit > delayed multiply. It counts how often each mechanism
// occurs and fails if one never does. The processor is instantiated without
// parameter overrides.
module tb_spam2_top;
  import spam2_pkg::*;

  localparam int LAT       = 4;      // multiply latency of the default build
  localparam int PROG_LEN  = 180;
  localparam int DATA_BASE = 8'hC0;
  localparam int NRUNS     = 4;
  localparam int MAXC      = 512;

  logic           clk = 0, rst = 1;
  logic           load_we;
  logic [7:0]     load_addr;
  logic [43:0]    load_data;
  logic [4:0]     dbg_dm_addr;
  logic [7:0]     dbg_dm_data;
  logic [7:0]     pc;
  logic           ir_valid, illegal, violation;
  logic [7:0]     regs [3][4];

  spam2_top dut (
    .clk, .rst, .load_we, .load_addr, .load_data, .dbg_dm_addr, .dbg_dm_data,
    .pc, .ir_valid, .regs, .illegal, .violation
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s", s);
    end
  endtask

  // ------------------------------------------------------------ the model
  logic [7:0]  R  [3][4];
  logic [7:0]  DM [32];
  logic [43:0] IM [256];
  logic        pv [MAXC + 8][3];     // pending multiply write due at end of cycle
  logic [1:0]  pa [MAXC + 8][3];
  logic [7:0]  pd [MAXC + 8][3];
  logic [7:0]  m_pc;
  logic [43:0] m_ir;
  logic        m_irv;
  logic [7:0]  m_irpc;

  // expected state after each cycle
  logic [7:0]  t_pc  [MAXC];
  logic        t_vld [MAXC];
  logic [7:0]  t_R   [MAXC][3][4];
  int          ncycles;

  // mechanism counters
  int n_u1add, n_u1sub, n_u2add, n_u2sub, n_u2mul, n_u3add, n_u3mul;
  int n_move, n_moveim, n_busnop, n_dmld, n_dmst, n_imld, n_imst, n_bubble;
  int n_hazard, n_collide, n_mulwb;

  function automatic logic [7:0] rv(input logic [4:0] loc);
    return R[loc[3:2]][loc[1:0]];
  endfunction

  function automatic logic [4:0] rand_reg();
    return 5'($urandom_range(0, 11));
  endfunction

  // is a multiply write to register `loc` still outstanding in cycle c?
  function automatic logic pending_to(input int c, input logic [4:0] loc);
    for (int k = c; k < c + LAT; k++)
      if (pv[k][loc[3:2]] && pa[k][loc[3:2]] == loc[1:0]) return 1'b1;
    return 1'b0;
  endfunction

  // choose one bus field for a plain move, immediate move or nop
  function automatic logic [9:0] gen_bus(input int kind);
    logic [4:0] s, d;
    case (kind)
      0: begin
        s = rand_reg();
        do d = rand_reg(); while (d[3:2] == s[3:2]);
      end
      1: begin s = 5'($urandom_range(16, 31)); d = rand_reg(); end
      default: begin s = 5'($urandom()); d = LOC_NOP; end
    endcase
    return {s, d};
  endfunction

  // a valid instruction for the current model state
  function automatic logic [43:0] gen_instr();
    logic [1:0] o1, o2, o3;
    logic [9:0] b1, b2;
    logic [4:0] loc;
    int mode, k1, k2, nim;
    logic [4:0] im_locs [12];
    o1 = 2'($urandom_range(0, 3)); if (o1 == 2) o1 = 3;
    o2 = 2'($urandom_range(0, 3));
    o3 = 2'($urandom_range(0, 3)); if (o3 == 2) o3 = 1;
    nim = 0;
    for (int i = 0; i < 12; i++)
      if (rv(5'(i)) >= 8'(DATA_BASE)) begin im_locs[nim] = 5'(i); nim++; end
    mode = $urandom_range(0, 9);
    if (mode == 2 && nim == 0) mode = 0;
    if (mode <= 1) begin                         // DM_ld / DM_st
      loc = rand_reg();
      b1  = $urandom_range(0, 1) ? {LOC_DM_DATA, rand_reg()} : {rand_reg(), LOC_DM_DATA};
      b2  = {loc, LOC_DM_ADDR};
    end else if (mode == 2) begin                // IM_ld / IM_st
      loc = im_locs[$urandom_range(0, nim - 1)];
      b1  = $urandom_range(0, 1) ? {LOC_IM_DATA, rand_reg()} : {rand_reg(), LOC_IM_DATA};
      b2  = {loc, LOC_IM_ADDR};
    end else begin
      k1 = $urandom_range(0, 2); k2 = $urandom_range(0, 2);
      b1 = gen_bus(k1); b2 = gen_bus(k2);
      if (k1 < 2 && k2 < 2 && b1[4:0] == b2[4:0]) b2 = gen_bus(2);
    end
    return {o1, 6'($urandom()), o2, 6'($urandom()), o3, 6'($urandom()), b1, b2};
  endfunction

  // one cycle of the model; returns after the clock edge state is formed
  task automatic model_cycle(input int c);
    logic [1:0]  o1, o2, o3;
    logic [1:0]  ra [3], rb [3], rc [3];
    logic [4:0]  s1, d1, s2, d2;
    logic        uw [3];
    logic [7:0]  ud [3];
    logic        w1, w2, dmw, imw, imop;
    logic [7:0]  v1, v2;
    logic [4:0]  wl1, wl2;
    logic [7:0]  dma, ima;
    int          nw [3][4];

    // generate the word now if it is a program word not yet chosen
    if (m_irv && m_irpc < PROG_LEN) begin
      m_ir = gen_instr();
      IM[m_irpc] = m_ir;
    end
    {o1, ra[0], rb[0], rc[0], o2, ra[1], rb[1], rc[1], o3, ra[2], rb[2], rc[2],
     s1, d1, s2, d2} = m_ir;

    for (int f = 0; f < 3; f++) begin uw[f] = 0; ud[f] = 0; end
    for (int f = 0; f < 3; f++) for (int r = 0; r < 4; r++) nw[f][r] = 0;

    // units
    if (o1 == 0) begin uw[0] = 1; ud[0] = R[0][ra[0]] + R[0][rb[0]]; n_u1add++; end
    if (o1 == 1) begin uw[0] = 1; ud[0] = R[0][ra[0]] - R[0][rb[0]]; n_u1sub++; end
    if (o2 == 0) begin uw[1] = 1; ud[1] = R[1][ra[1]] + R[1][rb[1]]; n_u2add++; end
    if (o2 == 1) begin uw[1] = 1; ud[1] = R[1][ra[1]] - R[1][rb[1]]; n_u2sub++; end
    if (o3 == 0) begin uw[2] = 1; ud[2] = R[2][ra[2]] + R[2][rb[2]]; n_u3add++; end
    for (int f = 0; f < 3; f++)
      if ((f == 0 && o1 != 3) || (f == 1 && o2 != 3) || (f == 2 && o3 != 3))
        if (pending_to(c, {1'b0, 2'(f), ra[f]}) || pending_to(c, {1'b0, 2'(f), rb[f]}))
          n_hazard++;
    if (o2 == 2) begin
      pv[c + LAT - 1][1] = 1; pa[c + LAT - 1][1] = rc[1];
      pd[c + LAT - 1][1] = 8'(R[1][ra[1]] * R[1][rb[1]]); n_u2mul++;
    end
    if (o3 == 1) begin
      pv[c + LAT - 1][2] = 1; pa[c + LAT - 1][2] = rc[2];
      pd[c + LAT - 1][2] = 8'(R[2][ra[2]] * R[2][rb[2]]); n_u3mul++;
    end

    // buses and memories
    w1 = 0; w2 = 0; dmw = 0; imw = 0; imop = 0; v1 = 0; v2 = 0; wl1 = 0; wl2 = 0;
    dma = rv(s2); ima = rv(s2);
    if (d2 == LOC_DM_ADDR) begin
      if (s1 == LOC_DM_DATA) begin w1 = 1; wl1 = d1; v1 = DM[dma[4:0]]; n_dmld++; end
      else begin dmw = 1; v1 = rv(s1); n_dmst++; end
    end else if (d2 == LOC_IM_ADDR) begin
      imop = 1;
      if (s1 == LOC_IM_DATA) begin w1 = 1; wl1 = d1; v1 = IM[ima][7:0]; n_imld++; end
      else begin imw = 1; v1 = rv(s1); n_imst++; end
    end else begin
      if (d1 != LOC_NOP) begin
        w1 = 1; wl1 = d1; v1 = s1[4] ? {4'h0, s1[3:0]} : rv(s1);
        if (s1[4]) n_moveim++; else n_move++;
        if (!s1[4] && pending_to(c, s1)) n_hazard++;
      end else n_busnop++;
      if (d2 != LOC_NOP) begin
        w2 = 1; wl2 = d2; v2 = s2[4] ? {4'h0, s2[3:0]} : rv(s2);
        if (s2[4]) n_moveim++; else n_move++;
      end else n_busnop++;
    end

    // register writes, lowest priority first
    for (int f = 0; f < 3; f++)
      if (pv[c][f]) begin R[f][pa[c][f]] = pd[c][f]; nw[f][pa[c][f]]++; n_mulwb++; end
    for (int f = 0; f < 3; f++)
      if (uw[f]) begin R[f][rc[f]] = ud[f]; nw[f][rc[f]]++; end
    if (w1) begin R[wl1[3:2]][wl1[1:0]] = v1; nw[wl1[3:2]][wl1[1:0]]++; end
    if (w2) begin R[wl2[3:2]][wl2[1:0]] = v2; nw[wl2[3:2]][wl2[1:0]]++; end
    for (int f = 0; f < 3; f++) for (int r = 0; r < 4; r++) if (nw[f][r] > 1) n_collide++;
    if (dmw) DM[dma[4:0]] = v1;

    // fetch (reads the memory before this edge's IM write)
    if (imop) begin
      m_ir = NOP_WORD; m_irv = 0; n_bubble++;
    end else begin
      m_ir = IM[m_pc]; m_irv = 1; m_irpc = m_pc; m_pc = m_pc + 1;
    end
    if (imw) IM[ima] = {36'h0, v1};
  endtask

  // ----------------------------------------------------------- the test
  initial begin
    int c;
    load_we = 0; load_addr = 0; load_data = 0; dbg_dm_addr = 0;
    {n_u1add, n_u1sub, n_u2add, n_u2sub, n_u2mul, n_u3add, n_u3mul} = '0;
    {n_move, n_moveim, n_busnop, n_dmld, n_dmst, n_imld, n_imst, n_bubble} = '0;
    {n_hazard, n_collide, n_mulwb} = '0;

    for (int run = 0; run < NRUNS; run++) begin
      rst = 1;
      @(negedge clk);
      // 1. current data memory
      for (int a = 0; a < 32; a++) begin
        dbg_dm_addr = 5'(a); #1; DM[a] = dbg_dm_data;
      end
      // 2. build program and expected trace
      for (int a = 0; a < 256; a++)
        IM[a] = (a >= DATA_BASE) ? {12'($urandom()), 32'($urandom())} : 44'(NOP_WORD);
      for (int f = 0; f < 3; f++) for (int r = 0; r < 4; r++) R[f][r] = 0;
      for (int k = 0; k < MAXC + 8; k++) for (int f = 0; f < 3; f++) pv[k][f] = 0;
      m_pc = 0; m_ir = NOP_WORD; m_irv = 0; m_irpc = 0;
      // program words start as nops; load the initial image now
      for (int a = 0; a < 256; a++) begin
        load_we = 1; load_addr = 8'(a); load_data = IM[a];
        @(negedge clk);
      end
      load_we = 0;
      c = 0;
      while (!(m_pc >= PROG_LEN + LAT + 2) && c < MAXC) begin
        model_cycle(c);
        t_pc[c] = m_pc; t_vld[c] = m_irv; t_R[c] = R;
        c++;
      end
      ncycles = c;
      // 3. load the generated program words (the data region is unchanged)
      rst = 1;
      for (int a = 0; a < PROG_LEN; a++) begin
        // the model has by now applied IM_st writes only to the data region
        load_we = 1; load_addr = 8'(a); load_data = IM[a];
        @(negedge clk);
      end
      load_we = 0;
      // 4. run and compare
      rst = 0;
      for (int k = 0; k < ncycles; k++) begin
        @(posedge clk); #1;
        chk(pc == t_pc[k] && ir_valid == t_vld[k],
            $sformatf("run %0d cycle %0d pc=%0d exp %0d", run, k, pc, t_pc[k]));
        for (int f = 0; f < 3; f++)
          for (int r = 0; r < 4; r++)
            chk(regs[f][r] == t_R[k][f][r],
                $sformatf("run %0d cycle %0d U%0d.R%0d=%h exp %h", run, k, f + 1, r,
                          regs[f][r], t_R[k][f][r]));
        chk(!illegal && !violation, "valid instruction flagged");
      end
      @(negedge clk);
      for (int a = 0; a < 32; a++) begin
        dbg_dm_addr = 5'(a); #1;
        chk(dbg_dm_data == DM[a], $sformatf("run %0d DM[%0d]", run, a));
      end
      for (int a = DATA_BASE; a < 256; a++)
        chk(dut.u_im.mem[a] == IM[a], $sformatf("run %0d IM[%0d]", run, a));
    end

    $display("U1 add %0d sub %0d | U2 add %0d sub %0d mul %0d | U3 add %0d mul %0d",
             n_u1add, n_u1sub, n_u2add, n_u2sub, n_u2mul, n_u3add, n_u3mul);
    $display("bus move %0d move_im %0d nop %0d | DM ld %0d st %0d | IM ld %0d st %0d bubbles %0d",
             n_move, n_moveim, n_busnop, n_dmld, n_dmst, n_imld, n_imst, n_bubble);
    $display("multiply write-backs %0d, reads before latency %0d, write collisions %0d",
             n_mulwb, n_hazard, n_collide);
    chk(n_u1add > 0 && n_u1sub > 0, "U1 operations exercised");
    chk(n_u2add > 0 && n_u2sub > 0 && n_u2mul > 0, "U2 operations exercised");
    chk(n_u3add > 0 && n_u3mul > 0, "U3 operations exercised");
    chk(n_move > 0 && n_moveim > 0 && n_busnop > 0, "bus operations exercised");
    chk(n_dmld > 0 && n_dmst > 0, "DM operations exercised");
    chk(n_imld > 0 && n_imst > 0 && n_bubble == n_imld + n_imst, "IM operations and bubbles");
    chk(n_mulwb > 0 && (LAT == 1 || n_hazard > 0), "delayed multiply write-back exercised");
    chk(n_collide > 0, "write priority exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
