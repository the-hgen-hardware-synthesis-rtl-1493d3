// tb_spam2_u2_unit: self-checking test of the U2 arithmetic unit.
//
// Each cycle issues a random operation (ADD, SUB, MUL, NOP, none) with random
// operands. ADD/SUB results are checked on the single-cycle write port in the
// issue cycle. Every MUL is recorded with its issue cycle; the late write
// port must report exactly those products (low 8 bits of a*b) to the right
// register, 3 cycles after issue, i.e. readable 4 cycles after issue, the
// multiply latency of the instruction set. Inputs change after the falling
// edge and are checked before the rising edge.
module tb_spam2_u2_unit;
  import spam2_pkg::*;

  localparam int LAT = 4;
  logic clk = 0, rst = 1;
  unit_id_t   id;
  logic [7:0] a, b, d, wbd;
  logic [1:0] rc, wa, wba;
  logic       we, wbe;
  int checks = 0, failures = 0, muls = 0;

  spam2_u2_unit #(.MUL_LATENCY(LAT)) dut (
    .clk, .rst, .id, .ra_data (a), .rb_data (b), .rc,
    .wr_en (we), .wr_addr (wa), .wr_data (d),
    .wb_en (wbe), .wb_addr (wba), .wb_data (wbd));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected late writes indexed by the cycle in which they appear
  logic       exp_v [0:4099];
  logic [1:0] exp_a [0:4099];
  logic [7:0] exp_d [0:4099];

  task automatic fail(input string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endtask

  initial begin
    int op;
    logic [15:0] p;
    for (int i = 0; i < 4100; i++) exp_v[i] = 1'b0;
    id = '0; a = '0; b = '0; rc = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      op = $urandom_range(0, 4);
      a  = 8'($urandom()); b = 8'($urandom()); rc = 2'($urandom());
      id = '0;
      case (op)
        0: id.add = 1'b1;
        1: id.sub = 1'b1;
        2: id.mul = 1'b1;
        3: id.nop = 1'b1;
        default: ;
      endcase
      if (op == 2) begin
        p = 16'(a) * 16'(b);
        exp_v[cyc + LAT - 1] = 1'b1;
        exp_a[cyc + LAT - 1] = rc;
        exp_d[cyc + LAT - 1] = p[7:0];
        muls++;
      end
      #1;
      checks++;
      case (op)
        0: if (!(we && wa == rc && d == 8'(a + b))) fail("add");
        1: if (!(we && wa == rc && d == 8'(a - b))) fail("sub");
        default: if (we) fail("unexpected unit write");
      endcase
      checks++;
      if (wbe != exp_v[cyc] || (wbe && (wba != exp_a[cyc] || wbd != exp_d[cyc])))
        fail($sformatf("late write cycle %0d: got %0b/%0d/%0d", cyc, wbe, wba, wbd));
    end
    checks++;
    if (muls < 100) fail("too few multiplies");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
