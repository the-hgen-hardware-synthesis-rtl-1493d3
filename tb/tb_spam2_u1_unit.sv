// tb_spam2_u1_unit: self-checking test of the U1 arithmetic unit.
//
// Applies every operation (ADD, SUB, NOP, none) with random 8-bit operands
// and destination, and compares the write request with the 8-bit truncated
// sum or difference computed here. Combinational; 1 ns per vector.
module tb_spam2_u1_unit;
  import spam2_pkg::*;

  unit_id_t   id;
  logic [7:0] a, b, d;
  logic [1:0] rc, wa;
  logic       we;
  int checks = 0, failures = 0;

  spam2_u1_unit dut (.id, .ra_data (a), .rb_data (b), .rc,
                     .wr_en (we), .wr_addr (wa), .wr_data (d));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int op;
    logic [8:0] full;
    repeat (4000) begin
      op = $urandom_range(0, 3);
      a  = 8'($urandom()); b = 8'($urandom()); rc = 2'($urandom());
      id = '0;
      case (op)
        0: id.add = 1'b1;
        1: id.sub = 1'b1;
        2: id.nop = 1'b1;
        default: ;
      endcase
      #1;
      checks++;
      if (op == 0) full = {1'b0, a} + {1'b0, b};
      else         full = {1'b0, a} + {1'b0, ~b} + 9'd1;
      if (op < 2) begin
        if (!(we && wa == rc && d == full[7:0])) begin
          failures++;
          $display("FAIL op=%0d a=%0d b=%0d got we=%0b d=%0d", op, a, b, we, d);
        end
      end else if (we) begin
        failures++;
        $display("FAIL op=%0d wrote a register", op);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
