// spam2_mul_pipe: 8 x 8 multiplier whose result is written back LATENCY
// cycles after issue.
//
// The product (truncated to its low 8 bits) is formed in the issue cycle from
// the operands read that cycle and then travels, together with its
// destination register number, through LATENCY-1 pipeline registers. The
// output port therefore reports a write-back at the end of cycle t+LATENCY-1
// for an operation issued in cycle t, so the result is readable in cycle
// t+LATENCY. With LATENCY = 1 the output is combinational. There is no
// bypass: a reader in between sees the old register value. The latency of 4
// is the one the instruction set gives its multiply operations; building it
// as a plain delay line is this design's choice. Issue may happen every
// cycle (usage 1). Synchronous active-high reset clears the valid bits.
module spam2_mul_pipe #(
  parameter int unsigned LATENCY = 4,
  parameter int unsigned DW      = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          issue,
  input  logic [1:0]    dst,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  output logic          wb_en,
  output logic [1:0]    wb_addr,
  output logic [DW-1:0] wb_data
);

  logic [DW-1:0] product;
  assign product = DW'(a * b);

  if (LATENCY <= 1) begin : g_comb
    assign wb_en   = issue;
    assign wb_addr = dst;
    assign wb_data = product;
  end else begin : g_pipe
    localparam int unsigned STAGES = LATENCY - 1;
    logic [STAGES-1:0]         vld;
    logic [1:0]                adr [STAGES];
    logic [DW-1:0]             dat [STAGES];

    always_ff @(posedge clk) begin
      if (rst) vld <= '0;
      else begin
        vld[0] <= issue;
        for (int s = 1; s < STAGES; s++) vld[s] <= vld[s-1];
      end
    end

    always_ff @(posedge clk) begin
      adr[0] <= dst;
      dat[0] <= product;
      for (int s = 1; s < STAGES; s++) begin
        adr[s] <= adr[s-1];
        dat[s] <= dat[s-1];
      end
    end

    assign wb_en   = vld[STAGES-1];
    assign wb_addr = adr[STAGES-1];
    assign wb_data = dat[STAGES-1];
  end

endmodule
