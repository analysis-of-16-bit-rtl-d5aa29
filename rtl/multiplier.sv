// multiplier: sequential shift-and-add multiplier for the MUL instruction.
// The product is built with the ALU's adder: after start the unit runs W
// steps; each step adds the (left-shifted) multiplicand to the accumulator
// when the current multiplier bit is one. The result is the low W bits of
// a * b. Timing: start is sampled on a rising edge (operands captured), busy
// is then high for W rising edges; on the last of them (last = 1) product
// holds the finished value for the execute stage to latch. A MUL therefore
// occupies the execute stage for W + 1 cycles. That the multiplier is built
// from addition follows the source; the sequencing is this design's own.
// Asynchronous active-low reset.
module multiplier
  import risc_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         busy,
  output logic         last,
  output logic [W-1:0] product
);
  localparam int unsigned CW = $clog2(W);

  logic [W-1:0]  acc, mcand, mplier, addend, sum;
  logic [CW-1:0] cnt;
  logic          sum_zero;

  always_comb addend = mplier[0] ? mcand : '0;

  alu #(.W(W)) u_adder (
    .op(ALU_ADD), .a(acc), .b(addend), .y(sum), .zero(sum_zero)
  );

  always_comb begin
    last    = busy && (cnt == CW'(W - 1));
    product = sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      cnt    <= '0;
      acc    <= '0;
      mcand  <= '0;
      mplier <= '0;
    end else if (!busy) begin
      if (start) begin
        busy   <= 1'b1;
        cnt    <= '0;
        acc    <= '0;
        mcand  <= a;
        mplier <= b;
      end
    end else begin
      acc    <= sum;
      mcand  <= mcand << 1;
      mplier <= mplier >> 1;
      cnt    <= cnt + CW'(1);
      if (last) busy <= 1'b0;
    end
  end
endmodule
