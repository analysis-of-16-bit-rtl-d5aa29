// program_counter: holds the address of the next instruction to fetch.
// Each enabled clock it moves on by one, or by the signed branch offset when the
// fetch stage predicts a branch taken, or loads an absolute address when the
// execute stage corrects a mispredicted branch (fix has priority). With en low
// it holds (pipeline stall or halt). The source gives the increment by one and
// the increment by the branch offset; the enable and the correction load are
// this design's additions needed for stalls and branch prediction.
// Timing: registered on the rising edge, asynchronous active-low reset to 0.
module program_counter #(
  parameter int unsigned PC_W = risc_pkg::PC_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,        // advance this cycle
  input  logic            take,      // predicted-taken branch at pc_out
  input  logic [PC_W-1:0] offset,    // branch offset, two's complement
  input  logic            fix,       // load fix_pc (mispredict correction)
  input  logic [PC_W-1:0] fix_pc,
  output logic [PC_W-1:0] pc_out
);
  logic [PC_W-1:0] pc_step;

  always_comb pc_step = pc_out + (take ? offset : PC_W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   pc_out <= '0;
    else if (fix) pc_out <= fix_pc;
    else if (en)  pc_out <= pc_step;
  end
endmodule
