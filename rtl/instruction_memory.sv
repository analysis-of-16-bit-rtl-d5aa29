// instruction_memory: program store, 2**AW words of DW bits.
// The fetch stage reads it asynchronously at the program counter. A write port
// (synchronous, rising edge) lets the program be loaded from outside before
// reset is released; the core itself never writes it. Sizes follow the RTL
// schematic of the source: 8-bit address from the PC, 16-bit instruction word.
module instruction_memory #(
  parameter int unsigned AW = risc_pkg::PC_W,
  parameter int unsigned DW = risc_pkg::INSTR_W
) (
  input  logic          clk,
  input  logic          we,          // program load
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] pc,
  output logic [DW-1:0] instruction
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb instruction = mem[pc];
endmodule
