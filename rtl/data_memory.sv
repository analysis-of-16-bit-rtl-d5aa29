// data_memory: the RAM reached by LOAD and STORE.
// 2**AW words of W bits, read asynchronously at addr, written on the falling
// clock edge, which is when the memory/write-back stage commits its results.
// The source shows the RAM only as a block between decode and write-back; its
// size, the asynchronous read and the write edge are this design's choices.
// Contents are not reset.
module data_memory #(
  parameter int unsigned AW = risc_pkg::DMEM_AW,
  parameter int unsigned W  = risc_pkg::DATA_W
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [2**AW];

  always_ff @(negedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  always_comb rdata = mem[addr];
endmodule
