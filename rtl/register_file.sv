// register_file: the 16 general purpose registers.
// Two asynchronous read ports (rx, ry) feed the decode stage, a third read port
// is for observation. Write-back happens on the falling clock edge, the same
// edge on which the decode stage latches its operands, so the read ports pass
// the value being written straight through when the addresses match: an
// instruction decoded right behind its producer sees the new value without a
// stall. Sixteen registers come from the source's block diagram; the width,
// the falling-edge write and the write-through are this design's choices.
// Registers reset to zero (asynchronous, active low).
module register_file #(
  parameter int unsigned W    = risc_pkg::DATA_W,
  parameter int unsigned NREG = risc_pkg::NREG,
  localparam int unsigned AW  = $clog2(NREG)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] rx_addr,
  output logic [W-1:0]  rx_data,
  input  logic [AW-1:0] ry_addr,
  output logic [W-1:0]  ry_data,
  input  logic [AW-1:0] dbg_addr,
  output logic [W-1:0]  dbg_data
);
  logic [W-1:0] regs [NREG];

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  always_comb begin
    rx_data  = (we && waddr == rx_addr) ? wdata : regs[rx_addr];
    ry_data  = (we && waddr == ry_addr) ? wdata : regs[ry_addr];
    dbg_data = regs[dbg_addr];
  end
endmodule
