// branch_predictor: dynamic predictor for conditional branches.
// A table of ENTRIES two-bit saturating counters indexed by the low bits of
// the branch's address. Fetch asks for a prediction at the PC (taken when the
// counter is 2 or 3); execute, where the branch resolves, updates the counter
// of the branch's address on the rising edge. Counters reset to 1 (weakly not
// taken). The source states that branches are handled by dynamic branch
// prediction; the table size and the two-bit scheme are this design's choice.
module branch_predictor #(
  parameter int unsigned PC_W    = risc_pkg::PC_W,
  parameter int unsigned ENTRIES = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PC_W-1:0] fetch_pc,
  output logic            predict_taken,
  input  logic            update,        // a conditional branch resolved
  input  logic [PC_W-1:0] update_pc,
  input  logic            update_taken
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [1:0]    ctr [ENTRIES];
  logic [IW-1:0] fidx, uidx;

  always_comb begin
    fidx          = fetch_pc[IW-1:0];
    uidx          = update_pc[IW-1:0];
    predict_taken = ctr[fidx][1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ctr[i] <= 2'd1;
    end else if (update) begin
      if (update_taken && ctr[uidx] != 2'd3)       ctr[uidx] <= ctr[uidx] + 2'd1;
      else if (!update_taken && ctr[uidx] != 2'd0) ctr[uidx] <= ctr[uidx] - 2'd1;
    end
  end
endmodule
