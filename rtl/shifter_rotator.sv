// shifter_rotator: shift and rotate unit of the execute stage.
// Moves the operand one bit left or right, filling with zero (SHL, SHR) or
// with the bit shifted out at the other end (ROL, ROR). Purely combinational.
// The source names a shifter and a shifter/rotator driven by the second
// decoder; the single-bit distance is this design's choice.
module shifter_rotator
  import risc_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  sh_op_e       op,
  input  logic [W-1:0] a,
  output logic [W-1:0] y
);
  always_comb begin
    unique case (op)
      SH_SHL:  y = {a[W-2:0], 1'b0};
      SH_SHR:  y = {1'b0, a[W-1:1]};
      SH_ROL:  y = {a[W-2:0], a[W-1]};
      SH_ROR:  y = {a[0], a[W-1:1]};
      default: y = a;
    endcase
  end
endmodule
