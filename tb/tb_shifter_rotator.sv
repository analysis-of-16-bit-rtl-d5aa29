// tb_shifter_rotator: self-checking test of the shift/rotate unit.
// All four operations on all 256 operand values, compared with results built
// bit by bit here.
module tb_shifter_rotator;
  import risc_pkg::*;
  int checks = 0, failures = 0;
  sh_op_e     op;
  logic [7:0] a, y, want;

  shifter_rotator dut (.op(op), .a(a), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 4; o++) begin
      for (int v = 0; v < 256; v++) begin
        op = sh_op_e'(o); a = 8'(v);
        #1;
        for (int k = 0; k < 8; k++) begin
          case (op)
            SH_SHL: want[k] = (k == 0) ? 1'b0 : a[k-1];
            SH_SHR: want[k] = (k == 7) ? 1'b0 : a[k+1];
            SH_ROL: want[k] = a[(k + 7) % 8];
            default: want[k] = a[(k + 1) % 8];
          endcase
        end
        checks++;
        if (y !== want) begin
          failures++;
          $display("FAIL op=%s a=%h got %h want %h", op.name(), a, y, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
