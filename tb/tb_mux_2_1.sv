// tb_mux_2_1: self-checking test of the ALU operand-B selector.
// Drives random immediate and register values with both select values and
// compares the output with the expected input.
module tb_mux_2_1;
  int checks = 0, failures = 0;
  logic       sel;
  logic [7:0] imm, ry, to_alu;

  mux_2_1 dut (.sel(sel), .imm(imm), .ry(ry), .to_alu(to_alu));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      imm = 8'($urandom); ry = 8'($urandom); sel = 1'($urandom);
      #1;
      checks++;
      if (to_alu !== (sel ? imm : ry)) begin
        failures++;
        $display("FAIL sel=%0b imm=%h ry=%h got %h", sel, imm, ry, to_alu);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
