// tb_control_unit: self-checking test of the instruction decoder.
// For random instruction words of every opcode (and every fn/condition value)
// the register indices, immediate and each control field are compared with an
// expected decode written out here from the instruction table. It also
// decodes the instruction words of the reference waveform (100F, 12AA, 5323,
// 2001) and checks the immediate and rx/ry fields it printed.
module tb_control_unit;
  import risc_pkg::*;
  int checks = 0, failures = 0;
  logic [15:0] instr;
  ctrl_t       ctrl;
  logic [3:0]  rd, rx, ry;
  logic [7:0]  imm;

  control_unit dut (.instr(instr), .ctrl(ctrl), .rd(rd), .rx(rx), .ry(ry), .imm(imm));

  task automatic chk(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL instr=%h %s got %0d want %0d", instr, what, got, want);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int op, f1, f2, f3;
    // expected fields
    int e_we, e_imm, e_unit, e_alu, e_sh, e_re, e_wr, e_br, e_cond, e_halt, e_z, e_rx, e_ry, e_immv;
    for (int i = 0; i < 4000; i++) begin
      op = i % 16; f1 = $urandom % 16; f2 = $urandom % 16; f3 = $urandom % 16;
      if (op == 8) f3 = (i / 16) % 9;          // all unary fn values + one undefined
      if (op == 14) f1 = (i / 16) % 4;         // JMP BZ BNZ + one undefined
      instr = 16'((op << 12) | (f1 << 8) | (f2 << 4) | f3);
      #1;
      e_we = 0; e_imm = 0; e_unit = U_ALU; e_alu = ALU_PASSA; e_sh = SH_SHL; e_re = 0; e_wr = 0;
      e_br = 0; e_cond = BR_ALWAYS; e_halt = 0; e_z = 0;
      e_rx = f2; e_ry = f3; e_immv = (f2 << 4) | f3;
      case (op)
        1:  begin e_we = 1; e_imm = 1; e_alu = ALU_PASSB; e_rx = f1; end
        2:  begin e_we = 1; e_z = 1; e_alu = ALU_ADD; end
        3:  begin e_we = 1; e_z = 1; e_alu = ALU_SUB; end
        4:  begin e_we = 1; e_z = 1; e_alu = ALU_AND; end
        5:  begin e_we = 1; e_z = 1; e_alu = ALU_OR; end
        6:  begin e_we = 1; e_z = 1; e_alu = ALU_XOR; end
        7:  begin e_we = 1; e_z = 1; e_unit = U_MUL; end
        8:  case (f3)
              0: begin e_we = 1; e_z = 1; e_alu = ALU_NOT; end
              1: begin e_we = 1; e_z = 1; e_alu = ALU_INC; end
              2: begin e_we = 1; e_z = 1; e_alu = ALU_DEC; end
              3: begin e_we = 1; e_z = 1; e_alu = ALU_PASSA; end
              4: begin e_we = 1; e_z = 1; e_unit = U_SHIFT; e_sh = SH_SHL; end
              5: begin e_we = 1; e_z = 1; e_unit = U_SHIFT; e_sh = SH_SHR; end
              6: begin e_we = 1; e_z = 1; e_unit = U_SHIFT; e_sh = SH_ROL; end
              7: begin e_we = 1; e_z = 1; e_unit = U_SHIFT; e_sh = SH_ROR; end
              default: ;
            endcase
        9:  begin e_we = 1; e_z = 1; e_alu = ALU_NAND; end
        10: begin e_we = 1; e_z = 1; e_alu = ALU_NOR; end
        11: begin e_br = 1; e_cond = BR_REGZ; e_rx = f1; end
        12: begin e_we = 1; e_imm = 1; e_alu = ALU_ADD; e_re = 1; e_immv = (f3 < 8) ? f3 : f3 + 240; end
        13: begin e_imm = 1; e_alu = ALU_ADD; e_wr = 1; e_ry = f1; e_immv = (f3 < 8) ? f3 : f3 + 240; end
        14: case (f1)
              0: begin e_br = 1; e_cond = BR_ALWAYS; end
              1: begin e_br = 1; e_cond = BR_Z; end
              2: begin e_br = 1; e_cond = BR_NZ; end
              default: ;
            endcase
        15: e_halt = 1;
        default: ;
      endcase
      chk("rd", rd, f1);
      chk("rx", rx, e_rx);
      chk("ry", ry, e_ry);
      chk("imm", imm, e_immv);
      chk("reg_we", ctrl.reg_we, e_we);
      chk("use_imm", ctrl.use_imm, e_imm);
      chk("unit", ctrl.unit, e_unit);
      if (e_we && e_unit == U_ALU) chk("alu_op", ctrl.alu_op, e_alu);
      if (e_unit == U_SHIFT) chk("sh_op", ctrl.sh_op, e_sh);
      chk("mem_re", ctrl.mem_re, e_re);
      chk("mem_we", ctrl.mem_we, e_wr);
      chk("is_branch", ctrl.is_branch, e_br);
      if (e_br) chk("br_cond", ctrl.br_cond, e_cond);
      chk("halt", ctrl.halt, e_halt);
      chk("sets_z", ctrl.sets_z, e_z);
      chk("has_imm", ctrl.has_imm, e_imm | e_br);
      chk("reads_ry", ctrl.reads_ry, (op >= 2 && op <= 7) || op == 9 || op == 10 || op == 13);
    end
    // instruction words and field values printed in the reference waveform
    instr = 16'h100F; #1; chk("fig imm", imm, 'h0F);
    instr = 16'h12AA; #1; chk("fig imm", imm, 'hAA); chk("fig rdx", rx, 2);
    instr = 16'h13AA; #1; chk("fig rdx", rx, 3);
    instr = 16'h5323; #1; chk("fig rdx", rx, 2); chk("fig rdy", ry, 3);
    instr = 16'h2001; #1; chk("fig rdx", rx, 0); chk("fig rdy", ry, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
