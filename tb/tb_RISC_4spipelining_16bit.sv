// tb_RISC_4spipelining_16bit: end-to-end test of the pipelined core.
// Each test loads a program through the load port, releases reset and runs
// the core until it halts. An instruction-set model in this testbench runs the
// same program one instruction at a time; afterwards all 16 registers and
// every data-memory word the program stored are compared with it. The model
// also predicts the cycle count: one cycle per executed instruction plus one,
// W = 8 extra cycles per MUL and one per mispredicted branch (its own copy of
// the two-bit predictor decides which those are).
// Programs: the instruction sequence of the reference waveform, then random
// programs with register-to-register and immediate operations, MUL,
// LOAD/STORE through a base register, counted loops closed by BNZ, forward
// BZ/BNZ/BRZ/JMP over instructions that must not execute, and HLT followed by
// instructions that must not execute either.
// The test counts, and requires at least once: a MUL stall, a result passed
// from write-back to decode on the same edge, a branch predicted taken
// correctly, a mispredict flush, HLT with the core clock stopped, and cycles
// with the multiplier clock gated off.
// Runs with all parameters at their defaults.
module tb_RISC_4spipelining_16bit;
  import risc_pkg::*;

  localparam int NPROG = 40;

  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0;
  logic        imem_we = 0;
  logic [7:0]  imem_waddr = 0;
  logic [15:0] imem_wdata = 0;
  logic [3:0]  dbg_reg_addr = 0;
  logic [7:0]  dbg_reg_data;
  logic        halted;
  logic [7:0]  pc_out, immed, rxdata, rydata, wrbkdata;
  logic [15:0] instr_out;
  logic [3:0]  rdxo, rdyo;

  RISC_4spipelining_16bit u_dut (
    .clk(clk), .rst_n(rst_n), .irq0(1'b0), .irq1(1'b0), .irq2(1'b0), .irq3(1'b0),
    .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .dbg_reg_addr(dbg_reg_addr), .dbg_reg_data(dbg_reg_data), .halted(halted),
    .pc_out(pc_out), .instr_out(instr_out), .immed(immed), .rdxo(rdxo), .rdyo(rdyo),
    .rxdata(rxdata), .rydata(rydata), .wrbkdata(wrbkdata)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ encoders
  function automatic logic [15:0] enc_r(int op, int rd, int rx, int ry);
    return 16'((op << 12) | (rd << 8) | (rx << 4) | ry);
  endfunction
  function automatic logic [15:0] enc_i(int op, int rd, int imm8);
    return 16'((op << 12) | (rd << 8) | (imm8 & 255));
  endfunction

  // ------------------------------------------------------------- program
  logic [15:0] prog [256];
  int          plen;

  function automatic void emit(logic [15:0] w);
    prog[plen] = w;
    plen++;
  endfunction

  // registers a random op may write: R0..R12 (R13 base pointer, R14 loop count)
  function automatic int rdst();
    return $urandom % 13;
  endfunction

  function automatic void emit_random_op(int mul_weight);
    int k = $urandom % (20 + mul_weight);
    if (k < 7) begin
      int ops [7] = '{2, 3, 4, 5, 6, 9, 10};
      emit(enc_r(ops[k], rdst(), $urandom % 16, $urandom % 16));
    end else if (k < 11) begin
      emit(enc_r(8, rdst(), $urandom % 16, $urandom % 8));
    end else if (k < 13) begin
      emit(enc_i(1, rdst(), $urandom));
    end else if (k < 16) begin
      emit(enc_r(12, rdst(), 13, $urandom % 16));        // LOAD [R13 + off]
    end else if (k < 20) begin
      emit(enc_r(13, $urandom % 16, 13, $urandom % 16)); // STORE [R13 + off]
    end else begin
      emit(enc_r(7, rdst(), $urandom % 16, $urandom % 16));
    end
  endfunction

  function automatic void gen_random_program();
    int loop_top;
    plen = 0;
    emit(enc_i(1, 13, 64));                               // base pointer
    for (int r = 0; r < 13; r++) emit(enc_i(1, r, $urandom));
    for (int off = -8; off < 8; off++)                    // fill the window
      emit(enc_r(13, $urandom % 13, 13, off & 15));
    for (int blk = 0; blk < 4; blk++) begin
      for (int i = 0; i < 6 + $urandom % 8; i++) emit_random_op(3);
      // counted loop
      emit(enc_i(1, 14, 2 + $urandom % 5));
      loop_top = plen;
      for (int i = 0; i < 1 + $urandom % 4; i++) emit_random_op(2);
      emit(enc_r(8, 14, 14, 2));                          // DEC R14
      emit(enc_i(14, 2, loop_top - plen));                // BNZ loop_top
      emit(enc_i(11, 14, 2));                             // BRZ R14, +2
      emit(enc_i(1, 0, 8'hEE));                           //   skipped
      // random forward conditional branches
      for (int i = 0; i < 3; i++) begin
        emit_random_op(0);
        case ($urandom % 3)
          0: emit(enc_i(14, 1, 2));                       // BZ +2
          1: emit(enc_i(14, 2, 2));                       // BNZ +2
          default: emit(enc_i(11, $urandom % 13, 2));     // BRZ r, +2
        endcase
        emit(enc_i(1, 12, $urandom));                     //   maybe skipped
      end
      emit(enc_i(14, 0, 2));                              // JMP +2
      emit(enc_i(1, 11, 8'h5A));                          //   skipped
    end
    emit(16'hF000);                                       // HLT
    for (int i = 0; i < 4; i++) emit(enc_i(1, i, 8'hA5)); // must not run
  endfunction

  // ----------------------------------------------------- reference model
  logic [7:0] m_reg [16];
  logic [7:0] m_mem [256];
  int         m_executed, m_muls, m_mispredicts, m_cycles;

  function automatic void model_run();
    int pc = 0, ctr [16], steps = 0;
    bit z = 0, done = 0;
    foreach (m_reg[r]) m_reg[r] = 0;
    foreach (ctr[i]) ctr[i] = 1;
    m_executed = 0; m_muls = 0; m_mispredicts = 0;
    while (!done && steps < 5000) begin
      logic [15:0] w = prog[pc];
      int op = w[15:12], rd = w[11:8], rx = w[7:4], ry = w[3:0];
      int a = m_reg[rx], b = m_reg[ry], res = 0, next = (pc + 1) % 256;
      int soff = ry < 8 ? ry : ry - 16;
      int boff = w[7:0] < 128 ? w[7:0] : w[7:0] - 256;
      bit wr = 0, setz = 0, cond_br = 0, taken = 0;
      steps++;
      m_executed++;
      case (op)
        1:  begin res = w[7:0]; wr = 1; end
        2:  begin res = a + b; wr = 1; setz = 1; end
        3:  begin res = a - b; wr = 1; setz = 1; end
        4:  begin res = a & b; wr = 1; setz = 1; end
        5:  begin res = a | b; wr = 1; setz = 1; end
        6:  begin res = a ^ b; wr = 1; setz = 1; end
        7:  begin res = a * b; wr = 1; setz = 1; m_muls++; end
        8:  begin
              wr = ry < 8; setz = ry < 8;
              case (ry)
                0: res = ~a;
                1: res = a + 1;
                2: res = a - 1;
                3: res = a;
                4: res = a << 1;
                5: res = a >> 1;
                6: res = (a << 1) | (a >> 7);
                7: res = (a >> 1) | ((a & 1) << 7);
                default: ;
              endcase
            end
        9:  begin res = ~(a & b); wr = 1; setz = 1; end
        10: begin res = ~(a | b); wr = 1; setz = 1; end
        11: begin cond_br = 1; taken = m_reg[rd] == 0; end
        12: begin res = m_mem[(a + soff) & 255]; wr = 1; end
        13: m_mem[(a + soff) & 255] = m_reg[rd];
        14: case (rd)
              0: begin taken = 1; next = (pc + boff) & 255; end
              1: begin cond_br = 1; taken = z; end
              2: begin cond_br = 1; taken = !z; end
              default: ;
            endcase
        15: done = 1;
        default: ;
      endcase
      if (cond_br) begin
        bit pred = ctr[pc % 16] >= 2;
        if (pred != taken) m_mispredicts++;
        if (taken && ctr[pc % 16] < 3) ctr[pc % 16]++;
        if (!taken && ctr[pc % 16] > 0) ctr[pc % 16]--;
        if (taken) next = (pc + boff) & 255;
      end
      if (wr) m_reg[rd] = 8'(res);
      if (setz) z = 8'(res) == 0;
      pc = next;
    end
    m_cycles = m_executed + 1 + 8 * m_muls + m_mispredicts;
  endfunction

  // ---------------------------------------------------- mechanism counters
  int n_mul_stall = 0, n_bypass = 0, n_pred_ok_taken = 0, n_flush = 0, n_halt = 0,
      n_mulclk_gated = 0, n_core_edges_halted = 0;

  always @(posedge clk) if (rst_n && !halted) begin
    if (u_dut.stall_fetch && u_dut.mul_busy) n_mul_stall++;
    if (u_dut.idex.valid && u_dut.mispredict) n_flush++;
    if (u_dut.br_update && u_dut.idex.pred_taken && u_dut.br_taken) n_pred_ok_taken++;
    if (!u_dut.mul_start && !u_dut.mul_busy) n_mulclk_gated++;
  end
  always @(negedge clk) if (rst_n && u_dut.wb_we && u_dut.ifid.valid &&
                            (u_dut.exwb.rd == u_dut.dec_rx || u_dut.exwb.rd == u_dut.dec_ry))
    n_bypass++;
  always @(posedge u_dut.core_clk) if (rst_n && halted) n_core_edges_halted++;
  always @(posedge u_dut.mul_clk) if (rst_n && !u_dut.mul_start && !u_dut.mul_busy) begin
    failures++;
    $display("FAIL multiplier clock ran while the multiplier was idle");
  end

  // ------------------------------------------------------------- runner
  task automatic run_program(input string name);
    int cycles = 0;
    rst_n = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 8'(a); imem_wdata = (a < plen) ? prog[a] : 16'h0000;
    end
    @(negedge clk) imem_we = 0;
    for (int a = 0; a < 256; a++) m_mem[a] = u_dut.u_dmem.mem[a];   // same start contents
    model_run();
    @(negedge clk) rst_n = 1;
    while (!halted && cycles < 20000) begin
      @(posedge clk); #1;
      cycles++;
    end
    n_halt += halted;
    // core must stay frozen: a few more cycles
    repeat (5) @(posedge clk);
    checks++;
    if (!halted) begin failures++; $display("FAIL %s: no halt", name); end
    checks++;
    if (cycles != m_cycles) begin
      failures++;
      $display("FAIL %s: %0d cycles, expected %0d (%0d instr, %0d MUL, %0d mispredicts)",
               name, cycles, m_cycles, m_executed, m_muls, m_mispredicts);
    end
    for (int r = 0; r < 16; r++) begin
      dbg_reg_addr = 4'(r); #1;
      checks++;
      if (dbg_reg_data !== m_reg[r]) begin
        failures++;
        $display("FAIL %s: R%0d = %h, expected %h", name, r, dbg_reg_data, m_reg[r]);
      end
    end
    for (int a = 0; a < 256; a++) begin
      checks++;
      if (u_dut.u_dmem.mem[a] !== m_mem[a]) begin
        failures++;
        $display("FAIL %s: mem[%h] = %h, expected %h", name, a, u_dut.u_dmem.mem[a], m_mem[a]);
      end
    end
  endtask

  initial begin
    // the instruction sequence of the reference waveform, then HLT
    plen = 0;
    foreach (prog[i]) prog[i] = 0;
    emit(16'h100F); emit(16'h0000); emit(16'h12AA); emit(16'h13AA);
    emit(16'h5323); emit(16'h2001); emit(16'h4001); emit(16'hF000);
    run_program("waveform program");
    for (int p = 0; p < NPROG; p++) begin
      foreach (prog[i]) prog[i] = 0;
      gen_random_program();
      run_program($sformatf("random program %0d (%0d words)", p, plen));
    end
    $display("mechanisms: mul stall cycles %0d, write-back bypasses %0d, correct taken predictions %0d, mispredict flushes %0d, halts %0d, gated multiplier cycles %0d",
             n_mul_stall, n_bypass, n_pred_ok_taken, n_flush, n_halt, n_mulclk_gated);
    checks++; if (n_mul_stall == 0)     begin failures++; $display("FAIL no MUL stall");          end
    checks++; if (n_bypass == 0)        begin failures++; $display("FAIL no bypass");             end
    checks++; if (n_pred_ok_taken == 0) begin failures++; $display("FAIL no correct prediction"); end
    checks++; if (n_flush == 0)         begin failures++; $display("FAIL no mispredict flush");   end
    checks++; if (n_halt == 0)          begin failures++; $display("FAIL no halt");               end
    checks++; if (n_mulclk_gated == 0)  begin failures++; $display("FAIL no gated cycle");        end
    checks++; if (n_core_edges_halted != 0) begin failures++; $display("FAIL core clock ran while halted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
