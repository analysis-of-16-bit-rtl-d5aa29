// tb_program_workloads: the core running two small programs end to end.
//  1. The instruction sequence of the reference waveform (100F 0000 12AA 13AA
//     5323 2001 4001, then HLT). Checks, cycle by cycle, that the instruction
//     word shown belongs to pc_out, and that the decoded immediate, rx and ry
//     index outputs take the values the reference waveform prints (immediate
//     0F then AA; rx 0 0 2 3 2 0 0; ry 3 for 5323 and 1 for 2001/4001). Also
//     checks that these decode outputs change on the falling edge.
//  2. Multiplication in software by repeated ADD in a counted loop, next to the
//     hardware MUL: R3 = a * b by the loop and R5 = a * b by MUL must both equal
//     (a * b) mod 256, and the run must take exactly the expected number of
//     cycles (one per instruction, plus one, plus 8 for MUL, plus one per
//     mispredicted branch as a two-bit predictor mispredicts them).
module tb_program_workloads;
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
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %h, expected %h", what, got, want);
    end
  endtask

  logic [15:0] prog [256];

  task automatic load_and_reset();
    rst_n = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 8'(a); imem_wdata = prog[a];
    end
    @(negedge clk) imem_we = 0;
    @(negedge clk) rst_n = 1;
  endtask

  function automatic logic [7:0] reg_value(input int r);
    return u_dut.u_rf.regs[r];
  endfunction

  initial begin
    // ---------------------------------------------- reference waveform
    logic [15:0] wave [7] = '{16'h100F, 16'h0000, 16'h12AA, 16'h13AA, 16'h5323, 16'h2001, 16'h4001};
    int exp_imm [7] = '{'h0F, 'h0F, 'hAA, 'hAA, 'hAA, 'hAA, 'hAA};
    int exp_rx  [7] = '{0, 0, 2, 3, 2, 0, 0};
    int exp_ry  [7] = '{0, 0, 0, 0, 3, 1, 1};
    int cycles;

    foreach (prog[i]) prog[i] = 16'h0000;
    foreach (wave[i]) prog[i] = wave[i];
    prog[7] = 16'hF000;
    load_and_reset();
    // instruction k is fetched on rising edge k+1 and decoded on the falling edge after it
    for (int k = 0; k < 7; k++) begin
      chk($sformatf("pc_out before fetch %0d", k), pc_out, k);
      chk($sformatf("instruction at pc %0d", k), instr_out, wave[k]);
      @(posedge clk); #1;
      if (k > 0) begin
        chk("immediate unchanged until the falling edge", immed, exp_imm[k - 1]);
        chk("rx unchanged until the falling edge", rdxo, exp_rx[k - 1]);
      end
      @(negedge clk); #1;
      chk($sformatf("immediate of %h", wave[k]), immed, exp_imm[k]);
      chk($sformatf("rx index of %h", wave[k]), rdxo, exp_rx[k]);
      chk($sformatf("ry index of %h", wave[k]), rdyo, exp_ry[k]);
    end
    cycles = 7;
    while (!halted && cycles < 100) begin @(posedge clk); #1; cycles++; end
    chk("waveform program halts after 8 instructions + 1 cycles", cycles, 9);

    // ------------------------------------- software multiply vs. MUL
    for (int t = 0; t < 12; t++) begin
      int a, b, executed, mispredicts, want_cycles;
      a = (t < 4) ? 7 : int'($urandom % 256);
      b = (t == 0) ? 0 : (t == 1) ? 1 : (t == 2) ? 2 : (t == 3) ? 5 : int'($urandom % 64);
      foreach (prog[i]) prog[i] = 16'h0000;
      prog[0] = 16'h1100 | 16'(a);      // MVI R1, a
      prog[1] = 16'h1200 | 16'(b);      // MVI R2, b
      prog[2] = 16'h1300;               // MVI R3, 0
      prog[3] = 16'h1600 | 16'(b);      // MVI R6, b
      prog[4] = 16'hB204;               // BRZ R2, +4  -> 8
      prog[5] = 16'h2331;               // L: ADD R3, R3, R1
      prog[6] = 16'h8222;               //    DEC R2
      prog[7] = 16'hE2FE;               //    BNZ L (-2)
      prog[8] = 16'h7516;               // MUL R5, R1, R6
      prog[9] = 16'hF000;               // HLT
      executed    = (b == 0) ? 7 : 7 + 3 * b;
      mispredicts = (b == 0) ? 1 : (b == 1) ? 0 : 2;
      want_cycles = executed + 1 + 8 + mispredicts;
      load_and_reset();
      cycles = 0;
      while (!halted && cycles < 2000) begin @(posedge clk); #1; cycles++; end
      chk($sformatf("ADD-loop product %0d*%0d", a, b), reg_value(3), (a * b) % 256);
      chk($sformatf("MUL product %0d*%0d", a, b), reg_value(5), (a * b) % 256);
      chk($sformatf("cycles for b=%0d", b), cycles, want_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
