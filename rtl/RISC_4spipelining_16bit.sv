// RISC_4spipelining_16bit: four-stage pipelined RISC core with 16-bit
// instructions, 8-bit data, sixteen registers and clock gating.
//
// Stages and clock edges (both edges of the clock are used):
//   IF  rising edge  : the fetch register takes imem[PC]; the PC moves on by
//                      one, or by the branch offset when the predictor (or an
//                      unconditional JMP) says taken.
//   ID  falling edge : the decode register takes the control word, register
//                      indices, immediate and both register operands.
//   EX  rising edge  : ALU / shifter / multiplier result, memory address and
//                      store data go into the write-back register; branches
//                      resolve and, if mispredicted, redirect the PC and
//                      flush the one wrong-path instruction; HLT halts.
//   MEM/WB falling edge: data memory is written (STORE) or read (LOAD) and the
//                      result is written to the register file.
// An instruction thus goes from fetch to write-back in one and a half cycles
// and finishes one per cycle. A result written back on a falling edge is
// passed straight to the decode stage latching on that same edge, so
// dependent instructions do not stall. To save switching, the decode
// register reloads its immediate and ry fields only for instructions that
// use them (so immed/rdyo/rydata hold their last used value). A MUL stalls fetch and decode for W
// cycles while the shift-and-add multiplier works. HLT stops the gated core
// clock; only reset restarts the core.
//
// Interface: clk, active-low asynchronous rst_n, a program-load write port
// into the instruction memory (use it while rst_n is low), a debug read port
// into the register file, halted, and observation outputs named after the
// source's simulation waveform (pc_out, the instruction word at pc_out, the decoded
// immediate, rx/ry indices and data, the write-back data).
// irq0..irq3 are the interrupt pins of the source's top-level symbol; the
// source gives them no behaviour, so they are inputs that nothing reads.
//
// Following the source: four stages, rising-edge fetch and execute,
// falling-edge decode, 16 registers, 8-bit PC and instruction address, 16-bit
// instructions, 8-bit operands, hazard detection with stalls, dynamic branch
// prediction, halt, clock gating. This design's own: the opcode encoding, the
// falling-edge write-back with write-through, the zero flag and its users,
// predictor size, data memory size, reset and the load/debug ports.
module RISC_4spipelining_16bit
  import risc_pkg::*;
#(
  parameter int unsigned BP_ENTRIES = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               irq0,
  input  logic               irq1,
  input  logic               irq2,
  input  logic               irq3,
  // program load
  input  logic               imem_we,
  input  logic [PC_W-1:0]    imem_waddr,
  input  logic [INSTR_W-1:0] imem_wdata,
  // register observation
  input  logic [RA_W-1:0]    dbg_reg_addr,
  output logic [DATA_W-1:0]  dbg_reg_data,
  output logic               halted,
  // waveform observation
  output logic [PC_W-1:0]    pc_out,
  output logic [INSTR_W-1:0] instr_out,
  output logic [DATA_W-1:0]  immed,
  output logic [RA_W-1:0]    rdxo,
  output logic [RA_W-1:0]    rdyo,
  output logic [DATA_W-1:0]  rxdata,
  output logic [DATA_W-1:0]  rydata,
  output logic [DATA_W-1:0]  wrbkdata
);
  localparam int unsigned W = DATA_W;

  // ---------------------------------------------------------------- clocks
  logic core_clk, mul_clk;
  logic mul_start, mul_busy, mul_last;

  low_power_unit u_lpu (
    .clk(clk), .halted(halted), .mul_active(mul_start || mul_busy),
    .core_clk(core_clk), .mul_clk(mul_clk)
  );

  // ------------------------------------------------------- pipeline state
  typedef struct packed {
    logic               valid;
    logic [INSTR_W-1:0] instr;
    logic [PC_W-1:0]    pc;
    logic               pred_taken;
  } ifid_t;

  typedef struct packed {
    logic               valid;
    ctrl_t              ctrl;
    logic [PC_W-1:0]    pc;
    logic               pred_taken;
    logic [RA_W-1:0]    rd;
    logic [RA_W-1:0]    rx;
    logic [RA_W-1:0]    ry;
    logic [W-1:0]       a;
    logic [W-1:0]       b_reg;
    logic [W-1:0]       imm;
  } idex_t;

  typedef struct packed {
    logic               reg_we;
    logic               mem_re;
    logic               mem_we;
    logic [RA_W-1:0]    rd;
    logic [W-1:0]       result;   // ALU/shift/mul result or memory address
    logic [W-1:0]       sdata;    // store data
  } exwb_t;

  ifid_t ifid;
  idex_t idex;
  exwb_t exwb;
  logic  zflag;

  // ------------------------------------------------------- hazard control
  logic stall_fetch, hold_decode, flush_fetch, ex_bubble;
  logic mispredict;

  hazard_detection_unit u_hdu (
    .ex_valid(idex.valid), .ex_is_mul(idex.ctrl.unit == U_MUL),
    .mul_busy(mul_busy), .mul_last(mul_last),
    .mispredict(mispredict), .ex_halt(idex.ctrl.halt),
    .mul_start(mul_start), .stall_fetch(stall_fetch), .hold_decode(hold_decode),
    .flush_fetch(flush_fetch), .ex_bubble(ex_bubble)
  );

  // ------------------------------------------------------------------ IF
  logic [INSTR_W-1:0] fetch_instr;
  logic [PC_W-1:0]    pc, fix_pc;
  logic               bp_taken, fetch_is_jmp, fetch_is_cond, fetch_take;
  logic               br_update, br_taken;

  instruction_memory u_imem (
    .clk(clk), .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .pc(pc), .instruction(fetch_instr)
  );

  branch_predictor #(.ENTRIES(BP_ENTRIES)) u_bp (
    .clk(core_clk), .rst_n(rst_n), .fetch_pc(pc), .predict_taken(bp_taken),
    .update(br_update), .update_pc(idex.pc), .update_taken(br_taken)
  );

  // Pre-decode of the fetched word: which branch kind it is.
  always_comb begin
    fetch_is_jmp  = fetch_instr[15:12] == OP_BR && fetch_instr[11:8] == BC_JMP;
    fetch_is_cond = fetch_instr[15:12] == OP_BRZ ||
                    (fetch_instr[15:12] == OP_BR &&
                     (fetch_instr[11:8] == BC_BZ || fetch_instr[11:8] == BC_BNZ));
    fetch_take    = fetch_is_jmp || (fetch_is_cond && bp_taken);
  end

  program_counter u_pc (
    .clk(core_clk), .rst_n(rst_n), .en(!stall_fetch), .take(fetch_take),
    .offset(fetch_instr[7:0]), .fix(idex.valid && mispredict), .fix_pc(fix_pc),
    .pc_out(pc)
  );

  always_ff @(posedge core_clk or negedge rst_n) begin
    if (!rst_n)           ifid <= '0;
    else if (flush_fetch) ifid.valid <= 1'b0;
    else if (!stall_fetch) begin
      ifid.valid      <= 1'b1;
      ifid.instr      <= fetch_instr;
      ifid.pc         <= pc;
      ifid.pred_taken <= fetch_take;
    end
  end

  // ------------------------------------------------------------------ ID
  ctrl_t           dec_ctrl;
  logic [RA_W-1:0] dec_rd, dec_rx, dec_ry;
  logic [W-1:0]    dec_imm, rx_val, ry_val;
  logic            wb_we;
  logic [W-1:0]    wb_data, dmem_rdata;

  control_unit u_cu (
    .instr(ifid.instr), .ctrl(dec_ctrl), .rd(dec_rd), .rx(dec_rx), .ry(dec_ry),
    .imm(dec_imm)
  );

  register_file u_rf (
    .clk(core_clk), .rst_n(rst_n), .we(wb_we), .waddr(exwb.rd), .wdata(wb_data),
    .rx_addr(dec_rx), .rx_data(rx_val), .ry_addr(dec_ry), .ry_data(ry_val),
    .dbg_addr(dbg_reg_addr), .dbg_data(dbg_reg_data)
  );

  always_ff @(negedge core_clk or negedge rst_n) begin
    if (!rst_n) idex <= '0;
    else if (!hold_decode) begin
      idex.valid      <= ifid.valid;
      idex.ctrl       <= ifid.valid ? dec_ctrl : CTRL_NOP;
      idex.pc         <= ifid.pc;
      idex.pred_taken <= ifid.pred_taken;
      idex.rd         <= dec_rd;
      idex.rx         <= dec_rx;
      idex.a          <= rx_val;
      // operand fields an instruction does not use keep their old value
      if (ifid.valid && dec_ctrl.reads_ry) begin
        idex.ry    <= dec_ry;
        idex.b_reg <= ry_val;
      end
      if (ifid.valid && dec_ctrl.has_imm) idex.imm <= dec_imm;
    end
  end

  // ------------------------------------------------------------------ EX
  logic [W-1:0] op_b, alu_y, sh_y, mul_y, ex_result;
  logic         alu_zero, cond_true;

  mux_2_1 u_mux (.sel(idex.ctrl.use_imm), .imm(idex.imm), .ry(idex.b_reg), .to_alu(op_b));

  alu u_alu (.op(idex.ctrl.alu_op), .a(idex.a), .b(op_b), .y(alu_y), .zero(alu_zero));

  shifter_rotator u_sh (.op(idex.ctrl.sh_op), .a(idex.a), .y(sh_y));

  multiplier u_mul (
    .clk(mul_clk), .rst_n(rst_n), .start(mul_start), .a(idex.a), .b(idex.b_reg),
    .busy(mul_busy), .last(mul_last), .product(mul_y)
  );

  always_comb begin
    unique case (idex.ctrl.unit)
      U_SHIFT: ex_result = sh_y;
      U_MUL:   ex_result = mul_y;
      default: ex_result = alu_y;
    endcase

    unique case (idex.ctrl.br_cond)
      BR_Z:    cond_true = zflag;
      BR_NZ:   cond_true = !zflag;
      BR_REGZ: cond_true = (idex.a == '0);
      default: cond_true = 1'b1;
    endcase
    br_taken   = cond_true;
    br_update  = idex.valid && idex.ctrl.is_branch && idex.ctrl.br_cond != BR_ALWAYS;
    mispredict = idex.ctrl.is_branch && (br_taken != idex.pred_taken);
    fix_pc     = br_taken ? idex.pc + idex.imm : idex.pc + PC_W'(1);
  end

  always_ff @(posedge core_clk or negedge rst_n) begin
    if (!rst_n) begin
      exwb  <= '0;
      zflag <= 1'b0;
    end else begin
      exwb.reg_we <= !ex_bubble && idex.ctrl.reg_we;
      exwb.mem_re <= !ex_bubble && idex.ctrl.mem_re;
      exwb.mem_we <= !ex_bubble && idex.ctrl.mem_we;
      exwb.rd     <= idex.rd;
      exwb.result <= ex_result;
      exwb.sdata  <= idex.b_reg;
      if (!ex_bubble && idex.ctrl.sets_z) zflag <= (ex_result == '0);
    end
  end

  // halt: free-running clock, so the flag survives the stopped core clock
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              halted <= 1'b0;
    else if (idex.valid && idex.ctrl.halt)   halted <= 1'b1;
  end

  // -------------------------------------------------------------- MEM/WB
  data_memory u_dmem (
    .clk(core_clk), .we(exwb.mem_we), .addr(exwb.result[DMEM_AW-1:0]),
    .wdata(exwb.sdata), .rdata(dmem_rdata)
  );

  always_comb begin
    wb_we   = exwb.reg_we;
    wb_data = exwb.mem_re ? dmem_rdata : exwb.result;
  end

  // ------------------------------------------------------------ observe
  always_comb begin
    pc_out    = pc;
    instr_out = fetch_instr;
    immed     = idex.imm;
    rdxo      = idex.rx;
    rdyo      = idex.ry;
    rxdata    = idex.a;
    rydata    = idex.b_reg;
    wrbkdata  = wb_data;
  end

  // A squash of the wrong path can only come from a branch in execute.
  assert property (@(posedge core_clk) disable iff (!rst_n)
                   (idex.valid && mispredict) |-> idex.ctrl.is_branch);
endmodule
