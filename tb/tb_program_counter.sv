// tb_program_counter: self-checking test of the program counter.
// Random sequences of hold, increment, predicted-taken offset and correction
// loads are applied; a reference value kept in the testbench is compared with
// pc_out after every rising edge. Also checks the reset value.
module tb_program_counter;
  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0;
  logic       en, take, fix;
  logic [7:0] offset, fix_pc, pc_out;
  logic [7:0] model;

  program_counter dut (.clk(clk), .rst_n(rst_n), .en(en), .take(take), .offset(offset),
                       .fix(fix), .fix_pc(fix_pc), .pc_out(pc_out));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; take = 0; fix = 0; offset = 0; fix_pc = 0;
    repeat (2) @(posedge clk);
    checks++;
    if (pc_out !== 8'd0) begin failures++; $display("FAIL reset value %h", pc_out); end
    @(negedge clk) rst_n = 1;
    model = 0;
    for (int i = 0; i < 1000; i++) begin
      en = 1'($urandom); take = 1'($urandom); fix = ($urandom % 8) == 0;
      offset = 8'($urandom); fix_pc = 8'($urandom);
      if (fix)      model = fix_pc;
      else if (en)  model = take ? 8'(model + offset) : 8'(model + 1);
      @(posedge clk); #1;
      checks++;
      if (pc_out !== model) begin
        failures++;
        $display("FAIL step %0d en=%b take=%b fix=%b got %h want %h", i, en, take, fix, pc_out, model);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
