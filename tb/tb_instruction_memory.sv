// tb_instruction_memory: self-checking test of the instruction store.
// Writes a pseudo-random word (a fixed hash of the address) to every one of
// the 256 locations through the load port, then reads all of them back in a
// shuffled order at the fetch address and compares.
module tb_instruction_memory;
  int checks = 0, failures = 0;
  logic        clk = 0, we = 0;
  logic [7:0]  waddr = 0, pc = 0;
  logic [15:0] wdata = 0, instruction;

  instruction_memory dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                          .pc(pc), .instruction(instruction));

  always #5 clk = ~clk;

  function automatic logic [15:0] pattern(input logic [7:0] a);
    return 16'((a * 16'h9e37) ^ 16'h5a5a ^ (a << 9));
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1; waddr = 8'(a); wdata = pattern(8'(a));
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 256; i++) begin
      pc = 8'(i * 37 + 11);
      #1;
      checks++;
      if (instruction !== pattern(pc)) begin
        failures++;
        $display("FAIL addr %h got %h want %h", pc, instruction, pattern(pc));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
