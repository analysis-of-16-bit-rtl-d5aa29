// tb_multiplier: self-checking test of the shift-and-add multiplier.
// Random and edge-case operand pairs; for each it pulses start, counts the
// cycles until last, checks that this is exactly W = 8 busy cycles and that
// product equals (a * b) mod 256 on that cycle.
module tb_multiplier;
  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0, start = 0;
  logic [7:0] a = 0, b = 0, product;
  logic       busy, last;
  int         cycles;

  multiplier dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b),
                  .busy(busy), .last(last), .product(product));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      if (i < 16) begin a = (i % 4 == 0) ? 8'h00 : (i % 4 == 1) ? 8'hff : 8'h01 << (i % 8); b = 8'(8'hff >> (i / 4)); end
      else begin a = 8'($urandom); b = 8'($urandom); end
      start = 1;
      @(negedge clk);
      start = 0;
      a = 8'($urandom); b = 8'($urandom);    // operands must have been captured
      cycles = 0;
      while (!last && cycles < 40) begin
        checks++;
        if (!busy) begin failures++; $display("FAIL not busy while running"); end
        @(negedge clk);
        cycles++;
      end
      cycles++;
      checks++;
      if (cycles != 8) begin failures++; $display("FAIL %0d busy cycles", cycles); end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL still busy"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // product check on the last cycle, against the operands captured at start
  logic [7:0] ca, cb;
  always @(posedge clk) begin
    if (start && !busy) begin ca <= a; cb <= b; end
  end
  always @(negedge clk) begin
    if (last) begin
      checks++;
      if (product !== 8'((int'(ca) * int'(cb)) % 256)) begin
        failures++;
        $display("FAIL %h * %h got %h", ca, cb, product);
      end
    end
  end
endmodule
