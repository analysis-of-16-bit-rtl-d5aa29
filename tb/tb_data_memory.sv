// tb_data_memory: self-checking test of the data RAM.
// Random falling-edge writes interleaved with asynchronous reads, compared
// with a reference array; every location is written once first so that
// every read has a known value.
module tb_data_memory;
  int checks = 0, failures = 0;
  logic       clk = 0, we = 0;
  logic [7:0] addr = 0, wdata = 0, rdata;
  logic [7:0] model [256];

  data_memory dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      @(posedge clk);
      we = 1; addr = 8'(a); wdata = 8'($urandom); model[a] = wdata;
    end
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      we = 1'($urandom); addr = 8'($urandom); wdata = 8'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr]) begin
        failures++;
        $display("FAIL read %h got %h want %h", addr, rdata, model[addr]);
      end
      if (we) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
