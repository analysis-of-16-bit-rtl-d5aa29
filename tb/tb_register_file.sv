// tb_register_file: self-checking test of the 16-entry register file.
// Checks the reset value of every register, then applies random falling-edge
// writes and random read addresses, comparing all three read ports with a
// reference array. Just before each falling edge it also checks that a read
// of the register being written returns the new value (write-through).
module tb_register_file;
  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0, we = 0;
  logic [3:0] waddr = 0, rx_addr = 0, ry_addr = 0, dbg_addr = 0;
  logic [7:0] wdata = 0, rx_data, ry_data, dbg_data;
  logic [7:0] model [16];

  register_file dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata),
                     .rx_addr(rx_addr), .rx_data(rx_data), .ry_addr(ry_addr), .ry_data(ry_data),
                     .dbg_addr(dbg_addr), .dbg_data(dbg_data));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s got %h want %h", what, got, want);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int r = 0; r < 16; r++) begin
      dbg_addr = 4'(r); #1;
      check("reset", dbg_data, 8'h00);
      model[r] = 0;
    end
    for (int i = 0; i < 1000; i++) begin
      @(posedge clk);
      we = 1'($urandom); waddr = 4'($urandom); wdata = 8'($urandom);
      rx_addr = ($urandom % 3 == 0) ? waddr : 4'($urandom);
      ry_addr = 4'($urandom); dbg_addr = 4'($urandom);
      #1;
      check("rx", rx_data, (we && waddr == rx_addr) ? wdata : model[rx_addr]);
      check("ry", ry_data, (we && waddr == ry_addr) ? wdata : model[ry_addr]);
      check("dbg", dbg_data, model[dbg_addr]);
      @(negedge clk);
      if (we) model[waddr] = wdata;
      #1;
      dbg_addr = waddr; #1;
      check("after write", dbg_data, model[waddr]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
