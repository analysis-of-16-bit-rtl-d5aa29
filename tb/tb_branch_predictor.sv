// tb_branch_predictor: self-checking test of the two-bit branch predictor.
// After reset every entry predicts not taken. Random updates are applied and
// the prediction of a random fetch address is compared after every rising
// edge with a reference table of saturating counters kept here.
module tb_branch_predictor;
  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0;
  logic [7:0] fetch_pc = 0, update_pc = 0;
  logic       predict_taken, update = 0, update_taken = 0;
  int         model [16];

  branch_predictor dut (.clk(clk), .rst_n(rst_n), .fetch_pc(fetch_pc), .predict_taken(predict_taken),
                        .update(update), .update_pc(update_pc), .update_taken(update_taken));

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
    for (int i = 0; i < 16; i++) begin
      model[i] = 1;
      fetch_pc = 8'(i * 16 + i); #1;
      checks++;
      if (predict_taken !== 1'b0) begin failures++; $display("FAIL reset entry %0d", i); end
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      update = 1'($urandom); update_pc = 8'($urandom % 5);   // few entries: saturate often
      update_taken = ($urandom % 4) != 0 ? (i / 200) % 2 == 0 : 1'($urandom);
      @(posedge clk);
      if (update) begin
        if (update_taken && model[update_pc % 16] < 3) model[update_pc % 16]++;
        if (!update_taken && model[update_pc % 16] > 0) model[update_pc % 16]--;
      end
      #1;
      update = 0;
      fetch_pc = 8'($urandom);
      fetch_pc[3:0] = 4'($urandom % 5);
      #1;
      checks++;
      if (predict_taken !== (model[fetch_pc % 16] >= 2)) begin
        failures++;
        $display("FAIL pc=%h got %b counter %0d", fetch_pc, predict_taken, model[fetch_pc % 16]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
