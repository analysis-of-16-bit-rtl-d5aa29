// tb_hazard_detection_unit: self-checking test of the stall/flush logic.
// Walks all 64 combinations of the six inputs and compares every output with
// the pipeline rules: start a MUL only when the multiplier is idle; hold fetch
// and decode while it runs; hold fetch under HLT; flush the fetched
// instruction on a mispredict or HLT in execute; send a bubble from execute
// when it is empty or a MUL has not finished.
module tb_hazard_detection_unit;
  int checks = 0, failures = 0;
  logic ex_valid, ex_is_mul, mul_busy, mul_last, mispredict, ex_halt;
  logic mul_start, stall_fetch, hold_decode, flush_fetch, ex_bubble;

  hazard_detection_unit dut (.*);

  task automatic chk(input string what, input logic got, input logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s v=%b mul=%b busy=%b last=%b mp=%b halt=%b got %b",
               what, ex_valid, ex_is_mul, mul_busy, mul_last, mispredict, ex_halt, got);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {ex_valid, ex_is_mul, mul_busy, mul_last, mispredict, ex_halt} = 6'(v);
      #1;
      // MUL starts once: valid MUL in execute, multiplier idle
      chk("mul_start", mul_start, (v & 'h38) == 'h30);
      // running multiplier holds fetch and decode
      chk("hold_decode", hold_decode, mul_busy);
      if (mul_busy) chk("stall_fetch", stall_fetch, 1'b1);
      else          chk("stall_fetch", stall_fetch, ex_valid & ex_halt);
      if (!ex_valid) chk("flush_fetch", flush_fetch, 1'b0);
      else           chk("flush_fetch", flush_fetch, mispredict | ex_halt);
      if (!ex_valid)      chk("ex_bubble", ex_bubble, 1'b1);
      else if (ex_is_mul) chk("ex_bubble", ex_bubble, !mul_last);
      else                chk("ex_bubble", ex_bubble, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
