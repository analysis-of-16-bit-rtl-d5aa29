// hazard_detection_unit: decides when the pipeline stalls, flushes or inserts
// a bubble.
//  * A MUL in execute keeps the unit busy for several cycles (structural
//    hazard): fetch and decode hold (stall), and execute sends bubbles to
//    write-back until the product is ready.
//  * A mispredicted branch resolved in execute flushes the one instruction
//    fetched behind it on the wrong path.
//  * HLT reaching execute flushes the fetched instruction and freezes fetch.
// Data hazards need no stall: write-back and decode share the falling clock
// edge and the register file writes through. Purely combinational. The source
// asks for a hazard detection unit that adds stalls; which hazards it covers
// follows from this design's pipeline.
module hazard_detection_unit (
  input  logic ex_valid,        // execute stage holds an instruction
  input  logic ex_is_mul,
  input  logic mul_busy,        // multiplier running
  input  logic mul_last,        // multiplier finishes this cycle
  input  logic mispredict,      // branch in execute went the other way
  input  logic ex_halt,         // HLT in execute
  output logic mul_start,       // start the multiplier this cycle
  output logic stall_fetch,     // hold PC and fetch register
  output logic hold_decode,     // hold the decode register on the falling edge
  output logic flush_fetch,     // turn the fetched instruction into a bubble
  output logic ex_bubble        // execute passes no result to write-back
);
  always_comb begin
    mul_start   = ex_valid && ex_is_mul && !mul_busy;
    stall_fetch = mul_busy || (ex_valid && ex_halt);
    hold_decode = mul_busy;
    flush_fetch = ex_valid && (mispredict || ex_halt);
    ex_bubble   = !ex_valid || (ex_is_mul && !mul_last);
  end
endmodule
