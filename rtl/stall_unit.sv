// stall_unit: pipeline stall and flush control.
//
// Three sources of stalls:
//  * instruction-memory initialisation: while init is high the whole
//    processor is frozen (document: the processor is stalled while the
//    instruction memory is loaded);
//  * a multi-cycle operation in stage 3 (FPU add/sub/divide, ALU subtract,
//    add-with-increment, subtract-with-decrement): stages 1-3 hold until the
//    unit reports done, and a bubble enters stage 4 meanwhile;
//  * issue gaps: some instructions occupy the processor for several cycles
//    (document: cmp 3 cycles, load/loadi/loadx 5). When such an instruction
//    leaves stage 2, a hold counter is loaded with its gap; while it is
//    non-zero the PC and the stage-2 instruction hold and bubbles enter
//    stage 3.
// A taken jump in stage 2 flushes the instruction fetched behind it, so a
// taken jump costs two cycles.
//
// Outputs: freeze (hold PC, IF/ID and ID/EX; bubble into EX/MEM),
// hold (hold PC and IF/ID; bubble into ID/EX), issue (the stage-2
// instruction moves on this cycle), flush (IF/ID receives a bubble).
//
// The hold-counter realisation of the document's cycle counts is this
// design's choice.
module stall_unit (
  input  logic       clk,
  input  logic       reset,
  input  logic       init,
  input  logic       s3_busy,
  input  logic       id_valid,
  input  logic [2:0] id_gap,
  input  logic       jmp_taken,
  output logic       freeze,
  output logic       hold,
  output logic       issue,
  output logic       flush
);
  logic [2:0] cnt;

  assign freeze = init || s3_busy;
  assign hold   = !freeze && (cnt != '0);
  assign issue  = !freeze && !hold;
  assign flush  = issue && jmp_taken;

  always_ff @(posedge clk) begin
    if (reset)                  cnt <= '0;
    else if (freeze)            cnt <= cnt;
    else if (hold)              cnt <= cnt - 3'd1;
    else if (id_valid)          cnt <= id_gap;
  end
endmodule
