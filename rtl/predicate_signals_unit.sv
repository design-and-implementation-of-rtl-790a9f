// predicate_signals_unit: derives the predicate-dependent control signals.
//
// The document's control unit has a "predicate signals unit" that controls
// the predicate file and the signals depending on it; this block is that
// part of the control unit. An instruction whose guarding predicate is 0 is
// treated as not executed, so every enable of stage 3 is qualified here.
//
// Inputs (stage 3): s3_valid (a real instruction sits in ID/EX), pred_a
// (its guarding predicate from port A of the predicate file), s3_pred_op
// (its predicate-file operation), the enables of the two multicycle units
// (ALU, FPU) and their done signals. Inputs (stage 2): id_valid, id_is_jmp
// and pred_b (predicate of the decoded jump from port B).
// Outputs: s3_act (the stage-3 instruction executes), s3_busy (a
// multicycle unit has not finished), pf_we (write the predicate file, only
// in the last cycle of the instruction), jmp_taken (a predicated jump in
// stage 2 is taken).
//
// Timing: purely combinational. Resolving jumps in stage 2 and writing the
// predicate file in the same stage-3 cycle as the compare follow the
// document; the exact signal split is this design's own.
module predicate_signals_unit
  import plx_pkg::*;
(
  input  logic     s3_valid,
  input  logic     pred_a,
  input  pred_op_e s3_pred_op,
  input  logic     s3_alu_en,
  input  logic     alu_done,
  input  logic     s3_fpu_en,
  input  logic     fpu_done,
  input  logic     id_valid,
  input  logic     id_is_jmp,
  input  logic     pred_b,
  output logic     s3_act,
  output logic     s3_busy,
  output logic     pf_we,
  output logic     jmp_taken
);
  assign s3_act    = s3_valid && pred_a;
  assign s3_busy   = s3_act && ((s3_alu_en && !alu_done) || (s3_fpu_en && !fpu_done));
  assign pf_we     = s3_act && !s3_busy && s3_pred_op != PR_NULL;
  assign jmp_taken = id_valid && id_is_jmp && pred_b;
endmodule
