// multiplexers_unit: select signals of the datapath multiplexers.
//
// The document's control unit has a "multiplexers unit" that controls all
// the multiplexers of the processor. This block produces the selects that
// depend on the decoded stage-2 instruction and on the stall state:
//   m1_sel : read port 2 of the register file addresses Rd ([22:18]) instead
//            of Rs2 ([12:8]) (stores, cmp, jmpr read Rd)
//   m5_sel : operand B is the extended immediate instead of register data
//   pc_sin : next-PC source of the program counter; a jump target is only
//            taken when the jump is taken and the stage-2 instruction issues,
//            otherwise the PC increments (it is held by the stall input).
// The forwarding selects come from the bypass unit and the stage-3 result
// multiplexer (M7) follows the decoded result select directly.
//
// Timing: purely combinational. The multiplexer names follow the document;
// the select encodings are this design's own.
module multiplexers_unit
  import plx_pkg::*;
(
  input  logic    rd2_is_rd,
  input  logic    b_is_imm,
  input  pc_sel_e pc_sel,
  input  logic    jmp_taken,
  input  logic    issue,
  output logic    m1_sel,
  output logic    m5_sel,
  output pc_sel_e pc_sin
);
  assign m1_sel = rd2_is_rd;
  assign m5_sel = b_is_imm;
  assign pc_sin = (jmp_taken && issue) ? pc_sel : PC_INC;
endmodule
