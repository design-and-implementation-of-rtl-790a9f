// control_unit: the processor's control unit.
//
// Groups the six control blocks of the document's control unit: the
// operation decoder (stage-2 instruction to unit control words), the bypass
// unit (operand forwarding selects), the predicate signals unit (execute,
// busy, predicate-file write and jump-taken signals), the stall unit
// (freeze / hold / flush), the flag unit (registered status flags) and the
// multiplexers unit (datapath selects). The datapath in plx_cpu carries the
// decoded control word down the pipeline.
//
// Inputs: the 16-bit operation field of the stage-2 instruction, the
// register addresses needed for forwarding, the stage-3 instruction's
// predicate, predicate operation and unit handshakes, and the stage-2
// jump predicate; outputs: the decoded control word, forwarding selects,
// predicate-qualified enables, stall controls, multiplexer selects and the
// flags. Timing: all combinational except the hold counter of the stall
// unit and the flag registers.
module control_unit
  import plx_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        init,
  input  logic [15:0] op,
  input  logic        id_valid,
  // forwarding
  input  logic [4:0]  rs_a,
  input  logic [4:0]  rs_b,
  input  logic [4:0]  s3_rd,
  input  logic        s3_we,
  input  logic [4:0]  s4_rd,
  input  logic        s4_we,
  input  logic [4:0]  s5_rd,
  input  logic        s5_we,
  output logic [1:0]  sel_a,
  output logic [1:0]  sel_b,
  // predicate signals
  input  logic        s3_valid,
  input  logic        pred_a,
  input  pred_op_e    s3_pred_op,
  input  logic        s3_alu_en,
  input  logic        alu_done,
  input  logic        s3_fpu_en,
  input  logic        fpu_done,
  input  logic        pred_b,
  output logic        s3_act,
  output logic        s3_busy,
  output logic        pf_we,
  output logic        jmp_taken,
  // multiplexer selects
  output logic        m1_sel,
  output logic        m5_sel,
  output pc_sel_e     pc_sin,
  // stalls
  output ctrl_t       ctrl,
  output logic        freeze,
  output logic        hold,
  output logic        issue,
  output logic        flush,
  // flags
  input  logic        illegal_in,
  input  logic        trap_in,
  input  logic [7:0]  alu_ou_in,
  input  logic [1:0]  fpu_ou_in,
  output logic        illegal,
  output logic        trap,
  output logic [7:0]  ALU_OU,
  output logic [1:0]  FPU_OU
);
  op_decoder DEC (.op(op), .ctrl(ctrl));

  bypass_unit #(.AW(5)) BYP (
    .rs_a(rs_a), .rs_b(rs_b),
    .s3_rd(s3_rd), .s3_we(s3_we), .s4_rd(s4_rd), .s4_we(s4_we),
    .s5_rd(s5_rd), .s5_we(s5_we), .sel_a(sel_a), .sel_b(sel_b));

  predicate_signals_unit PSU (
    .s3_valid(s3_valid), .pred_a(pred_a), .s3_pred_op(s3_pred_op),
    .s3_alu_en(s3_alu_en), .alu_done(alu_done), .s3_fpu_en(s3_fpu_en),
    .fpu_done(fpu_done), .id_valid(id_valid), .id_is_jmp(ctrl.is_jmp),
    .pred_b(pred_b), .s3_act(s3_act), .s3_busy(s3_busy), .pf_we(pf_we),
    .jmp_taken(jmp_taken));

  stall_unit STL (
    .clk(clk), .reset(reset), .init(init), .s3_busy(s3_busy),
    .id_valid(id_valid && ctrl.valid), .id_gap(ctrl.issue_gap),
    .jmp_taken(jmp_taken), .freeze(freeze), .hold(hold), .issue(issue),
    .flush(flush));

  multiplexers_unit MUX (
    .rd2_is_rd(ctrl.rd2_is_rd), .b_is_imm(ctrl.b_is_imm), .pc_sel(ctrl.pc_sel),
    .jmp_taken(jmp_taken), .issue(issue), .m1_sel(m1_sel), .m5_sel(m5_sel),
    .pc_sin(pc_sin));

  flag_unit FLG (
    .clk(clk), .reset(reset), .illegal_in(illegal_in), .trap_in(trap_in),
    .alu_ou_in(alu_ou_in), .fpu_ou_in(fpu_ou_in), .illegal(illegal),
    .trap(trap), .ALU_OU(ALU_OU), .FPU_OU(FPU_OU));
endmodule
