// tb_control_unit: self-checking test of the grouped control unit.
// Instruction fields go through the decoder into the stall unit, so the
// issue time of each instruction class is measured as the document states
// it: loadi and load 5 cycles, cmp 3, an ALU or FPU operation 1 (its own
// multi-cycle latency is handled by s3_busy), changepr 2 (this design's
// choice). Also checks forwarding selects, the flush on a taken jump and
// the one-cycle delay of the flags, the predicate-qualified stage-3
// signals and the multiplexer selects.
module tb_control_unit;
  import plx_pkg::*;
  logic        clk = 0, reset = 1, init = 0, id_valid = 0;
  logic [15:0] op = 0;
  logic [4:0]  rs_a = 0, rs_b = 0, s3_rd = 0, s4_rd = 0, s5_rd = 0;
  logic        s3_we = 0, s4_we = 0, s5_we = 0;
  logic        s3_valid = 0, pred_a = 0, s3_alu_en = 0, alu_done = 0;
  logic        s3_fpu_en = 0, fpu_done = 0, pred_b = 0;
  pred_op_e    s3_pred_op = PR_NULL;
  logic        s3_act, s3_busy, pf_we, jmp_taken, m1_sel, m5_sel;
  pc_sel_e     pc_sin;
  logic [1:0]  sel_a, sel_b;
  ctrl_t       ctrl;
  logic        freeze, hold, issue, flush;
  logic        illegal_in = 0, trap_in = 0, illegal, trap;
  logic [7:0]  alu_ou_in = 0, ALU_OU;
  logic [1:0]  fpu_ou_in = 0, FPU_OU;
  int checks = 0, failures = 0;

  control_unit dut (.*);
  always #5 clk = !clk;
  initial begin #10_000_000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic issue_time(input logic [5:0] opc, output int cyc);
    @(negedge clk);
    op = {opc, 10'd0}; id_valid = 1; #1;
    cyc = 1;
    @(negedge clk);
    op = {OP_AND, 10'd0}; #1;
    while (!issue) begin cyc++; @(negedge clk); #1; end
  endtask

  initial begin
    int c;
    @(posedge clk); #1 reset = 0;
    issue_time(OP_LOADI, c);    chk($sformatf("loadi %0d cycles", c), c == 5);
    issue_time(OP_LOAD8, c);    chk($sformatf("load %0d cycles", c), c == 5);
    issue_time(OP_CMP, c);      chk($sformatf("cmp %0d cycles", c), c == 3);
    issue_time(OP_AND, c);      chk($sformatf("and %0d cycles", c), c == 1);
    issue_time(OP_ADDF, c);     chk($sformatf("addf %0d cycles", c), c == 1);
    issue_time(OP_CHANGEPR, c); chk($sformatf("changepr %0d cycles", c), c == 2);
    // forwarding
    rs_a = 5; rs_b = 6; s3_rd = 5; s3_we = 1; s4_rd = 6; s4_we = 1; s5_rd = 6; s5_we = 1; #1;
    chk("forward a from stage 3", sel_a == 2'b01);
    chk("forward b from stage 4", sel_b == 2'b10);
    s4_we = 0; #1;
    chk("forward b from stage 5", sel_b == 2'b11);
    // predicate signals: a multicycle ALU op with a true predicate
    s3_valid = 1; pred_a = 1; s3_alu_en = 1; s3_pred_op = PR_CMP; #1;
    chk("busy until done", s3_act && s3_busy && !pf_we && freeze && !issue);
    alu_done = 1; #1;
    chk("predicate write on the last cycle", s3_act && !s3_busy && pf_we);
    pred_a = 0; alu_done = 0; #1;
    chk("false predicate squashes", !s3_act && !s3_busy && !pf_we);
    s3_valid = 0; s3_alu_en = 0; s3_pred_op = PR_NULL;
    // jump: not taken with a false predicate, taken and flushed with a true one
    @(negedge clk); op = {OP_JMP, 10'd0}; #1;
    chk("jump with false predicate not taken", !jmp_taken && !flush && pc_sin == PC_INC);
    pred_b = 1; #1;
    chk("taken jump flushes", jmp_taken && flush && pc_sin == PC_IMM);
    @(negedge clk); pred_b = 0;
    // multiplexer selects
    op = {OP_STORE8, 10'd0}; #1;
    chk("store reads Rd and uses the immediate", m1_sel && m5_sel);
    op = {OP_AND, 10'd0}; #1;
    chk("and reads Rs2 as register", !m1_sel && !m5_sel && pc_sin == PC_INC);
    // flags one cycle later
    illegal_in = 1; trap_in = 1; alu_ou_in = 8'h80; fpu_ou_in = 2'b01;
    #1; chk("flags still low", !illegal && !trap);
    @(posedge clk); #1;
    chk("flags after one edge", illegal && trap && ALU_OU == 8'h80 && FPU_OU == 2'b01);
    illegal_in = 0; trap_in = 0; alu_ou_in = 0; fpu_ou_in = 0;
    @(posedge clk); #1;
    chk("flags last one cycle", !illegal && !trap && ALU_OU == 0 && FPU_OU == 0);
    // undefined opcode decodes as illegal
    op = {6'b010101, 10'd0}; #1;
    chk("undefined opcode is illegal", ctrl.illegal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
