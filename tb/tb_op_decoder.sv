// tb_op_decoder: self-checking test of the operation decoder.
// Checks the control words of representative instructions against the
// patterns of the document's control-signal tables (jmp selects PC+Imm,
// addf/subf/multf/divf give FPU words 000..011, and selects the ALU logic
// path with operation 000, loadi updates a subword in stage 5 with a
// 5-cycle issue time, cmp writes predicates with a 3-cycle issue time, ...)
// and sweeps all 64 opcodes: defined ones are valid with at most one
// stage-3 unit enabled, undefined ones raise illegal.
module tb_op_decoder;
  import plx_pkg::*;
  logic [15:0] op;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  op_decoder dut (.*);
  initial begin #10_000_000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic dec(input logic [5:0] opc, input logic [7:0] sub);
    op = {opc, 2'b00, sub}; #1;
  endtask
  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    dec(OP_JMP, 0);
    chk("jmp", ctrl.is_jmp && ctrl.pc_sel == PC_IMM && !ctrl.reg_write && ctrl.issue_gap == 0);
    dec(OP_JMPR, 0);
    chk("jmpr", ctrl.is_jmp && ctrl.pc_sel == PC_RD && ctrl.rd2_is_rd);
    dec(OP_ADDF, 0);  chk("addf",  ctrl.fpu_en && ctrl.fpu_s == 3'b000 && ctrl.res_sel == RES_FPU && ctrl.reg_write);
    dec(OP_SUBF, 0);  chk("subf",  ctrl.fpu_en && ctrl.fpu_s == 3'b001);
    dec(OP_MULTF, 0); chk("multf", ctrl.fpu_en && ctrl.fpu_s == 3'b010);
    dec(OP_DIVF, 0);  chk("divf",  ctrl.fpu_en && ctrl.fpu_s == 3'b011);
    dec(OP_AND, 0);
    chk("and", ctrl.alu_en && ctrl.alu_s == 20'b0011_0000_0000_0000_0000 && ctrl.reg_write && !ctrl.b_is_imm);
    dec(OP_LOADI, 0);
    chk("loadi", ctrl.reg_input == RI_LOADI && ctrl.reg_write && ctrl.rd2_is_rd && ctrl.issue_gap == 4);
    dec(OP_CMP, 8'h02);
    chk("cmp", ctrl.pred_op == PR_CMP && ctrl.alu_s[16] && ctrl.alu_s[14:12] == LG_CMP &&
               ctrl.alu_s[10:7] == 4'b0010 && ctrl.issue_gap == 2 && !ctrl.reg_write);
    dec(OP_CMPI, 8'h05);
    chk("cmpi", ctrl.b_is_imm && ctrl.imm_kind == IMM_CMP && ctrl.alu_s[10:7] == 4'b0101);
    dec(OP_LOAD4, 0);
    chk("load.4", ctrl.mem_read && ctrl.mem_size == 2'b01 && ctrl.mem_signed && ctrl.alu_s[15] && ctrl.issue_gap == 4);
    dec(OP_LOADU8, 0);
    chk("loadu.8", ctrl.mem_read && ctrl.mem_size == 2'b00 && !ctrl.mem_signed);
    dec(OP_STORE2, 0);
    chk("store.2", ctrl.mem_write && ctrl.mem_size == 2'b10 && !ctrl.reg_write && ctrl.rd2_is_rd);
    dec(OP_ADDI, 0);
    chk("addi", ctrl.alu_s == 20'b0010_0000_0000_0000_1000 && ctrl.b_is_imm && ctrl.sext == SX_SIGN);
    dec(OP_ANDI, 0);  chk("andi", ctrl.sext == SX_ONES && ctrl.b_is_imm);
    dec(OP_ORI, 0);   chk("ori", ctrl.sext == SX_ZERO && ctrl.alu_s[14:12] == LG_OR);
    dec(OP_PSUB, 8'h0B);
    chk("psub.2.s", ctrl.alu_s[5] && ctrl.alu_s[3] && ctrl.alu_s[1:0] == 2'b11 && !ctrl.alu_s[16]);
    dec(OP_PSUBDECR, 0); chk("psubdecr", ctrl.alu_s[5] && ctrl.alu_s[4]);
    dec(OP_PMAX, 8'h01); chk("pmax", ctrl.alu_s[11] && ctrl.alu_s[8:7] == 2'b11);
    dec(OP_PMULSHR, 8'h1C); chk("pmulshr", ctrl.mul_en && ctrl.mul_s == 7'b1111000);
    dec(OP_MUX, 8'h04); chk("mux brcst.1", ctrl.mix_en && ctrl.mix_s == 5'b11011);
    dec(OP_PSHIFTADD, 8'h06); chk("pshiftadd.r.2", ctrl.shi_en && ctrl.shi_s == 8'b0100_0100);
    dec(OP_SRAI, 0); chk("srai", ctrl.shi_s == 8'b1100_0000);
    dec(OP_TESTBIT, 0); chk("testbit", ctrl.alu_s[18:17] == 2'b10 && ctrl.pred_op == PR_CMP && ctrl.imm_kind == IMM_TBIT);
    dec(OP_CHANGEPR, 0); chk("changepr", ctrl.pred_op == PR_CHANGE && ctrl.issue_gap == 1);
    dec(OP_TRAP, 0); chk("trap", ctrl.trap);
    dec(OP_EXTRACT, 0); chk("extract", ctrl.reg_input == RI_EXTRACT && ctrl.issue_gap == 4);
    for (int o = 0; o < 64; o++) begin
      logic defined;
      int units;
      dec(6'(o), 8'($urandom));
      defined = !(o == 6'b010101 || o == 6'b101011 || o == 6'b111000 || o > 6'b111010);
      units = ctrl.alu_en + ctrl.mul_en + ctrl.mix_en + ctrl.shi_en + ctrl.fpu_en;
      chk($sformatf("opcode %b defined=%0d", o[5:0], defined), defined ? (ctrl.valid && !ctrl.illegal && units <= 1)
                                                             : (ctrl.illegal && !ctrl.valid));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
