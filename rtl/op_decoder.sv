// op_decoder: the operation decoder of the control unit.
//
// Purely combinational. Like the document's decoder it receives the 16-bit
// field formed from instruction bits [28:23] (opcode), [17:16] and [7:0]
// and, for each operation, produces the control words of every unit: PC
// select, ALU (20 bits), multiplier (7), shifter (8), mix unit (5), FPU (3),
// sign extension, data memory, register-file write, predicate-file
// operation and register-input mode, plus the illegal flag for an opcode
// that encodes nothing. Each unit word comes with an enable bit; disabled
// units ignore their word.
//
// The unit word bit patterns follow the document's control-signal tables
// (for example addf gives FPU word 000, jmp gives PC select 10). The opcode
// map itself is in plx_pkg; apart from jmp, loadi, and and the FPU
// instructions it is this design's own.
//
// issue_gap is the number of bubbles the stall unit inserts behind the
// instruction so that its total issue time matches the document's cycle
// counts: cmp/cmpi 3 cycles, load/loadi/loadx 5. testbit (writes predicates
// like cmp) and extract/deposit (finished in stage 5 like loadi) get the
// same gaps, and changepr one bubble; these three are this design's choice.
module op_decoder
  import plx_pkg::*;
(
  input  logic [15:0] op,
  output ctrl_t       ctrl
);
  logic [5:0] opc;
  logic [7:0] sub;
  assign opc = op[15:10];
  assign sub = op[7:0];

  // ALU words built from the document's table patterns
  localparam logic [19:0] A_ADD   = 20'b0010_0000_0000_0000_0000;
  localparam logic [19:0] A_LOGIC = 20'b0011_0000_0000_0000_0000;
  localparam logic [19:0] A_MEM   = 20'b0010_1000_0000_0000_0000;

  always_comb begin
    ctrl          = '0;
    ctrl.valid    = 1'b1;
    ctrl.pc_sel   = PC_INC;
    ctrl.res_sel  = RES_ALU;
    ctrl.sext     = SX_SIGN;
    ctrl.imm_kind = IMM_13;
    ctrl.reg_input= RI_PASS;
    ctrl.pred_op  = PR_NULL;

    unique case (opcode_e'(opc))
      OP_JMP:   begin ctrl.is_jmp = 1'b1; ctrl.pc_sel = PC_IMM; end
      OP_JMPR:  begin ctrl.is_jmp = 1'b1; ctrl.pc_sel = PC_RD; ctrl.rd2_is_rd = 1'b1; end
      OP_CHANGEPR: begin ctrl.pred_op = PR_CHANGE; ctrl.issue_gap = 3'd1; end
      OP_TRAP:  ctrl.trap = 1'b1;
      OP_TESTBIT: begin
        ctrl.alu_en = 1'b1; ctrl.alu_s = 20'b0100_0000_0000_0000_0000;
        ctrl.b_is_imm = 1'b1; ctrl.imm_kind = IMM_TBIT;
        ctrl.pred_op = PR_CMP; ctrl.issue_gap = 3'd2;
      end
      OP_LOADI: begin
        ctrl.reg_write = 1'b1; ctrl.reg_input = RI_LOADI; ctrl.rd2_is_rd = 1'b1;
        ctrl.issue_gap = 3'd4;
      end
      OP_LOAD4, OP_LOAD8, OP_LOADU4, OP_LOADU8: begin
        ctrl.alu_en = 1'b1;
        ctrl.alu_s  = A_MEM;
        ctrl.alu_s[19]  = (opc == OP_LOAD4) || (opc == OP_LOAD8);
        ctrl.alu_s[1:0] = ((opc == OP_LOAD4) || (opc == OP_LOADU4)) ? 2'b01 : 2'b00;
        ctrl.b_is_imm = 1'b1;
        ctrl.mem_read = 1'b1; ctrl.mem_size = ctrl.alu_s[1:0]; ctrl.mem_signed = ctrl.alu_s[19];
        ctrl.reg_write = 1'b1; ctrl.issue_gap = 3'd4;
      end
      OP_LOADX: begin
        ctrl.alu_en = 1'b1;
        ctrl.alu_s  = A_MEM;
        ctrl.alu_s[19]  = !sub[2];
        ctrl.alu_s[1:0] = {1'b0, sub[0]};
        ctrl.mem_read = 1'b1; ctrl.mem_size = ctrl.alu_s[1:0]; ctrl.mem_signed = ctrl.alu_s[19];
        ctrl.reg_write = 1'b1; ctrl.issue_gap = 3'd4;
      end
      OP_STORE1, OP_STORE2, OP_STORE4, OP_STORE8: begin
        ctrl.alu_en = 1'b1;
        ctrl.alu_s  = A_MEM;
        ctrl.alu_s[19] = 1'b1;
        unique case (opcode_e'(opc))
          OP_STORE1: ctrl.alu_s[1:0] = 2'b11;
          OP_STORE2: ctrl.alu_s[1:0] = 2'b10;
          OP_STORE4: ctrl.alu_s[1:0] = 2'b01;
          default:   ctrl.alu_s[1:0] = 2'b00;
        endcase
        ctrl.b_is_imm = 1'b1; ctrl.rd2_is_rd = 1'b1;
        ctrl.mem_write = 1'b1; ctrl.mem_size = ctrl.alu_s[1:0];
      end
      OP_ADDI, OP_SUBI: begin
        ctrl.alu_en = 1'b1;
        ctrl.alu_s  = A_ADD | 20'b1000;          // 64-bit, signed saturating
        ctrl.alu_s[5] = (opc == OP_SUBI);
        ctrl.b_is_imm = 1'b1; ctrl.reg_write = 1'b1;
      end
      OP_ANDI, OP_ORI, OP_XORI, OP_AND, OP_ANDCM, OP_OR, OP_XOR, OP_NOT: begin
        ctrl.alu_en = 1'b1;
        ctrl.alu_s  = A_LOGIC;
        unique case (opcode_e'(opc))
          OP_ANDI, OP_AND: ctrl.alu_s[14:12] = LG_AND;
          OP_ANDCM:        ctrl.alu_s[14:12] = LG_ANDCM;
          OP_ORI, OP_OR:   ctrl.alu_s[14:12] = LG_OR;
          OP_NOT:          ctrl.alu_s[14:12] = LG_NOT;
          default:         ctrl.alu_s[14:12] = LG_XOR;
        endcase
        ctrl.b_is_imm = (opc == OP_ANDI) || (opc == OP_ORI) || (opc == OP_XORI);
        // andi keeps the upper bits of Rs1 (one extension), ori/xori zero-extend
        ctrl.sext = (opc == OP_ANDI) ? SX_ONES : SX_ZERO;
        ctrl.reg_write = 1'b1;
      end
      OP_CMP, OP_CMPI: begin
        ctrl.alu_en = 1'b1;
        ctrl.alu_s  = A_LOGIC;
        ctrl.alu_s[14:12] = LG_CMP;
        ctrl.alu_s[10:7]  = sub[3:0];
        if (opc == OP_CMP) ctrl.rd2_is_rd = 1'b1;
        else begin ctrl.b_is_imm = 1'b1; ctrl.imm_kind = IMM_CMP; end
        ctrl.pred_op = PR_CMP; ctrl.issue_gap = 3'd2;
      end
      OP_PADD, OP_PADDINCR, OP_PAVG, OP_PSUB, OP_PSUBAVG, OP_PSUBDECR: begin
        ctrl.alu_en = 1'b1;
        ctrl.alu_s  = A_ADD;
        ctrl.alu_s[3:0] = sub[3:0];
        unique case (opcode_e'(opc))
          OP_PADDINCR: ctrl.alu_s[4] = 1'b1;
          OP_PAVG:     begin ctrl.alu_s[6] = 1'b1; ctrl.alu_s[4] = sub[4]; end
          OP_PSUB:     ctrl.alu_s[5] = 1'b1;
          OP_PSUBAVG:  begin ctrl.alu_s[6] = 1'b1; ctrl.alu_s[5] = 1'b1; end
          OP_PSUBDECR: begin ctrl.alu_s[5] = 1'b1; ctrl.alu_s[4] = 1'b1; end
          default: ;
        endcase
        ctrl.reg_write = 1'b1;
      end
      OP_PCMP, OP_PMAX, OP_PMIN: begin
        ctrl.alu_en = 1'b1;
        ctrl.alu_s  = A_LOGIC;
        ctrl.alu_s[14:12] = LG_CMP;
        ctrl.alu_s[11]    = 1'b1;
        unique case (opcode_e'(opc))
          OP_PMAX: ctrl.alu_s[8:7] = 2'b11;
          OP_PMIN: ctrl.alu_s[8:7] = 2'b10;
          default: ctrl.alu_s[8:7] = sub[3] ? 2'b00 : 2'b01;
        endcase
        ctrl.alu_s[1:0] = sub[1:0];
        ctrl.reg_write = 1'b1;
      end
      OP_PMUL, OP_PMULSHR: begin
        ctrl.mul_en = 1'b1; ctrl.res_sel = RES_MUL;
        if (opc == OP_PMUL) ctrl.mul_s = {5'b0, sub[1:0]};
        else                ctrl.mul_s = {sub[4], 1'b1, sub[3:2], 3'b000};
        ctrl.reg_write = 1'b1;
      end
      OP_MIX, OP_MUX, OP_PERM: begin
        ctrl.mix_en = 1'b1; ctrl.res_sel = RES_MIX;
        unique case (opcode_e'(opc))
          OP_MIX:  ctrl.mix_s = {2'b00, sub[2:0]};
          OP_PERM: begin ctrl.mix_s = 5'b11100; ctrl.b_is_imm = 1'b1; ctrl.sext = SX_ZERO; end
          default: begin
            unique case (sub[2:0])
              3'd0:    ctrl.mix_s = 5'b01000;   // rev
              3'd1:    ctrl.mix_s = 5'b01100;   // mix
              3'd2:    ctrl.mix_s = 5'b10000;   // shuf
              3'd3:    ctrl.mix_s = 5'b10100;   // alt
              3'd4:    ctrl.mix_s = 5'b11011;   // brcst.1
              default: ctrl.mix_s = 5'b11010;   // brcst.2
            endcase
          end
        endcase
        ctrl.reg_write = 1'b1;
      end
      OP_PSHIFT, OP_PSHIFTIL, OP_PSHIFTIR, OP_PSHIFTIA, OP_PSHIFTADD,
      OP_SHRP, OP_SLLI, OP_SRAI, OP_SRLI: begin
        ctrl.shi_en = 1'b1; ctrl.res_sel = RES_SHI;
        unique case (opcode_e'(opc))
          OP_PSHIFT:   ctrl.shi_s = {4'b0000, sub[3:0]};
          OP_PSHIFTIL: ctrl.shi_s = {4'b0001, 2'b00, sub[7:6]};
          OP_PSHIFTIR: ctrl.shi_s = {4'b0001, 2'b01, sub[7:6]};
          OP_PSHIFTIA: ctrl.shi_s = {4'b0001, 2'b11, sub[7:6]};
          OP_PSHIFTADD:ctrl.shi_s = {1'b0, sub[1:0], 2'b00, sub[2], 2'b00};
          OP_SHRP:     ctrl.shi_s = 8'b1000_0000;
          OP_SLLI:     ctrl.shi_s = 8'b1010_0000;
          OP_SRAI:     ctrl.shi_s = 8'b1100_0000;
          default:     ctrl.shi_s = 8'b1110_0000;
        endcase
        ctrl.reg_write = 1'b1;
      end
      OP_ADDF, OP_SUBF, OP_MULTF, OP_DIVF: begin
        ctrl.fpu_en = 1'b1; ctrl.res_sel = RES_FPU;
        ctrl.fpu_s  = {1'b0, opc[1:0]};
        ctrl.reg_write = 1'b1;
      end
      OP_EXTRACT, OP_DEPOSIT: begin
        ctrl.reg_input = (opc == OP_EXTRACT) ? RI_EXTRACT : RI_DEPOSIT;
        ctrl.rd2_is_rd = 1'b1; ctrl.reg_write = 1'b1; ctrl.issue_gap = 3'd4;
      end
      default: begin
        ctrl.valid   = 1'b0;
        ctrl.illegal = 1'b1;
      end
    endcase
  end

  logic [2:0] unused_bits;
  assign unused_bits = {op[9:8], sub[5]};
endmodule
