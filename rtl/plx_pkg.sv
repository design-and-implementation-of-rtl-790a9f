// plx_pkg: types and constants shared by the PLX processor.
//
// Instruction word (32 bits):
//   [31:29] predicate register number inside the active predicate set
//   [28:23] 6-bit opcode
//   [22:18] Rd   [17:13] Rs1   [12:8] Rs2   [7:0] sub-operation field
//   [12:0]  13-bit immediate for immediate forms, [22:0] jump offset,
//   [17:16] subword index k and [15:0] 16-bit constant for loadi.
// The field positions, the opcodes of jmp (000000), loadi (000101),
// and (110000) and the four FPU instructions (101100..101111) follow the
// document. The remaining opcodes and sub-operation bits are this design's
// own assignment, made because the full PLX encoding tables are not given.
//
// The per-unit control words (ALU 20 bits, shifter 8, mix 5, multiplier 7,
// FPU 3) use the bit assignments of the document's control-signal tables;
// each word travels with an enable bit.
package plx_pkg;

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [5:0] {
    OP_JMP      = 6'b000000,  // PC += sext(imm23)          (document)
    OP_JMPR     = 6'b000001,  // PC += Rd
    OP_CHANGEPR = 6'b000010,  // active predicate set = imm[3:0]
    OP_TRAP     = 6'b000011,  // raise the trap flag
    OP_TESTBIT  = 6'b000100,  // Pd1 = Rs1[{i[12:10],i[2:0]}], Pd2 = !Pd1
    OP_LOADI    = 6'b000101,  // Rd.k = imm16                (document)
    OP_LOAD4    = 6'b000110,  // Rd = sext(mem[Rs1+imm][31:0])
    OP_LOAD8    = 6'b000111,
    OP_LOADU4   = 6'b001000,
    OP_LOADU8   = 6'b001001,
    OP_LOADX    = 6'b001010,  // Rd = mem[Rs1+Rs2]; sub[2]=unsigned sub[0]: 1=.4 0=.8
    OP_STORE1   = 6'b001011,  // mem[Rs1+imm] low bytes = Rd
    OP_STORE2   = 6'b001100,
    OP_STORE4   = 6'b001101,
    OP_STORE8   = 6'b001110,
    OP_ADDI     = 6'b001111,
    OP_SUBI     = 6'b010000,
    OP_ANDI     = 6'b010001,
    OP_ORI      = 6'b010010,
    OP_XORI     = 6'b010011,
    OP_CMPI     = 6'b010100,  // cond sub[3:0], Pd1 [9:7], Pd2 [6:4], imm8 {[22:18],[12:10]}
    OP_PSHIFT   = 6'b010110,  // sub[3:2] 00 l 01 r 11 r.a, sub[1:0] size
    OP_PSHIFTIL = 6'b010111,  // pshifti.l: size [7:6], amount [5:0]
    OP_PSHIFTIR = 6'b111001,  // pshifti.r
    OP_PSHIFTIA = 6'b111010,  // pshifti.r.a
    OP_PSHIFTADD= 6'b011000,  // sub[2] right, sub[1:0] amount 1..3
    OP_SHRP     = 6'b011001,  // amount [5:0]
    OP_SLLI     = 6'b011010,
    OP_SRAI     = 6'b011011,
    OP_SRLI     = 6'b011100,
    OP_PADD     = 6'b011101,  // sub[3] signed sat, sub[2] modular, sub[1:0] size
    OP_PADDINCR = 6'b011110,
    OP_PAVG     = 6'b011111,  // sub[4] round away from zero
    OP_PSUB     = 6'b100000,
    OP_PSUBAVG  = 6'b100001,
    OP_PSUBDECR = 6'b100010,
    OP_PCMP     = 6'b100011,  // sub[3] 1=gt 0=eq, sub[1:0] size
    OP_PMAX     = 6'b100100,
    OP_PMIN     = 6'b100101,
    OP_PMUL     = 6'b100110,  // sub[1] even, sub[0] unsigned
    OP_PMULSHR  = 6'b100111,  // sub[4] .a, sub[3:2] amount code
    OP_MIX      = 6'b101000,  // sub[2] right, sub[1:0] size
    OP_MUX      = 6'b101001,  // sub[2:0] rev mix shuf alt brcst.1 brcst.2
    OP_PERM     = 6'b101010,  // Rd.i = Rs1.(imm8[2i+1:2i])
    OP_ADDF     = 6'b101100,  // (document)
    OP_SUBF     = 6'b101101,
    OP_MULTF    = 6'b101110,
    OP_DIVF     = 6'b101111,
    OP_AND      = 6'b110000,  // (document)
    OP_ANDCM    = 6'b110001,
    OP_OR       = 6'b110010,
    OP_XOR      = 6'b110011,
    OP_NOT      = 6'b110100,
    OP_CMP      = 6'b110101,  // Rs2 in [22:18]
    OP_EXTRACT  = 6'b110110,  // Rd[len-1:0] = Rs1[pos+len-1:pos]; pos [11:6] len [5:0]
    OP_DEPOSIT  = 6'b110111   // Rd[pos+len-1:pos] = Rs1[len-1:0]
  } opcode_e;

  // --------------------------------------------------- ALU control word bits
  // Bit use of the 20-bit ALU control word (document's ALU signal table):
  // [19] signed load/store, [18:17] 01 normal / 10 test bit,
  // [16] 1: logic/compare path, 0: adder path, [15] load/store address,
  // [14:12] logic op, [11] parallel compare, [10:7] compare condition,
  // [6] average, [5] subtract, [4] incr/decr/raz, [3] signed saturate,
  // [2] modular, [1:0] subword size (11:1 byte 10:2 01:4 00:8)

  typedef enum logic [2:0] {
    LG_AND = 3'b000, LG_ANDCM = 3'b001, LG_CMP = 3'b010,
    LG_NOT = 3'b011, LG_OR = 3'b100, LG_XOR = 3'b101
  } logic_op_e;

  // subword size code shared by the ALU, shifter and mix unit
  function automatic int unsigned lane_bytes(input logic [1:0] code);
    case (code)
      2'b11:   return 1;
      2'b10:   return 2;
      2'b01:   return 4;
      default: return 8;
    endcase
  endfunction

  // ---------------------------------------------- operand / result selects
  // which instruction bits form operand B when it is an immediate
  typedef enum logic [1:0] {
    IMM_13   = 2'd0,   // [12:0] through the sign-extension unit
    IMM_CMP  = 2'd1,   // cmpi: sign-extended {[22:18],[12:10]}
    IMM_TBIT = 2'd2    // testbit: bit number {[12:10],[2:0]}
  } imm_kind_e;

  typedef enum logic [1:0] { SX_ZERO = 2'd0, SX_SIGN = 2'd1, SX_ONES = 2'd2 } sext_mode_e;

  typedef enum logic [2:0] {
    RES_ALU = 3'd0, RES_FPU = 3'd1, RES_MUL = 3'd2, RES_MIX = 3'd3, RES_SHI = 3'd4
  } res_sel_e;

  typedef enum logic [1:0] {
    RI_PASS = 2'd0, RI_LOADI = 2'd1, RI_EXTRACT = 2'd2, RI_DEPOSIT = 2'd3
  } reg_input_e;

  typedef enum logic [1:0] { PC_INC = 2'b00, PC_RD = 2'b01, PC_IMM = 2'b10, PC_HOLD = 2'b11 } pc_sel_e;

  typedef enum logic [2:0] { PR_NULL = 3'b000, PR_CMP = 3'b001, PR_CHANGE = 3'b010 } pred_op_e;

  // Decoded control for one instruction; travels down the pipeline.
  typedef struct packed {
    logic        valid;       // a real instruction (not a bubble)
    logic        illegal;
    logic        is_jmp;
    pc_sel_e     pc_sel;
    logic        rd2_is_rd;   // M1: read port 2 addresses [22:18] instead of [12:8]
    logic        b_is_imm;    // M5: operand B is the extended immediate
    sext_mode_e  sext;
    imm_kind_e   imm_kind;
    logic        alu_en;
    logic [19:0] alu_s;
    logic        mul_en;
    logic [6:0]  mul_s;
    logic        mix_en;
    logic [4:0]  mix_s;
    logic        shi_en;
    logic [7:0]  shi_s;
    logic        fpu_en;
    logic [2:0]  fpu_s;
    res_sel_e    res_sel;
    logic        mem_read;
    logic        mem_write;
    logic [1:0]  mem_size;    // size code of the access
    logic        mem_signed;
    logic        reg_write;
    reg_input_e  reg_input;
    pred_op_e    pred_op;
    logic        trap;
    logic [2:0]  issue_gap;   // extra bubbles inserted after this instruction
  } ctrl_t;

endpackage
