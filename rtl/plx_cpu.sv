// plx_cpu: top level of the 5-stage pipelined 64-bit PLX processor with a
// double-precision floating-point unit.
//
// Stages (document, chapter 2):
//   S1 fetch     : program counter and instruction memory (asynchronous read)
//   S2 decode    : operation decoder, register file read (two ports), bypass
//                  muxes, sign extension of immediates, jump resolution
//   S3 execute   : ALU, multiplier, mix unit, shifter and FPU in parallel;
//                  the result multiplexer picks one; the predicate of the
//                  instruction is read here and a false predicate squashes it;
//                  compare / test bit / changepr update the predicate file
//   S4 memory    : data memory (64-bit words, byte write enables)
//   S5 write back: register input unit, register file write
//
// Interface: clk, reset (synchronous, active high), and the program-loading
// port init / init_addr / init_data: while init is high one instruction
// word per clock is written into the instruction memory and the processor
// is stalled. Reset is applied before loading; execution starts at address 0
// when init falls. Outputs are the status flags illegal, trap, ALU_OU
// (per-byte ALU overflow) and FPU_OU ({underflow, overflow}), plus the PC.
//
// Timing: one instruction per cycle except where the document gives longer
// times: cmp/cmpi/testbit 3 cycles, load/loadi/loadx/extract/deposit 5,
// FPU add/sub 3, FPU divide 55, ALU subtract and add-with-increment 2,
// subtract-with-decrement 3, a taken jump 2. Results are forwarded from
// stages 3, 4 and 5 to stage 2.
//
// Register-file write port 1 is unused (tied off); all writes use port 2.
// The stage in which each instruction class finishes follows the document;
// the opcode map, the pipeline-register contents, the jump resolution in
// stage 2 and the stall mechanism are this design's choices.
module plx_cpu
  import plx_pkg::*;
#(
  parameter int IMEM_AW = 9,    // 512 instruction words
  parameter int DMEM_AW = 10    // 1024 64-bit data words
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               init,
  input  logic [IMEM_AW-1:0] init_addr,
  input  logic [31:0]        init_data,
  output logic               illegal,
  output logic               trap,
  output logic [7:0]         ALU_OU,
  output logic [1:0]         FPU_OU,
  output logic [63:0]        pc
);
  // ------------------------------------------------------- pipeline regs
  typedef struct packed {
    logic        valid;
    logic [31:0] instr;
  } ifid_t;

  typedef struct packed {
    ctrl_t       c;
    logic [31:0] instr;
    logic [63:0] a;      // operand A (Rs1)
    logic [63:0] b;      // operand B (Rs2 or immediate)
    logic [63:0] rb;     // read port 2 value (store data / old Rd)
  } idex_t;

  typedef struct packed {
    ctrl_t       c;
    logic [31:0] instr;
    logic [63:0] res;
    logic [63:0] a;
    logic [63:0] rb;
  } exmem_t;

  typedef exmem_t memwb_t;

  ifid_t  ifid;
  idex_t  idex, idex_d;
  exmem_t exmem, exmem_d;
  memwb_t memwb, memwb_d;

  // ------------------------------------------------------------ control
  ctrl_t       dctrl;
  logic        freeze, hold, issue, flush;
  logic        jmp_taken;
  logic [1:0]  sel_a, sel_b;
  logic        s3_busy;
  logic        s3_act, s3_fwd_we, s4_fwd_we, s5_we;
  logic [63:0] s3_res, s4_val, s5_val;
  logic        alu_trap, alu_tf, alu_done, fpu_done;
  logic [7:0]  alu_ovf;
  logic [1:0]  fpu_uo;
  logic [4:0]  ra_addr, rb_addr;
  logic        pred_a, pred_b, pf_we, m1_sel, m5_sel;
  pc_sel_e     pc_sin;

  control_unit CTL (
    .clk(clk), .reset(reset), .init(init),
    .op({ifid.instr[28:23], ifid.instr[17:16], ifid.instr[7:0]}),
    .id_valid(ifid.valid),
    .rs_a(ra_addr), .rs_b(rb_addr),
    .s3_rd(idex.instr[22:18]), .s3_we(s3_fwd_we),
    .s4_rd(exmem.instr[22:18]), .s4_we(s4_fwd_we),
    .s5_rd(memwb.instr[22:18]), .s5_we(s5_we),
    .sel_a(sel_a), .sel_b(sel_b),
    .s3_valid(idex.c.valid), .pred_a(pred_a), .s3_pred_op(idex.c.pred_op),
    .s3_alu_en(idex.c.alu_en), .alu_done(alu_done),
    .s3_fpu_en(idex.c.fpu_en), .fpu_done(fpu_done), .pred_b(pred_b),
    .s3_act(s3_act), .s3_busy(s3_busy), .pf_we(pf_we), .jmp_taken(jmp_taken),
    .m1_sel(m1_sel), .m5_sel(m5_sel), .pc_sin(pc_sin), .ctrl(dctrl),
    .freeze(freeze), .hold(hold), .issue(issue), .flush(flush),
    .illegal_in(issue && ifid.valid && dctrl.illegal),
    .trap_in(s3_act && !s3_busy && (idex.c.trap || alu_trap)),
    .alu_ou_in((s3_act && idex.c.alu_en && alu_done) ? alu_ovf : 8'h00),
    .fpu_ou_in((s3_act && idex.c.fpu_en && fpu_done) ? fpu_uo : 2'b00),
    .illegal(illegal), .trap(trap), .ALU_OU(ALU_OU), .FPU_OU(FPU_OU));

  // ------------------------------------------------------------ S1 fetch
  logic [31:0] imem_q;
  logic [63:0] rb_fwd;

  program_counter #(.WIDTH(64), .IMEM_WORDS(2**IMEM_AW)) PCU (
    .clk(clk), .res(reset), .stall(freeze || hold),
    .Sin(pc_sin),
    .Imm(ifid.instr[22:0]), .Rd(rb_fwd), .PC(pc));

  instruction_memory #(.AW(IMEM_AW), .DW(32)) IMEM (
    .clka(clk), .wea(init), .addra(init ? init_addr : pc[IMEM_AW-1:0]),
    .dina(init_data), .douta(imem_q));

  always_ff @(posedge clk) begin
    if (reset || init)         ifid <= '0;
    else if (freeze || hold)   ifid <= ifid;
    else if (flush)            ifid <= '0;
    else                       ifid <= '{valid: 1'b1, instr: imem_q};
  end

  // ----------------------------------------------------------- S2 decode
  logic [63:0] rf_a, rf_b, a_fwd, ext13, imm_b;

  assign ra_addr = ifid.instr[17:13];
  assign rb_addr = m1_sel ? ifid.instr[22:18] : ifid.instr[12:8];

  register_file #(.W(64), .AW(5)) RF (
    .clk(clk), .reset(reset),
    .Rs1_read_addr(ra_addr), .Rs2_read_addr(rb_addr),
    .Rs1_write_addr(5'd0), .Rs2_write_addr(memwb.instr[22:18]),
    .Rs1_data_write(64'd0), .Rs2_data_write(s5_val),
    .write_enable_1(1'b0), .write_enable_2(s5_we),
    .Rs1_data_read(rf_a), .Rs2_data_read(rf_b));

  // bypass multiplexers
  function automatic logic [63:0] fwd(input logic [1:0] sel, input logic [63:0] rf,
                                      input logic [63:0] v3, input logic [63:0] v4,
                                      input logic [63:0] v5);
    unique case (sel)
      2'b01:   return v3;
      2'b10:   return v4;
      2'b11:   return v5;
      default: return rf;
    endcase
  endfunction
  assign a_fwd  = fwd(sel_a, rf_a, s3_res, s4_val, s5_val);
  assign rb_fwd = fwd(sel_b, rf_b, s3_res, s4_val, s5_val);

  sign_extension SXT (.imm(ifid.instr[12:0]), .mode(dctrl.sext), .ext(ext13));

  always_comb begin
    unique case (dctrl.imm_kind)
      IMM_CMP:  imm_b = {{56{ifid.instr[22]}}, ifid.instr[22:18], ifid.instr[12:10]};
      IMM_TBIT: imm_b = {58'd0, ifid.instr[12:10], ifid.instr[2:0]};
      default:  imm_b = ext13;
    endcase
  end

  always_comb begin
    idex_d       = '0;
    idex_d.c     = dctrl;
    idex_d.c.valid = ifid.valid && dctrl.valid && !dctrl.is_jmp;
    idex_d.instr = ifid.instr;
    idex_d.a     = a_fwd;
    idex_d.b     = m5_sel ? imm_b : rb_fwd;
    idex_d.rb    = rb_fwd;
  end

  always_ff @(posedge clk) begin
    if (reset)        idex <= '0;
    else if (freeze)  idex <= idex;
    else if (!issue)  idex <= '0;
    else              idex <= idex_d;
  end

  // ---------------------------------------------------------- S3 execute
  logic [7:0]  pred_set;     // active predicate set (observation only)
  logic [3:0]  pred_set_idx;
  logic [63:0] alu_r, mul_r, mix_r, shi_r, fpu_r;

  predicate_file PRF (
    .clk(clk), .reset(reset),
    .we(pf_we),
    .op(idex.c.pred_op), .pd1_addr(idex.instr[9:7]), .pd2_addr(idex.instr[6:4]),
    .tf(alu_tf), .imm4(idex.instr[3:0]),
    .rd_addr_a(idex.instr[31:29]), .rd_addr_b(ifid.instr[31:29]),
    .pred_a(pred_a), .pred_b(pred_b), .active_set(pred_set), .active_idx(pred_set_idx));

  alu ALU (
    .clk(clk), .reset(reset), .enable(s3_act && idex.c.alu_en), .S(idex.c.alu_s),
    .Rs1(idex.a), .Rs2(idex.b), .Rd(alu_r), .trap(alu_trap), .OVF(alu_ovf),
    .T_F(alu_tf), .done(alu_done));

  multiplier MUL (.Rs1(idex.a), .Rs2(idex.b), .S(idex.c.mul_s),
                  .enable(s3_act && idex.c.mul_en), .Rd(mul_r));

  mix_unit MIX (.Rs1(idex.a), .Rs2(idex.b), .S(idex.c.mix_s),
                .enable(s3_act && idex.c.mix_en), .Rd(mix_r));

  shifter SHI (.Rs1(idex.a), .Rs2(idex.b), .S(idex.c.shi_s), .Imm(idex.instr[12:0]),
               .enable(s3_act && idex.c.shi_en), .Rd(shi_r));

  fpu FPU (.CLK(clk), .RESET(reset), .ENABLE(s3_act && idex.c.fpu_en),
           .op(idex.c.fpu_s[1:0]), .A(idex.a), .B(idex.b), .R(fpu_r), .U_O(fpu_uo),
           .done_o(fpu_done));

  // result multiplexer (M7)
  always_comb begin
    unique case (idex.c.res_sel)
      RES_FPU: s3_res = fpu_r;
      RES_MUL: s3_res = mul_r;
      RES_MIX: s3_res = mix_r;
      RES_SHI: s3_res = shi_r;
      default: s3_res = alu_r;
    endcase
  end

  // only results that are final in stage 3 are forwarded from it
  assign s3_fwd_we = s3_act && idex.c.reg_write && !idex.c.mem_read &&
                     idex.c.reg_input == RI_PASS;

  always_comb begin
    exmem_d       = '0;
    exmem_d.c     = idex.c;
    exmem_d.c.valid = s3_act;
    exmem_d.instr = idex.instr;
    exmem_d.res   = s3_res;
    exmem_d.a     = idex.a;
    exmem_d.rb    = idex.rb;
  end

  always_ff @(posedge clk) begin
    if (reset || freeze) exmem <= '0;
    else                 exmem <= exmem_d;
  end

  // ----------------------------------------------------------- S4 memory
  logic [63:0] dmem_q, load_v;
  logic [7:0]  wmask;

  always_comb begin
    unique case (exmem.c.mem_size)
      2'b11:   wmask = 8'h01;
      2'b10:   wmask = 8'h03;
      2'b01:   wmask = 8'h0F;
      default: wmask = 8'hFF;
    endcase
    if (!(exmem.c.valid && exmem.c.mem_write)) wmask = 8'h00;
  end

  data_memory #(.AW(DMEM_AW)) DMEM (
    .clka(clk), .wea(wmask), .addr(exmem.res[DMEM_AW-1:0]), .dina(exmem.rb),
    .dout(dmem_q));

  always_comb begin
    if (exmem.c.mem_size == 2'b01)
      load_v = {{32{exmem.c.mem_signed && dmem_q[31]}}, dmem_q[31:0]};
    else
      load_v = dmem_q;
  end

  assign s4_val    = exmem.c.mem_read ? load_v : exmem.res;
  assign s4_fwd_we = exmem.c.valid && exmem.c.reg_write && exmem.c.reg_input == RI_PASS;

  always_comb begin
    memwb_d     = exmem;
    memwb_d.res = s4_val;
  end

  always_ff @(posedge clk) begin
    if (reset) memwb <= '0;
    else       memwb <= memwb_d;
  end

  // ------------------------------------------------------- S5 write back
  register_input RIN (
    .mode(memwb.c.reg_input), .k(memwb.instr[17:16]), .imm16(memwb.instr[15:0]),
    .pos(memwb.instr[11:6]), .len(memwb.instr[5:0]), .rs1(memwb.a),
    .rd_old(memwb.rb), .result(memwb.res), .rd_new(s5_val));

  assign s5_we = memwb.c.valid && memwb.c.reg_write;
endmodule
