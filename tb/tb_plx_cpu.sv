// tb_plx_cpu: end-to-end test of the PLX processor at its default size.
//
// Two programs are loaded through the initialisation port and run.
//  1. The document's example: eight loadi instructions build two 64-bit
//     constants in R1 and R2, then and writes R1 & R2 to R3. The document
//     reports 44 cycles; here they are counted from the clock edge that
//     fetches the first instruction to the edge that writes R3.
//  2. A program that exercises every mechanism: forwarding from stages 3,
//     4 and 5, multi-cycle ALU and FPU stalls, issue gaps (loadi, cmp,
//     testbit, load, changepr), taken and not-taken jumps (immediate and
//     register), predicated squash, store/load, extract, ALU and FPU
//     overflow flags, trap and illegal-instruction flags.
// Final register and memory contents are compared with expected values
// (floating-point ones come from the simulator's real arithmetic), the
// total number of multi-cycle stall cycles is checked against the latencies
// (psub 2, addf 3, divf 55, subf 3, multf 1), and each mechanism counter
// must be non-zero.
module tb_plx_cpu;
  import plx_pkg::*;

  logic        clk = 0, reset = 1, init = 0;
  logic [8:0]  init_addr = '0;
  logic [31:0] init_data = '0;
  logic        illegal, trap;
  logic [7:0]  ALU_OU;
  logic [1:0]  FPU_OU;
  logic [63:0] pc;
  int checks = 0, failures = 0;

  plx_cpu dut (.clk(clk), .reset(reset), .init(init), .init_addr(init_addr),
               .init_data(init_data), .illegal(illegal), .trap(trap),
               .ALU_OU(ALU_OU), .FPU_OU(FPU_OU), .pc(pc));

  always #5 clk = !clk;

  initial begin
    #2_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // ------------------------------------------------------------ assembler
  function automatic logic [31:0] enc(input int p, input logic [5:0] op, input int rd,
                                      input int rs1, input int rs2, input logic [7:0] sub);
    return {3'(p), op, 5'(rd), 5'(rs1), 5'(rs2), sub};
  endfunction
  function automatic logic [31:0] ldi(input int rd, input int k, input logic [15:0] v);
    return {3'd0, OP_LOADI, 5'(rd), 2'(k), v};
  endfunction
  function automatic logic [31:0] imm(input int p, input logic [5:0] op, input int rd,
                                      input int rs1, input logic [12:0] v);
    return {3'(p), op, 5'(rd), 5'(rs1), v};
  endfunction
  function automatic logic [31:0] jmp(input int p, input int off);
    return {3'(p), OP_JMP, 23'(off)};
  endfunction
  function automatic logic [31:0] cmpx(input logic [5:0] op, input int rs1, input int rs2,
                                       input int pd1, input int pd2, input logic [3:0] c);
    return {3'd0, op, 5'(rs2), 5'(rs1), 3'd0, 3'(pd1), 3'(pd2), c};
  endfunction

  logic [31:0] prog [$];

  task automatic load_and_run(input int cycles);
    reset = 1;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    init = 1;
    for (int i = 0; i < prog.size(); i++) begin
      init_addr = 9'(i); init_data = prog[i];
      @(posedge clk); #1;
    end
    init = 0;
    repeat (cycles) @(posedge clk);
    #1;
  endtask

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------ event counters
  int cyc = 0, t_first = -1, t_r3 = -1;
  int n_init_stall = 0, n_busy = 0, n_hold = 0, n_byp3 = 0, n_byp4 = 0, n_byp5 = 0;
  int n_jmp_taken = 0, n_jmp_not = 0, n_squash = 0, n_store = 0, n_load = 0;
  int n_fpu = 0, n_illegal = 0, n_trap = 0, n_aluov = 0, n_fpuov = 0, n_predw = 0;
  int n_changepr = 0, n_extract = 0;
  logic counting = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (!reset) begin
    if (t_first < 0 && dut.ifid.valid) t_first = cyc;
    if (t_r3 < 0 && dut.s5_we && dut.memwb.instr[22:18] == 5'd3) t_r3 = cyc + 1;
    if (counting) begin
      if (init && dut.freeze) n_init_stall++;
      if (dut.s3_busy) n_busy++;
      if (dut.hold) n_hold++;
      if (dut.issue && dut.ifid.valid) begin
        if (dut.sel_a == 2'b01 || dut.sel_b == 2'b01) n_byp3++;
        if (dut.sel_a == 2'b10 || dut.sel_b == 2'b10) n_byp4++;
        if (dut.sel_a == 2'b11 || dut.sel_b == 2'b11) n_byp5++;
        if (dut.dctrl.is_jmp && dut.jmp_taken) n_jmp_taken++;
        if (dut.dctrl.is_jmp && !dut.jmp_taken) n_jmp_not++;
      end
      if (dut.idex.c.valid && !dut.pred_a && !dut.freeze) n_squash++;
      if (dut.s3_act && !dut.s3_busy && dut.idex.c.fpu_en) n_fpu++;
      if (dut.s3_act && !dut.s3_busy && dut.idex.c.pred_op == PR_CMP) n_predw++;
      if (dut.s3_act && dut.idex.c.pred_op == PR_CHANGE) n_changepr++;
      if (dut.exmem.c.valid && dut.exmem.c.mem_write) n_store++;
      if (dut.exmem.c.valid && dut.exmem.c.mem_read) n_load++;
      if (dut.s5_we && dut.memwb.c.reg_input == RI_EXTRACT) n_extract++;
      if (illegal) n_illegal++;
      if (trap) n_trap++;
      if (ALU_OU != 0) n_aluov++;
      if (FPU_OU != 0) n_fpuov++;
    end
  end

  function automatic logic [63:0] rf(input int i);
    return dut.RF.regs[i];
  endfunction

  // ------------------------------------------------------------ programs
  localparam logic [63:0] R1_EX = {16'b0100101001010100, 16'b1101111111111110,
                                   16'b0010100101001001, 16'b1001001010010101};
  localparam logic [63:0] R2_EX = {16'b1101010101010111, 16'b0010101010110000,
                                   16'b0101010100000000, 16'b0010010101010100};

  real f8, f9, f10, f11, f12, f13;

  initial begin
    // ---------------- program 1: the document's loadi / and example
    prog = {};
    for (int k = 3; k >= 0; k--) prog.push_back(ldi(1, k, R1_EX[16*k +: 16]));
    for (int k = 3; k >= 0; k--) prog.push_back(ldi(2, k, R2_EX[16*k +: 16]));
    prog.push_back(enc(0, OP_AND, 3, 1, 2, 8'h00));
    prog.push_back(jmp(0, -1));
    load_and_run(80);
    check("ex R1", rf(1), R1_EX);
    check("ex R2", rf(2), R2_EX);
    check("ex R3", rf(3), R1_EX & R2_EX);
    check("ex cycles", 64'(t_r3 - t_first), 64'd44);
    $display("example: first fetch at edge %0d, R3 written at edge %0d (%0d cycles)",
             t_first, t_r3, t_r3 - t_first);

    // ---------------- program 2: mechanisms
    f8 = 1.5; f9 = 2.25;
    f10 = f8 + f9; f11 = f10 * f9; f12 = f11 / f8; f13 = f8 - f9;
    prog = {};
    prog.push_back(ldi(1, 0, 16'd5));
    prog.push_back(ldi(2, 0, 16'd7));
    prog.push_back(enc(0, OP_PADD, 3, 1, 2, 8'h04));   // R3 = 12
    prog.push_back(enc(0, OP_PADD, 4, 3, 1, 8'h04));   // R4 = 17 (bypass S3)
    prog.push_back(enc(0, OP_PADD, 5, 3, 4, 8'h04));   // R5 = 29 (S4, S3)
    prog.push_back(enc(0, OP_XOR,  6, 5, 3, 8'h00));   // R6 = 17 (S3, S5)
    prog.push_back(enc(0, OP_PSUB, 7, 5, 1, 8'h04));   // R7 = 24, 2 cycles
    prog.push_back(ldi(8, 3, 16'h3FF8));               // 1.5
    prog.push_back(ldi(9, 3, 16'h4002));               // 2.25
    prog.push_back(enc(0, OP_ADDF,  10, 8, 9, 8'h00));
    prog.push_back(enc(0, OP_MULTF, 11, 10, 9, 8'h00));
    prog.push_back(enc(0, OP_DIVF,  12, 11, 8, 8'h00));
    prog.push_back(enc(0, OP_SUBF,  13, 8, 9, 8'h00));
    prog.push_back(imm(0, OP_STORE8, 12, 0, 13'd16));  // mem[16] = R12
    prog.push_back(imm(0, OP_LOAD8, 14, 0, 13'd16));   // R14 = mem[16]
    prog.push_back(cmpx(OP_CMP, 1, 2, 1, 2, 4'b0010)); // P1 = R1 < R2, P2 = !P1
    prog.push_back(enc(2, OP_PADD, 15, 1, 1, 8'h04));  // squashed
    prog.push_back(enc(1, OP_PADD, 16, 1, 1, 8'h04));  // R16 = 10
    prog.push_back(jmp(1, 1));                         // taken: skip one
    prog.push_back(ldi(17, 0, 16'hDEAD));              // skipped
    prog.push_back(ldi(18, 0, 16'h1111));
    prog.push_back(jmp(2, 1));                         // not taken
    prog.push_back(ldi(19, 0, 16'h2222));
    prog.push_back(ldi(20, 3, 16'h7FFF));
    prog.push_back(enc(0, OP_PADD, 21, 20, 20, 8'h04)); // signed overflow
    prog.push_back(ldi(22, 3, 16'h7FE0));
    prog.push_back(enc(0, OP_MULTF, 23, 22, 22, 8'h00)); // FP overflow
    prog.push_back({3'd0, OP_TRAP, 23'd0});
    prog.push_back({3'd0, 6'b010101, 23'd0});          // undefined opcode
    prog.push_back({3'd0, OP_CHANGEPR, 19'd0, 4'd1});  // set 1
    prog.push_back(enc(1, OP_PADD, 24, 1, 2, 8'h04));  // squashed (set 1 P1 = 0)
    prog.push_back({3'd0, OP_CHANGEPR, 19'd0, 4'd0});  // back to set 0
    prog.push_back(enc(1, OP_PADD, 25, 1, 2, 8'h04));  // R25 = 12
    prog.push_back({3'd0, OP_TESTBIT, 5'd0, 5'd1, 3'd0, 3'd3, 3'd4, 1'b0, 3'd2}); // P3 = R1[2]
    prog.push_back({3'd3, OP_LOADI, 5'd26, 2'd0, 16'h3333});
    prog.push_back({3'd4, OP_LOADI, 5'd27, 2'd0, 16'h4444});  // squashed
    prog.push_back(ldi(28, 0, 16'd2));
    prog.push_back({3'd0, OP_JMPR, 5'd28, 18'd0});     // PC += R28
    prog.push_back(ldi(29, 0, 16'h5555));              // skipped
    prog.push_back(ldi(29, 0, 16'h6666));              // skipped
    prog.push_back(ldi(30, 0, 16'h7777));
    prog.push_back({3'd0, OP_EXTRACT, 5'd31, 5'd21, 1'b0, 6'd48, 6'd16});
    prog.push_back(jmp(0, -1));
    counting = 1;
    load_and_run(400);
    counting = 0;

    check("R3", rf(3), 64'd12);
    check("R4", rf(4), 64'd17);
    check("R5", rf(5), 64'd29);
    check("R6", rf(6), 64'd17);
    check("R7", rf(7), 64'd24);
    check("R10 addf", rf(10), $realtobits(f10));
    check("R11 multf", rf(11), $realtobits(f11));
    check("R12 divf", rf(12), $realtobits(f12));
    check("R13 subf", rf(13), $realtobits(f13));
    check("mem[16]", dut.DMEM.mem[16], $realtobits(f12));
    check("R14 load", rf(14), $realtobits(f12));
    check("R15 squashed", rf(15), 64'd0);
    check("R16", rf(16), 64'd10);
    check("R17 skipped", rf(17), 64'd0);
    check("R18", rf(18), 64'h1111);
    check("R19", rf(19), 64'h2222);
    check("R21", rf(21), 64'hFFFE_0000_0000_0000);
    check("R23 inf", rf(23), 64'h7FF0_0000_0000_0000);
    check("R24 squashed", rf(24), 64'd0);
    check("R25", rf(25), 64'd12);
    check("R26", rf(26), 64'h3333);
    check("R27 squashed", rf(27), 64'd0);
    check("R29 skipped", rf(29), 64'd0);
    check("R30", rf(30), 64'h7777);
    check("R31 extract", rf(31), 64'hFFFE);
    // multi-cycle stall cycles: psub 1, addf 2, divf 54, subf 2 (multf none)
    check("busy cycles", 64'(n_busy), 64'd59);

    $display("init_stall=%0d busy=%0d hold=%0d byp3=%0d byp4=%0d byp5=%0d jmp_taken=%0d jmp_not=%0d",
             n_init_stall, n_busy, n_hold, n_byp3, n_byp4, n_byp5, n_jmp_taken, n_jmp_not);
    $display("squash=%0d store=%0d load=%0d fpu=%0d illegal=%0d trap=%0d aluov=%0d fpuov=%0d predw=%0d changepr=%0d extract=%0d",
             n_squash, n_store, n_load, n_fpu, n_illegal, n_trap, n_aluov, n_fpuov, n_predw,
             n_changepr, n_extract);
    check_seen("init stall", n_init_stall);
    check_seen("multi-cycle stall", n_busy);
    check_seen("issue-gap stall", n_hold);
    check_seen("bypass from S3", n_byp3);
    check_seen("bypass from S4", n_byp4);
    check_seen("bypass from S5", n_byp5);
    check_seen("taken jump", n_jmp_taken);
    check_seen("not-taken jump", n_jmp_not);
    check_seen("predicated squash", n_squash);
    check_seen("store", n_store);
    check_seen("load", n_load);
    check_seen("fpu op", n_fpu);
    check_seen("illegal flag", n_illegal);
    check_seen("trap flag", n_trap);
    check_seen("ALU overflow flag", n_aluov);
    check_seen("FPU overflow flag", n_fpuov);
    check_seen("predicate write", n_predw);
    check_seen("changepr", n_changepr);
    check_seen("extract", n_extract);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_seen(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask
endmodule
