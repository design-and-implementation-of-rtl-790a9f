// tb_program_counter: self-checking test of the program counter.
// After reset the PC is 0. For random select codes and operands the PC is
// compared every cycle with a reference: +1, +sign-extended Imm, +Rd, +0,
// a stall forcing +0, and the wrap to 0 once the next value would leave the
// 512-word instruction memory. One update per clock edge.
module tb_program_counter;
  logic        clk = 0, res = 1, stall = 0;
  logic [1:0]  Sin = 0;
  logic [22:0] Imm = 0;
  logic [63:0] Rd = 0, PC, ref_pc;
  int checks = 0, failures = 0;

  program_counter dut (.*);
  always #5 clk = !clk;
  initial begin #10_000_000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    @(posedge clk); #1;
    checks++; if (PC !== 0) begin failures++; $display("FAIL reset PC=%0d", PC); end
    res = 0; ref_pc = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [63:0] nx;
      @(negedge clk);
      Sin = 2'($urandom); stall = ($urandom % 8) == 0;
      Imm = 23'($signed(int'($urandom % 61) - 30));
      Rd = 64'($signed(int'($urandom % 41) - 20));
      if (n % 500 == 0) begin Sin = 2'b10; Imm = 23'd600; end
      if (stall || Sin == 2'b11) nx = ref_pc;
      else if (Sin == 2'b00) nx = ref_pc + 1;
      else if (Sin == 2'b10) nx = ref_pc + {{41{Imm[22]}}, Imm};
      else nx = ref_pc + Rd;
      if (nx >= 512) nx = 0;
      @(posedge clk); #1;
      ref_pc = nx;
      checks++;
      if (PC !== ref_pc) begin failures++; $display("FAIL n=%0d Sin=%b PC=%0d exp %0d", n, Sin, PC, ref_pc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
