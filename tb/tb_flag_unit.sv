// tb_flag_unit: self-checking test of the flag registers.
// Random flag inputs must appear on the outputs one clock later, for one
// cycle, and reset clears all flags.
module tb_flag_unit;
  logic       clk = 0, reset = 1, illegal_in = 0, trap_in = 0, illegal, trap;
  logic [7:0] alu_ou_in = 0, ALU_OU;
  logic [1:0] fpu_ou_in = 0, FPU_OU;
  int checks = 0, failures = 0;

  flag_unit dut (.*);
  always #5 clk = !clk;
  initial begin #10_000_000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    logic [11:0] prev;
    @(posedge clk); #1;
    checks++; if ({illegal, trap, ALU_OU, FPU_OU} !== 0) begin failures++; $display("FAIL reset"); end
    reset = 0;
    prev = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if ({illegal, trap, ALU_OU, FPU_OU} !== prev) begin failures++; $display("FAIL n=%0d", n); end
      {illegal_in, trap_in, alu_ou_in, fpu_ou_in} = 12'($urandom);
      prev = {illegal_in, trap_in, alu_ou_in, fpu_ou_in};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
