// tb_fpu_multiplier: checks the one-cycle double-precision multiplier
// against the simulator's IEEE-754 double multiply on random normal
// operands, the document's worked example and special values.
module tb_fpu_multiplier;
  logic clk = 0, en = 1, done;
  logic [63:0] a, b, r;
  logic [1:0]  uo;
  int checks = 0, failures = 0;

  fpu_multiplier dut (.CLK(clk), .ENABLE(en), .A(a), .B(b), .R(r), .U_O(uo), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] x, input logic [63:0] y, input logic [63:0] want,
                     input logic [1:0] want_uo);
    a = x; b = y;
    #1;
    checks++;
    if (r !== want || uo !== want_uo || !done) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h: got %h/%b want %h/%b", x, y, r, uo, want, want_uo);
    end
    @(negedge clk);
  endtask

  initial begin
    logic [63:0] x, y;
    for (int i = 0; i < 2000; i++) begin
      x = {1'($urandom), 11'(700 + $urandom % 600), 20'($urandom), 32'($urandom)};
      y = {1'($urandom), 11'(700 + $urandom % 600), 20'($urandom), 32'($urandom)};
      chk(x, y, $realtobits($bitstoreal(x) * $bitstoreal(y)), 2'b00);
    end
    // worked example of the document: both operands negative, result positive,
    // exponent EA + EB - 1023 + 1
    x = 64'b1101010100010101010101010111010101010100101010101010101001111111;
    y = 64'b1100111101011011010111011011011011011011101101101101101101100111;
    chk(x, y, $realtobits($bitstoreal(x) * $bitstoreal(y)), 2'b00);
    checks++;
    if (r[63] != 1'b0 || r[62:52] != x[62:52] + y[62:52] - 11'd1023 + 11'd1) failures++;
    chk($realtobits(3.0), $realtobits(-0.5), $realtobits(-1.5), 2'b00);
    chk(64'h7FF0_0000_0000_0000, 64'h0, 64'h7FF8_0000_0000_0000, 2'b00);
    chk(64'h7FEF_FFFF_FFFF_FFFF, $realtobits(4.0), 64'h7FF0_0000_0000_0000, 2'b01);
    chk(64'h0010_0000_0000_0000, $realtobits(0.25), 64'h0, 2'b10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
