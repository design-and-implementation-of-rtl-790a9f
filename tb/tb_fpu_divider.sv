// tb_fpu_divider: checks the 55-cycle double-precision divider against the
// simulator's IEEE-754 double divide on random normal operands and special
// values, and checks that done rises exactly in the 55th cycle.
module tb_fpu_divider;
  logic clk = 0, rst = 1, en = 0, done;
  logic [63:0] a, b, r;
  logic [1:0]  uo;
  int checks = 0, failures = 0;

  fpu_divider dut (.CLK(clk), .RESET(rst), .ENABLE(en), .A(a), .B(b), .R(r), .U_O(uo), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [63:0] x, input logic [63:0] y, input logic [63:0] want,
                     input logic [1:0] want_uo);
    int cyc;
    a = x; b = y; en = 1;
    cyc = 1;
    #1;
    while (!done) begin cyc++; @(negedge clk); end
    checks++;
    if (r !== want || uo !== want_uo || cyc != 55) begin
      failures++;
      if (failures < 10) $display("FAIL %h / %h: got %h/%b want %h/%b cycles %0d", x, y, r, uo, want, want_uo, cyc);
    end
    @(posedge clk);
    en = 0;
    @(negedge clk);
  endtask

  initial begin
    logic [63:0] x, y;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    for (int i = 0; i < 600; i++) begin
      x = {1'($urandom), 11'(700 + $urandom % 600), 20'($urandom), 32'($urandom)};
      y = {1'($urandom), 11'(700 + $urandom % 600), 20'($urandom), 32'($urandom)};
      if (i % 5 == 0) y = {y[63:52], x[51:0]};
      run(x, y, $realtobits($bitstoreal(x) / $bitstoreal(y)), 2'b00);
    end
    run($realtobits(1.0), $realtobits(3.0), $realtobits(1.0 / 3.0), 2'b00);
    run($realtobits(-7.5), $realtobits(2.5), $realtobits(-3.0), 2'b00);
    run($realtobits(1.0), 64'h0, 64'h7FF0_0000_0000_0000, 2'b01);
    run(64'h0, 64'h0, 64'h7FF8_0000_0000_0000, 2'b00);
    run(64'h7FEF_FFFF_FFFF_FFFF, $realtobits(0.25), 64'h7FF0_0000_0000_0000, 2'b01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
