// tb_fpu_adder: checks the double-precision adder against the simulator's
// own IEEE-754 double arithmetic (round to nearest even) on random normal
// operands, close-exponent cancellations and special values, and checks
// that done rises exactly in the third cycle.
module tb_fpu_adder;
  logic clk = 0, rst = 1, en = 0, op = 0, done;
  logic [63:0] a, b, r;
  logic [1:0]  uo;
  int checks = 0, failures = 0;

  fpu_adder dut (.CLK(clk), .RESET(rst), .ENABLE(en), .A(a), .B(b), .OP(op),
                 .R(r), .U_O(uo), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] rnd(input int espan, input int ebase);
    logic [10:0] e;
    e = 11'(ebase + ($urandom % espan));
    return {1'($urandom), e, 20'($urandom), 32'($urandom)};
  endfunction

  task automatic run(input logic [63:0] x, input logic [63:0] y, input logic o,
                     input logic [63:0] exp_r);
    int cyc;
    a = x; b = y; op = o; en = 1;
    cyc = 1;
    #1;
    while (!done) begin cyc++; @(negedge clk); end
    checks++;
    if (r !== exp_r || cyc != 3) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h %s %h: got %h want %h cycles %0d", x, o ? "-" : "+", y, r, exp_r, cyc);
    end
    @(posedge clk);
    en = 0;
    @(negedge clk);
  endtask

  initial begin
    logic [63:0] x, y, want;
    real rx, ry;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    for (int i = 0; i < 1500; i++) begin
      x = rnd(120, 960);
      if (i % 3 == 0) y = {1'($urandom), x[62:52] - 11'($urandom % 3), 20'($urandom), 32'($urandom)};
      else            y = rnd(120, 960);
      op = 1'($urandom);
      rx = $bitstoreal(x); ry = $bitstoreal(y);
      want = $realtobits(op ? rx - ry : rx + ry);
      run(x, y, op, want);
    end
    // specials: x - x = +0, inf + 1 = inf, inf - inf = NaN, 0 + 0
    x = $realtobits(1.5);
    run(x, x, 1'b1, 64'h0);
    run(64'h7FF0_0000_0000_0000, x, 1'b0, 64'h7FF0_0000_0000_0000);
    run(64'h7FF0_0000_0000_0000, 64'h7FF0_0000_0000_0000, 1'b1, 64'h7FF8_0000_0000_0000);
    run(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 1'b0, 64'h8000_0000_0000_0000);
    run($realtobits(2.5), $realtobits(-0.75), 1'b0, $realtobits(1.75));
    // overflow: max + max -> inf with the overflow flag
    run(64'h7FEF_FFFF_FFFF_FFFF, 64'h7FEF_FFFF_FFFF_FFFF, 1'b0, 64'h7FF0_0000_0000_0000);
    checks++;
    if (uo != 2'b01) begin failures++; $display("FAIL overflow flag %b", uo); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
