// tb_fpu: drives the FPU top with all four operations (addf, subf, multf,
// divf by the 2-bit code 00/01/10/11), compares with the simulator's
// IEEE-754 double arithmetic and checks each operation's cycle count
// (3, 3, 1 and 55).
module tb_fpu;
  logic clk = 0, rst = 1, en = 0, done;
  logic [1:0]  op;
  logic [63:0] a, b, r;
  logic [1:0]  uo;
  int checks = 0, failures = 0;

  fpu dut (.CLK(clk), .RESET(rst), .ENABLE(en), .op(op), .A(a), .B(b), .R(r), .U_O(uo), .done_o(done));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [1:0] o, input logic [63:0] x, input logic [63:0] y);
    int cyc, want_cyc;
    real rx, ry, rr;
    rx = $bitstoreal(x); ry = $bitstoreal(y);
    case (o)
      2'b00: begin rr = rx + ry; want_cyc = 3; end
      2'b01: begin rr = rx - ry; want_cyc = 3; end
      2'b10: begin rr = rx * ry; want_cyc = 1; end
      default: begin rr = rx / ry; want_cyc = 55; end
    endcase
    a = x; b = y; op = o; en = 1;
    cyc = 1;
    #1;
    while (!done) begin cyc++; @(negedge clk); end
    checks++;
    if (r !== $realtobits(rr) || cyc != want_cyc) begin
      failures++;
      if (failures < 10) $display("FAIL op %0d %h %h: got %h want %h cycles %0d", o, x, y, r, $realtobits(rr), cyc);
    end
    @(posedge clk);
    en = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    for (int i = 0; i < 200; i++)
      run(2'($urandom), {1'($urandom), 11'(900 + $urandom % 200), 20'($urandom), 32'($urandom)},
                        {1'($urandom), 11'(900 + $urandom % 200), 20'($urandom), 32'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
