// tb_multiplier: self-checking test of the subword multiplier.
// Random operands for pmul (odd/even subwords, signed/unsigned) and pmulshr
// (all four shift amounts, signed and unsigned) are compared with products
// computed in the testbench with wide integers; the unit is combinational,
// so the result is checked in the same cycle it is applied. A disabled unit
// must output zero.
module tb_multiplier;
  logic [63:0] Rs1, Rs2, Rd;
  logic [6:0]  S;
  logic        enable;
  int checks = 0, failures = 0;

  multiplier dut (.*);
  initial begin #10_000_000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  function automatic longint prod(input logic [15:0] a, input logic [15:0] b, input logic sg);
    longint x, y;
    x = sg ? longint'($signed(a)) : longint'(a);
    y = sg ? longint'($signed(b)) : longint'(b);
    return x * y;
  endfunction

  initial begin
    logic [63:0] e;
    for (int n = 0; n < 3000; n++) begin
      Rs1 = {$urandom, $urandom}; Rs2 = {$urandom, $urandom};
      if (n % 7 == 0) Rs1 = {4{16'h8000}};
      if (n % 11 == 0) Rs2 = {4{16'hFFFF}};
      enable = 1;
      if ($urandom % 2) begin
        S = {5'b0, 2'($urandom)};
        for (int h = 0; h < 2; h++) begin
          int i;
          longint p;
          i = 2*h + (S[1] ? 0 : 1);
          p = prod(Rs1[16*i +: 16], Rs2[16*i +: 16], !S[0]);
          e[32*h +: 32] = p[31:0];
        end
      end else begin
        S = {1'($urandom), 1'b1, 2'($urandom), 3'b000};
        for (int i = 0; i < 4; i++) begin
          longint p;
          int sh;
          p = prod(Rs1[16*i +: 16], Rs2[16*i +: 16], S[6]);
          sh = S[4:3] == 0 ? 0 : S[4:3] == 1 ? 8 : S[4:3] == 2 ? 15 : 16;
          e[16*i +: 16] = 16'(p >>> sh);
        end
      end
      #1;
      checks++;
      if (Rd !== e) begin failures++; $display("FAIL S=%b a=%h b=%h got %h exp %h", S, Rs1, Rs2, Rd, e); end
    end
    enable = 0; #1;
    checks++;
    if (Rd !== 0) begin failures++; $display("FAIL disabled output not zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
