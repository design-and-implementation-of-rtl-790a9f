// fpu: double-precision floating-point unit placed in stage 3.
//
// Holds the adder/subtracter (3 cycles), the multiplier (1 cycle) and the
// divider (55 cycles) side by side and routes the request to one of them by
// the 2-bit operation code of the document's FPU signal table:
//   00 addf, 01 subf, 10 multf, 11 divf.
// Only the selected unit is enabled; the result, the {underflow, overflow}
// flags and done come from that unit. The processor keeps ENABLE high, with
// stable operands, until done. Square root is not part of the design (the
// document leaves it to future work).
module fpu (
  input  logic        CLK,
  input  logic        RESET,
  input  logic        ENABLE,
  input  logic [1:0]  op,
  input  logic [63:0] A,
  input  logic [63:0] B,
  output logic [63:0] R,
  output logic [1:0]  U_O,
  output logic        done_o
);
  logic        en_add, en_mul, en_div;
  logic [63:0] r_add, r_mul, r_div;
  logic [1:0]  f_add, f_mul, f_div;
  logic        d_add, d_mul, d_div;

  assign en_add = ENABLE && !op[1];
  assign en_mul = ENABLE && op == 2'b10;
  assign en_div = ENABLE && op == 2'b11;

  fpu_adder ADDR (
    .CLK(CLK), .RESET(RESET), .ENABLE(en_add), .A(A), .B(B), .OP(op[0]),
    .R(r_add), .U_O(f_add), .done(d_add)
  );
  fpu_multiplier MULT (
    .CLK(CLK), .ENABLE(en_mul), .A(A), .B(B), .R(r_mul), .U_O(f_mul), .done(d_mul)
  );
  fpu_divider DIVD (
    .CLK(CLK), .RESET(RESET), .ENABLE(en_div), .A(A), .B(B),
    .R(r_div), .U_O(f_div), .done(d_div)
  );

  always_comb begin
    unique case (op)
      2'b10:   begin R = r_mul; U_O = f_mul; done_o = d_mul; end
      2'b11:   begin R = r_div; U_O = f_div; done_o = d_div; end
      default: begin R = r_add; U_O = f_add; done_o = d_add; end
    endcase
  end
endmodule
