// fpu_multiplier: IEEE-754 double-precision multiplier, one cycle.
//
// Data flow as the document draws it: unpack, sign logic (XOR), exponent add
// and removal of the excess bias (EA + EB - 1023), 53 x 53-bit significand
// multiply, normalise (the product of two values in [1,2) lies in [1,4), so
// at most one right shift and an exponent increment), round-to-nearest-even
// and pack. The document replaced the iterative significand multiplier of
// the design it follows with a plain combinational multiplier so that the
// operation takes one cycle; this module does the same and is purely
// combinational. done simply mirrors ENABLE. Zero, infinity and NaN inputs
// are handled before the arithmetic (0 x inf gives NaN).
// U_O = {underflow, overflow}.
module fpu_multiplier
  import fp_pkg::*;
(
  input  logic        CLK,
  input  logic        ENABLE,
  input  logic [63:0] A,
  input  logic [63:0] B,
  output logic [63:0] R,
  output logic [1:0]  U_O,
  output logic        done
);
  always_comb begin
    fp64_t   a, b;
    logic    s;
    logic [105:0] p;
    logic [55:0]  m;
    logic signed [13:0] e;
    fp_res_t rp;
    a = A;
    b = B;
    s = a.s ^ b.s;
    p = mant(a) * mant(b);
    e = 14'(a.e) + 14'(b.e) - 14'(BIAS);
    if (p[105]) begin
      m = {p[105:51], |p[50:0]};
      e = e + 14'sd1;
    end else begin
      m = {p[104:50], |p[49:0]};
    end
    rp  = round_pack(s, e, m);
    U_O = 2'b00;
    if (is_nan(a) || is_nan(b) || (is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b)))
      R = QNAN;
    else if (is_inf(a) || is_inf(b))
      R = {s, 11'h7FF, 52'b0};
    else if (is_zero(a) || is_zero(b))
      R = {s, 63'b0};
    else begin
      R   = rp.r;
      U_O = {rp.uf, rp.of};
    end
  end

  assign done = ENABLE;

  // the unit has no state; the clock port is kept for a uniform FPU interface
  logic unused_clk;
  assign unused_clk = CLK;
endmodule
