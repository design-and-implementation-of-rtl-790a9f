// fpu_divider: IEEE-754 double-precision divider, 55 cycles.
//
// Restoring ("non-performing") division of the significands, one quotient
// bit per cycle: if the partial remainder is at least the divisor, the
// quotient bit is 1 and the divisor is subtracted, otherwise the bit is 0
// and the remainder is kept; the remainder is then doubled (document,
// section 3.3 and its divisor-step figure). The exponent is EA - EB plus the
// bias; if SA < SB the dividend is doubled first and the exponent lowered by
// one, so the quotient always lies in [1,2) and needs no normalising shift
// afterwards. 54 quotient bits (53 significant and a guard bit) plus a
// sticky bit from the final remainder feed round-to-nearest-even and pack.
//
// Timing: hold ENABLE high with stable A and B. The first cycle unpacks and
// produces the first quotient bit, the next 53 cycles one bit each, and in
// the 55th cycle R and U_O are valid and done is high (the document's
// 55-cycle figure; the split is this design's). Division by zero gives
// infinity with the overflow flag set, 0/0 and inf/inf give NaN.
// U_O = {underflow, overflow}.
module fpu_divider
  import fp_pkg::*;
(
  input  logic        CLK,
  input  logic        RESET,
  input  logic        ENABLE,
  input  logic [63:0] A,
  input  logic [63:0] B,
  output logic [63:0] R,
  output logic [1:0]  U_O,
  output logic        done
);
  localparam int unsigned QBITS = 54;

  fp64_t a, b;
  assign a = A;
  assign b = B;

  logic [5:0]         cnt;
  logic [54:0]        rem;
  logic [QBITS-1:0]   q;
  logic signed [13:0] exp;

  // one restoring step
  function automatic logic [55:0] step(input logic [54:0] r, input logic [52:0] d);
    if (r >= 55'(d)) return {(r - 55'(d)) << 1, 1'b1};
    else             return {r << 1, 1'b0};
  endfunction

  always_ff @(posedge CLK) begin
    if (RESET || !ENABLE || done) begin
      cnt <= '0;
    end else begin
      cnt <= cnt + 6'd1;
    end
    if (ENABLE && cnt == '0) begin
      logic [54:0] r0;
      logic [55:0] st;
      if (mant(a) < mant(b)) begin
        r0  = {1'b0, mant(a), 1'b0};
        exp <= 14'(a.e) - 14'(b.e) + 14'(BIAS) - 14'sd1;
      end else begin
        r0  = {2'b0, mant(a)};
        exp <= 14'(a.e) - 14'(b.e) + 14'(BIAS);
      end
      st  = step(r0, mant(b));
      rem <= st[55:1];
      q   <= {{(QBITS-1){1'b0}}, st[0]};
    end else if (ENABLE && !done) begin
      logic [55:0] st;
      st  = step(rem, mant(b));
      rem <= st[55:1];
      q   <= {q[QBITS-2:0], st[0]};
    end
  end

  assign done = ENABLE && cnt == 6'd54;

  always_comb begin
    fp_res_t rp;
    logic    s;
    s   = a.s ^ b.s;
    rp  = round_pack(s, exp, {q[53:0], 1'b0, rem != '0});
    U_O = 2'b00;
    if (is_nan(a) || is_nan(b) || (is_zero(a) && is_zero(b)) || (is_inf(a) && is_inf(b)))
      R = QNAN;
    else if (is_inf(a))
      R = {s, 11'h7FF, 52'b0};
    else if (is_zero(b)) begin
      R   = {s, 11'h7FF, 52'b0};
      U_O = 2'b01;
    end else if (is_zero(a) || is_inf(b))
      R = {s, 63'b0};
    else begin
      R   = rp.r;
      U_O = {rp.uf, rp.of};
    end
  end
endmodule
