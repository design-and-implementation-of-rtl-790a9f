// fpu_adder: IEEE-754 double-precision adder/subtracter, 3 cycles.
//
// Follows the classic data flow the document draws for its FPU adder:
// unpack, effective operation and sign logic, exponent difference and swap
// so that the larger magnitude comes first, alignment of the smaller
// significand (shifted bits collapse into a sticky bit), significand
// add/subtract, leading-one detection and normalisation, rounding
// (round-to-nearest-even) and pack. NaN and infinity inputs bypass the
// arithmetic. The three cycles are split as
//   cycle 0: unpack, swap and align        -> register
//   cycle 1: add/subtract and normalise    -> register
//   cycle 2: round and pack                -> R, U_O valid, done = 1
// Interface: hold ENABLE high with stable A, B and OP (0 add, 1 subtract)
// for the whole operation; done rises in its third cycle and the unit is
// ready for a new operation in the next cycle. U_O = {underflow, overflow}.
// The cycle split is this design's; the 3-cycle latency is the document's.
module fpu_adder
  import fp_pkg::*;
(
  input  logic        CLK,
  input  logic        RESET,
  input  logic        ENABLE,
  input  logic [63:0] A,
  input  logic [63:0] B,
  input  logic        OP,
  output logic [63:0] R,
  output logic [1:0]  U_O,
  output logic        done
);
  // ------------------------------------------------------------ cycle 0
  typedef struct packed {
    logic               special;
    logic [63:0]        special_r;
    logic               sign;
    logic               eff_sub;
    logic signed [13:0] exp;
    logic [56:0]        major;     // {carry room, 53-bit significand, g, r, s}
    logic [56:0]        minor;
  } s1_t;

  s1_t s1_d, s1_q;

  always_comb begin
    fp64_t a, b;
    logic  sb, swap;
    logic [12:0] diff;
    logic [52:0] ma, mb;
    logic [55:0] sm_full;
    logic [55:0] sm_sh;
    logic        sticky;
    a  = A;
    b  = B;
    sb = b.s ^ OP;
    s1_d = '0;
    s1_d.eff_sub = a.s ^ sb;
    ma = mant(a);
    mb = mant(b);
    swap = (b.e > a.e) || (b.e == a.e && mb > ma);
    if (is_nan(a) || is_nan(b) || (is_inf(a) && is_inf(b) && s1_d.eff_sub)) begin
      s1_d.special = 1'b1; s1_d.special_r = QNAN;
    end else if (is_inf(a)) begin
      s1_d.special = 1'b1; s1_d.special_r = A;
    end else if (is_inf(b)) begin
      s1_d.special = 1'b1; s1_d.special_r = {sb, B[62:0]};
    end
    // the larger magnitude gives the exponent and the sign
    s1_d.sign = swap ? sb : a.s;
    if (is_zero(a) && is_zero(b)) s1_d.sign = s1_d.eff_sub ? 1'b0 : a.s;
    s1_d.exp  = swap ? 14'(b.e) : 14'(a.e);
    diff      = swap ? 13'(b.e) - 13'(a.e) : 13'(a.e) - 13'(b.e);
    s1_d.major  = {1'b0, swap ? mb : ma, 3'b000};
    sm_full   = {swap ? ma : mb, 3'b000};
    if (diff >= 13'd56) begin
      sm_sh  = '0;
      sticky = sm_full != '0;
    end else begin
      sm_sh  = sm_full >> diff;
      sticky = (sm_full & ((56'(1) << diff) - 56'(1))) != '0;
    end
    s1_d.minor = {1'b0, sm_sh[55:1], sm_sh[0] | sticky};
  end

  // ------------------------------------------------------------ cycle 1
  typedef struct packed {
    logic               special;
    logic [63:0]        special_r;
    logic               zero;
    logic               sign;
    logic signed [13:0] exp;
    logic [55:0]        m;
  } s2_t;

  s2_t s2_d, s2_q;

  always_comb begin
    logic [56:0] s;
    int          lz;
    s2_d = '0;
    lz   = 0;
    s2_d.special   = s1_q.special;
    s2_d.special_r = s1_q.special_r;
    s2_d.sign      = s1_q.sign;
    s = s1_q.eff_sub ? s1_q.major - s1_q.minor : s1_q.major + s1_q.minor;
    if (s == '0) begin
      s2_d.zero = 1'b1;
      // exact cancellation gives +0 in round-to-nearest
      if (s1_q.eff_sub) s2_d.sign = 1'b0;
    end else if (s[56]) begin
      s2_d.m   = {s[56:2], s[1] | s[0]};
      s2_d.exp = s1_q.exp + 14'sd1;
    end else begin
      // leading-one detection: the highest set bit decides
      for (int i = 0; i < 56; i++)
        if (s[i]) lz = 55 - i;
      s2_d.m   = s[55:0] << lz;
      s2_d.exp = s1_q.exp - 14'(lz);
    end
  end

  // ------------------------------------------------------------ cycle 2
  fp_res_t rp;
  always_comb begin
    rp = round_pack(s2_q.sign, s2_q.exp, s2_q.m);
    if (s2_q.special)   begin R = s2_q.special_r; U_O = 2'b00; end
    else if (s2_q.zero) begin R = {s2_q.sign, 63'b0}; U_O = 2'b00; end
    else                begin R = rp.r; U_O = {rp.uf, rp.of}; end
  end

  logic [1:0] cnt;
  assign done = ENABLE && cnt == 2'd2;

  always_ff @(posedge CLK) begin
    if (RESET) begin
      s1_q <= '0;
      s2_q <= '0;
      cnt  <= '0;
    end else begin
      s1_q <= s1_d;
      s2_q <= s2_d;
      cnt  <= (!ENABLE || done) ? 2'd0 : cnt + 2'd1;
    end
  end
endmodule
