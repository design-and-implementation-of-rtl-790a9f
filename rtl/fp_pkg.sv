// fp_pkg: IEEE-754 double-precision helpers shared by the FPU units.
//
// Numbers are unpacked into sign, 11-bit biased exponent and 53-bit
// significand with the hidden bit made explicit. Subnormal inputs are
// treated as zero, and results that would be subnormal are flushed to zero
// with the underflow flag; results too large become infinity with the
// overflow flag. Rounding is round-to-nearest-even on a significand that
// carries guard, round and sticky bits. These choices are this design's:
// the document defers the details to the FPU design it follows and only
// shows the unpack / normalise / round / pack stages.
package fp_pkg;

  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;
  localparam int          BIAS = 1023;

  typedef struct packed {
    logic        s;
    logic [10:0] e;
    logic [51:0] f;
  } fp64_t;

  // flag order on the 2-bit U_O outputs: [1] underflow, [0] overflow
  typedef struct packed {
    logic [63:0] r;
    logic        uf;
    logic        of;
  } fp_res_t;

  function automatic logic is_nan(input fp64_t x);
    return x.e == 11'h7FF && x.f != '0;
  endfunction
  function automatic logic is_inf(input fp64_t x);
    return x.e == 11'h7FF && x.f == '0;
  endfunction
  function automatic logic is_zero(input fp64_t x);  // subnormals count as zero
    return x.e == '0;
  endfunction
  function automatic logic [52:0] mant(input fp64_t x);
    return is_zero(x) ? 53'b0 : {1'b1, x.f};
  endfunction

  // m[55] is the leading one, m[54:3] the fraction, m[2] guard, m[1] round,
  // m[0] sticky; exp is the biased exponent belonging to m[55].
  function automatic fp_res_t round_pack(input logic s, input logic signed [13:0] exp,
                                         input logic [55:0] m);
    fp_res_t     o;
    logic [53:0] r;
    logic signed [13:0] e;
    logic        up;
    up = m[2] & (m[1] | m[0] | m[3]);
    r  = {1'b0, m[55:3]} + 54'(up);
    e  = exp;
    if (r[53]) begin
      r = r >> 1;
      e = e + 14'sd1;
    end
    o = '0;
    if (e >= 14'sd2047) begin
      o.r  = {s, 11'h7FF, 52'b0};
      o.of = 1'b1;
    end else if (e <= 14'sd0) begin
      o.r  = {s, 63'b0};
      o.uf = 1'b1;
    end else begin
      o.r = {s, e[10:0], r[51:0]};
    end
    return o;
  endfunction

endpackage
