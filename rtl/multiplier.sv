// multiplier: parallel 16-bit subword multiplier of stage 3.
//
// pmul multiplies either the odd-indexed (3 and 1) or the even-indexed
// (2 and 0) 16-bit subwords of Rs1 and Rs2 and returns the two full 32-bit
// products side by side, the product of the higher pair in the upper half
// (document, section 2.5.2, Figures 2.11 and 2.12). pmulshr multiplies all
// four subword pairs and keeps 16 bits of each product after a right shift
// by 0, 8, 15 or 16. Combinational, one cycle.
//
// Control word S (bit use after the document's multiplier signal table):
//   S[5]=0 pmul : S[1] 1 = even subwords, S[0] 1 = unsigned
//   S[5]=1 pmulshr : S[4:3] shift code (00:0 01:8 10:15 11:16),
//                    S[6] 1 = ".a" variant, read here as signed operands
// The table does not say what ".a" means; treating it as signed is this
// design's reading.
module multiplier (
  input  logic [63:0] Rs1,
  input  logic [63:0] Rs2,
  input  logic [6:0]  S,
  input  logic        enable,
  output logic [63:0] Rd
);
  function automatic logic [31:0] mul16(input logic [15:0] a, input logic [15:0] b, input logic sgn);
    logic signed [32:0] pa, pb, p;
    pa = sgn ? 33'(signed'(a)) : 33'(a);
    pb = sgn ? 33'(signed'(b)) : 33'(b);
    p  = pa * pb;
    return p[31:0];
  endfunction

  always_comb begin
    int unsigned hi, lo;
    logic [31:0] p;
    hi = S[1] ? 2 : 3;
    lo = S[1] ? 0 : 1;
    p  = '0;
    Rd = '0;
    if (enable) begin
      if (!S[5]) begin
        hi = S[1] ? 2 : 3;
        lo = S[1] ? 0 : 1;
        Rd[63:32] = mul16(Rs1[16*hi +: 16], Rs2[16*hi +: 16], !S[0]);
        Rd[31:0]  = mul16(Rs1[16*lo +: 16], Rs2[16*lo +: 16], !S[0]);
      end else begin
        for (int i = 0; i < 4; i++) begin
          p = mul16(Rs1[16*i +: 16], Rs2[16*i +: 16], S[6]);
          unique case (S[4:3])
            2'b00: Rd[16*i +: 16] = p[15:0];
            2'b01: Rd[16*i +: 16] = p[23:8];
            2'b10: Rd[16*i +: 16] = p[30:15];
            2'b11: Rd[16*i +: 16] = p[31:16];
          endcase
        end
      end
    end
  end
endmodule
