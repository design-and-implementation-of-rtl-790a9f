// shifter: parallel shift unit of stage 3.
//
// Shifts each 16-, 32- or 64-bit subword of Rs1 left, right (logical) or
// right (arithmetic) by an amount from Rs2 (pshift) or from the immediate
// (pshifti); amounts of a subword's width or more give all zeros (or all
// sign bits). It also does pshiftadd (each 16-bit subword of Rs1 shifted by
// 1..3, then added to Rs2 with signed saturation), shrp (shift right the
// 128-bit pair {Rs1,Rs2}, keep the low 64 bits) and the 64-bit immediate
// shifts slli, srai, srli (document, section 2.5.4). The document builds it
// from eight byte-wide barrel shifters chained like the adder; here each
// subword is shifted as a whole, which gives the same results.
//
// Control word S (bit use after the document's shifter signal table):
//   S[7:5] 000 pshift(i), 001/010/011 pshiftadd by 1/2/3, 100 shrp,
//          101 slli, 110 srai, 111 srli
//   S[4] amount from Imm, S[3] arithmetic, S[2] right, S[1:0] size
//   (10: 2 bytes, 01: 4, 00: 8). For pshiftadd S[2] is the direction.
// The immediate amount is Imm[5:0] (this design's choice). Combinational.
module shifter
  import plx_pkg::*;
(
  input  logic [63:0] Rs1,
  input  logic [63:0] Rs2,
  input  logic [7:0]  S,
  input  logic [12:0] Imm,
  input  logic        enable,
  output logic [63:0] Rd
);
  // shift one subword of nb bytes held in the low bits of a
  function automatic logic [63:0] lane_shift(input logic [63:0] a, input int unsigned nb,
                                             input int unsigned amt, input logic right,
                                             input logic arith);
    logic [63:0] r;
    logic        sgn;
    int unsigned w;
    w   = 8 * nb;
    sgn = arith & a[w-1];
    r   = '0;
    for (int k = 0; k < 64; k++) begin
      if (k < w) begin
        if (right) r[k] = (k + amt < w) ? a[k + amt] : sgn;
        else       r[k] = (k >= amt) ? a[k - amt] : 1'b0;
      end
    end
    return r;
  endfunction

  always_comb begin
    int unsigned amt_r, amt_i, nb;
    logic [63:0] a, r;
    logic signed [15:0] ha, hb;
    logic signed [19:0] hs;
    a = '0; r = '0; ha = '0; hb = '0; hs = '0;
    amt_r = (Rs2[63:7] != '0) ? 127 : int'(Rs2[6:0]);
    amt_i = int'(Imm[5:0]);
    nb    = lane_bytes(S[1:0]);
    Rd    = '0;
    if (enable) begin
      unique case (S[7:5])
        3'b000: begin
          for (int l = 0; l < 4; l++) begin
            if (l < 8 / nb) begin
              a = Rs1 >> (8*nb*l);
              r = lane_shift(a, nb, S[4] ? amt_i : amt_r, S[2], S[3]);
              for (int k = 0; k < 64; k++)
                if (k >= 8*nb*l && k < 8*nb*(l+1)) Rd[k] = r[k - 8*nb*l];
            end
          end
        end
        3'b001, 3'b010, 3'b011: begin
          for (int l = 0; l < 4; l++) begin
            ha = Rs1[16*l +: 16];
            hb = Rs2[16*l +: 16];
            if (S[2]) hs = 20'(ha >>> S[6:5]);
            else      hs = 20'(ha) <<< S[6:5];
            // saturate the shifted value and the sum to 16 signed bits
            if (hs > 20'sd32767)       hs = 20'sd32767;
            else if (hs < -20'sd32768) hs = -20'sd32768;
            hs = hs + 20'(hb);
            if (hs > 20'sd32767)       Rd[16*l +: 16] = 16'h7fff;
            else if (hs < -20'sd32768) Rd[16*l +: 16] = 16'h8000;
            else                       Rd[16*l +: 16] = hs[15:0];
          end
        end
        3'b100: Rd = 64'({Rs1, Rs2} >> amt_i);
        3'b101: Rd = Rs1 << amt_i;
        3'b110: Rd = 64'($signed(Rs1) >>> amt_i);
        default: Rd = Rs1 >> amt_i;
      endcase
    end
  end
endmodule
