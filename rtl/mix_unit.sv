// mix_unit: subword rearrangement unit of stage 3 (mix, mux, permute).
//
// A bank of multiplexers that builds the result from the subwords of Rs1
// and Rs2 (document, section 2.5.3). Subwords are numbered from the least
// significant end.
//   mix.l.n : Rd = {Rs1 odd-left subwords interleaved with Rs2's}: for each
//             pair of n-byte subwords (2j+1, 2j), Rd gets Rs1.(2j+1) in the
//             upper and Rs2.(2j+1) in the lower position.
//   mix.r.n : as mix.l but with the even subwords (2j).
//   mux     : fixed byte patterns of Rs1: rev (reverse), mix, shuf, alt,
//             and broadcast of byte 0 or of 16-bit subword 0.
//   permute : 16-bit subword i of Rd = subword Rs2[2i+1:2i] of Rs1
//             (the selector arrives on Rs2, from the immediate).
// The control word S follows the document's mix signal table:
//   00rss mix (r = right, ss = size 11:1 10:2 01:4 bytes), 010 rev,
//   011 mix, 100 shuf, 101 alt, 11011 brcst.1, 11010 brcst.2, 111xx permute.
// The byte orders of mux.mix/shuf/alt are not printed in the document; this
// design uses the orders of the IA-64 mux1 instruction that PLX borrows:
//   mix  = 7 3 5 1 6 2 4 0, shuf = 7 3 6 2 5 1 4 0, alt = 7 5 3 1 6 4 2 0
// (listed from the most significant byte of Rd). Combinational.
module mix_unit (
  input  logic [63:0] Rs1,
  input  logic [63:0] Rs2,
  input  logic [4:0]  S,
  input  logic        enable,
  output logic [63:0] Rd
);
  function automatic logic [63:0] bytes_by(input logic [63:0] a, input logic [23:0] order);
    // order[3*k +: 3] is the source byte for result byte k
    logic [63:0] r;
    for (int k = 0; k < 8; k++) r[8*k +: 8] = a[8*order[3*k +: 3] +: 8];
    return r;
  endfunction

  always_comb begin
    int unsigned nb, sw, pos, src;
    nb = 1; sw = 0; pos = 0; src = 0;
    Rd = '0;
    if (enable) begin
      if (S[4:3] == 2'b00) begin
        nb = (S[1:0] == 2'b11) ? 1 : (S[1:0] == 2'b10) ? 2 : 4;
        for (int k = 0; k < 64; k++) begin
          sw  = k / (8*nb);          // subword index of result bit
          pos = k % (8*nb);
          src = (S[2] ? (sw & ~1) : (sw | 1)) * 8*nb + pos;
          Rd[k] = sw[0] ? Rs1[src] : Rs2[src];
        end
      end else if (S[4:2] == 3'b111) begin
        for (int i = 0; i < 4; i++) Rd[16*i +: 16] = Rs1[16*Rs2[2*i +: 2] +: 16];
      end else begin
        unique case (S[4:2])
          3'b010: Rd = bytes_by(Rs1, {3'd0,3'd1,3'd2,3'd3,3'd4,3'd5,3'd6,3'd7});
          3'b011: Rd = bytes_by(Rs1, {3'd7,3'd3,3'd5,3'd1,3'd6,3'd2,3'd4,3'd0});
          3'b100: Rd = bytes_by(Rs1, {3'd7,3'd3,3'd6,3'd2,3'd5,3'd1,3'd4,3'd0});
          3'b101: Rd = bytes_by(Rs1, {3'd7,3'd5,3'd3,3'd1,3'd6,3'd4,3'd2,3'd0});
          3'b110: Rd = S[0] ? {8{Rs1[7:0]}} : {4{Rs1[15:0]}};
          default: Rd = '0;
        endcase
      end
    end
  end
endmodule
