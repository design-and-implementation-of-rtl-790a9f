// sign_extension: widens the 13-bit instruction immediate to 64 bits.
//
// mode selects sign extension, zero extension or one extension (upper bits
// all ones), the three kinds the document names. Combinational. The 2-bit
// mode encoding is this design's (the document gives a 1-bit control).
module sign_extension
  import plx_pkg::*;
(
  input  logic [12:0] imm,
  input  sext_mode_e  mode,
  output logic [63:0] ext
);
  always_comb begin
    unique case (mode)
      SX_SIGN: ext = {{51{imm[12]}}, imm};
      SX_ONES: ext = {{51{1'b1}}, imm};
      default: ext = {51'b0, imm};
    endcase
  end
endmodule
