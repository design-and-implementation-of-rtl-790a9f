// register_input: stage-5 unit that merges a result into the old Rd value.
//
// loadi, deposit and extract change only part of Rd, so the old Rd value is
// read in stage 2, carried down the pipeline and combined here (document,
// section 2.7.1):
//   loadi.k  : 16-bit subword k of Rd is replaced by the 16-bit constant
//   extract  : the low len bits of Rd are replaced by Rs1[pos+len-1:pos]
//   deposit  : Rd[pos+len-1:pos] is replaced by Rs1[len-1:0]
//   pass     : the stage-5 result is written unchanged
// A len of 0 means 64. Bits outside the field keep their old Rd value, as
// the document says these instructions need Rd; the exact field semantics of
// extract and deposit are this design's reading. Combinational.
module register_input
  import plx_pkg::*;
(
  input  reg_input_e  mode,
  input  logic [1:0]  k,
  input  logic [15:0] imm16,
  input  logic [5:0]  pos,
  input  logic [5:0]  len,
  input  logic [63:0] rs1,
  input  logic [63:0] rd_old,
  input  logic [63:0] result,
  output logic [63:0] rd_new
);
  logic [63:0] field;
  assign field = (len == 6'd0) ? '1 : (64'(1) << len) - 64'(1);

  always_comb begin
    unique case (mode)
      RI_LOADI:   begin
        rd_new = rd_old;
        rd_new[16*k +: 16] = imm16;
      end
      RI_EXTRACT: rd_new = (rd_old & ~field) | ((rs1 >> pos) & field);
      RI_DEPOSIT: rd_new = (rd_old & ~(field << pos)) | ((rs1 & field) << pos);
      default:    rd_new = result;
    endcase
  end
endmodule
