// bypass_unit: operand forwarding for stage 2 (the document's M3/M4 muxes).
//
// Combinational. For each of the two register-file read addresses of the
// instruction in stage 2 it compares against the destination registers of
// the instructions in stages 3, 4 and 5. When a younger stage will write the
// same register its value is taken instead of the register-file output; the
// nearest stage wins (stage 3 before 4 before 5), and R0 is never forwarded
// because it always reads zero.
//
// Select code (as for the document's three-input bypass muxes, plus the
// register file): 00 register file, 01 stage 3 result, 10 stage 4 result,
// 11 stage 5 result.
//
// The document forwards from the stage outputs; which stage values exist is
// this design's choice: stage 3 forwards the selected unit result, stage 4
// the value that stage 4 passes on (load data for loads), stage 5 the value
// written back after the register-input unit.
module bypass_unit #(
  parameter int AW = 5
) (
  input  logic [AW-1:0] rs_a,
  input  logic [AW-1:0] rs_b,
  input  logic [AW-1:0] s3_rd,
  input  logic          s3_we,
  input  logic [AW-1:0] s4_rd,
  input  logic          s4_we,
  input  logic [AW-1:0] s5_rd,
  input  logic          s5_we,
  output logic [1:0]    sel_a,
  output logic [1:0]    sel_b
);
  function automatic logic [1:0] pick(input logic [AW-1:0] a,
                                      input logic [AW-1:0] r3, input logic w3,
                                      input logic [AW-1:0] r4, input logic w4,
                                      input logic [AW-1:0] r5, input logic w5);
    if (a == '0)             return 2'b00;
    else if (w3 && r3 == a)  return 2'b01;
    else if (w4 && r4 == a)  return 2'b10;
    else if (w5 && r5 == a)  return 2'b11;
    else                     return 2'b00;
  endfunction

  assign sel_a = pick(rs_a, s3_rd, s3_we, s4_rd, s4_we, s5_rd, s5_we);
  assign sel_b = pick(rs_b, s3_rd, s3_we, s4_rd, s4_we, s5_rd, s5_we);
endmodule
