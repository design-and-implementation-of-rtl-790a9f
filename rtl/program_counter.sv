// program_counter: stage-1 program counter of the PLX processor.
//
// Each cycle the register adds one of four increments to its own value:
// 1 (next instruction), the immediate Imm, the register value Rd, or 0.
// The 2-bit select Sin picks the increment; a high stall forces the
// increment to 0, so the counter holds. This mirrors the document's schematic
// (a four-input multiplexer feeding an adder and a register). Because the
// instruction memory holds 512 words, the value returns to 0 whenever the
// next value would reach 512, or on reset.
//
// Interface: Sin 00 = +1, 10 = +Imm, 01 = +Rd, 11 = +0 (the codes for
// +1 and +Imm follow the document; the other two are this design's choice).
// Imm is a 23-bit two's-complement offset (the document lists 23 bits but not
// its sign; signed is chosen so that jumps can go backwards).
// Timing: PC updates on the rising clock edge (the document uses the falling
// edge to fit fetch into one cycle; this design uses one edge throughout),
// synchronous active-high reset.
module program_counter
  import plx_pkg::*;
#(
  parameter int unsigned WIDTH   = 64,
  parameter int unsigned IMEM_WORDS = 512
) (
  input  logic             clk,
  input  logic             res,
  input  logic             stall,
  input  logic [1:0]       Sin,
  input  logic [22:0]      Imm,
  input  logic [WIDTH-1:0] Rd,
  output logic [WIDTH-1:0] PC
);
  logic [WIDTH-1:0] incr, next;

  always_comb begin
    if (stall) incr = '0;
    else begin
      unique case (pc_sel_e'(Sin))
        PC_INC:  incr = WIDTH'(1);
        PC_IMM:  incr = {{(WIDTH-23){Imm[22]}}, Imm};
        PC_RD:   incr = Rd;
        default: incr = '0;
      endcase
    end
    next = PC + incr;
  end

  always_ff @(posedge clk) begin
    if (res || next >= WIDTH'(IMEM_WORDS)) PC <= '0;
    else                                    PC <= next;
  end
endmodule
