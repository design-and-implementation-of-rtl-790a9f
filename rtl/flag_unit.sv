// flag_unit: registered status flags of the processor.
//
// Each flag is captured at the clock edge from the stage that detects it and
// is high for exactly one cycle per event: illegal (an undefined opcode
// reached the end of stage 2), trap (trap instruction, or test bit found the
// bit set, in stage 3), ALU_OU (per-byte overflow of the stage-3 ALU) and
// FPU_OU ({underflow, overflow} of the FPU, valid with its done).
// The document lists these flags as processor outputs; registering them for
// one cycle is this design's choice.
module flag_unit (
  input  logic       clk,
  input  logic       reset,
  input  logic       illegal_in,
  input  logic       trap_in,
  input  logic [7:0] alu_ou_in,
  input  logic [1:0] fpu_ou_in,
  output logic       illegal,
  output logic       trap,
  output logic [7:0] ALU_OU,
  output logic [1:0] FPU_OU
);
  always_ff @(posedge clk) begin
    if (reset) begin
      illegal <= 1'b0;
      trap    <= 1'b0;
      ALU_OU  <= '0;
      FPU_OU  <= '0;
    end else begin
      illegal <= illegal_in;
      trap    <= trap_in;
      ALU_OU  <= alu_ou_in;
      FPU_OU  <= fpu_ou_in;
    end
  end
endmodule
