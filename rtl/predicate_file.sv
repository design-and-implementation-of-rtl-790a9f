// predicate_file: the PLX predicate registers.
//
// Sixteen sets of eight 1-bit predicates P0..P7; one set is active at a time
// and is chosen by software (changepr). P0 always reads 1, so an
// instruction predicated on P0 always executes (document, sections 2.1.3
// and 2.5.5). Two read ports return the predicate of an instruction: port A
// serves stage 3 (the document's predicate multiplexer), port B the jump
// in stage 2. A compare or test-bit instruction writes its outcome to Pd1 and
// the complement to Pd2 in the active set; changepr loads the active-set
// number from a 4-bit immediate. Writes happen on the rising edge when we is
// high. Reset selects set 0 and clears all predicates (P0 still reads 1);
// the reset values are this design's choice.
module predicate_file
  import plx_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       we,
  input  pred_op_e   op,
  input  logic [2:0] pd1_addr,
  input  logic [2:0] pd2_addr,
  input  logic       tf,
  input  logic [3:0] imm4,
  input  logic [2:0] rd_addr_a,
  input  logic [2:0] rd_addr_b,
  output logic       pred_a,
  output logic       pred_b,
  output logic [7:0] active_set,
  output logic [3:0] active_idx
);
  logic [7:0] sets [16];
  logic [3:0] cur;

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < 16; i++) sets[i] <= '0;
      cur <= '0;
    end else if (we) begin
      unique case (op)
        PR_CMP: begin
          sets[cur][pd1_addr] <= tf;
          sets[cur][pd2_addr] <= !tf;
        end
        PR_CHANGE: cur <= imm4;
        default: ;
      endcase
    end
  end

  assign active_set = {sets[cur][7:1], 1'b1};
  assign active_idx = cur;
  assign pred_a     = active_set[rd_addr_a];
  assign pred_b     = active_set[rd_addr_b];
endmodule
