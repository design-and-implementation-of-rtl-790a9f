// tb_multiplexers_unit: exhaustive self-checking test of the multiplexers
// unit. All 2 x 2 x 4 x 2 x 2 input combinations are applied, then 2000
// random ones; m1_sel and m5_sel must follow the decoded selects and the
// program counter source must be the decoded one only for a jump that is
// taken and issues, PC_INC otherwise.
module tb_multiplexers_unit;
  import plx_pkg::*;
  logic    rd2_is_rd = 0, b_is_imm = 0, jmp_taken = 0, issue = 0;
  pc_sel_e pc_sel = PC_INC;
  logic    m1_sel, m5_sel;
  pc_sel_e pc_sin;
  int checks = 0, failures = 0;

  multiplexers_unit dut (.*);
  initial begin #10_000_000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic apply(input logic [5:0] v);
    pc_sel_e want;
    {rd2_is_rd, b_is_imm, jmp_taken, issue} = v[5:2];
    pc_sel = pc_sel_e'(v[1:0]);
    #1;
    want = (v[3] && v[2]) ? pc_sel_e'(v[1:0]) : PC_INC;
    checks++;
    if (m1_sel != v[5] || m5_sel != v[4] || pc_sin != want) begin
      failures++;
      if (failures < 10) $display("FAIL v=%b got %b %b %0d", v, m1_sel, m5_sel, pc_sin);
    end
  endtask

  initial begin
    for (int v = 0; v < 64; v++) apply(6'(v));
    for (int n = 0; n < 2000; n++) apply(6'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
