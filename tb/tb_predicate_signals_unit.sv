// tb_predicate_signals_unit: exhaustive self-checking test of the
// predicate signals unit.
// Every combination of the nine 1-bit inputs and the three predicate-file
// operations is applied and the four outputs are compared with a
// reference model written out separately below: an instruction executes
// only with a true predicate, it is busy while an enabled multicycle unit
// has not finished, the predicate file is written only in its final cycle
// and only for predicate operations, and a stage-2 jump is taken only when
// its predicate is true. Each combination is applied twice, in order and
// then in a random order, so the check count is 2 x 3 x 512.
module tb_predicate_signals_unit;
  import plx_pkg::*;
  logic     s3_valid = 0, pred_a = 0, s3_alu_en = 0, alu_done = 0;
  logic     s3_fpu_en = 0, fpu_done = 0, id_valid = 0, id_is_jmp = 0, pred_b = 0;
  pred_op_e s3_pred_op = PR_NULL;
  logic     s3_act, s3_busy, pf_we, jmp_taken;
  int checks = 0, failures = 0;

  predicate_signals_unit dut (.*);
  initial begin #10_000_000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic apply(input logic [8:0] v, input logic [1:0] p);
    logic act, busy, we, jt;
    {s3_valid, pred_a, s3_alu_en, alu_done, s3_fpu_en, fpu_done, id_valid, id_is_jmp, pred_b} = v;
    s3_pred_op = (p == 0) ? PR_NULL : (p == 1) ? PR_CMP : PR_CHANGE;
    #1;
    act  = v[8] & v[7];
    busy = 1'b0;
    if (act && v[6] && !v[5]) busy = 1'b1;
    if (act && v[4] && !v[3]) busy = 1'b1;
    we   = act && !busy && p != 0;
    jt   = v[2] & v[1] & v[0];
    checks++;
    if (s3_act != act || s3_busy != busy || pf_we != we || jmp_taken != jt) begin
      failures++;
      if (failures < 10)
        $display("FAIL v=%b p=%0d got %b%b%b%b want %b%b%b%b", v, p,
                 s3_act, s3_busy, pf_we, jmp_taken, act, busy, we, jt);
    end
  endtask

  initial begin
    for (int p = 0; p < 3; p++)
      for (int v = 0; v < 512; v++) apply(9'(v), 2'(p));
    for (int n = 0; n < 3 * 512; n++) apply(9'($urandom), 2'($urandom_range(0, 2)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
