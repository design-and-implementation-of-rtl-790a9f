// tb_predicate_file: self-checking test of the predicate register file.
// Random compare writes (Pd1 = outcome, Pd2 = complement) and changepr set
// switches against a model of 16 sets of 8 predicates; both read ports are
// checked every cycle, P0 must always read 1, and writes take effect at the
// clock edge.
module tb_predicate_file;
  import plx_pkg::*;
  logic       clk = 0, reset = 1, we = 0, tf = 0;
  pred_op_e   op = PR_NULL;
  logic [2:0] pd1_addr = 0, pd2_addr = 0, rd_addr_a = 0, rd_addr_b = 0;
  logic [3:0] imm4 = 0, active_idx;
  logic       pred_a, pred_b;
  logic [7:0] active_set;
  logic [7:0] model [16];
  int cur = 0;
  int checks = 0, failures = 0;

  predicate_file dut (.*);
  always #5 clk = !clk;
  initial begin #10_000_000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    for (int i = 0; i < 16; i++) model[i] = 0;
    @(posedge clk); #1 reset = 0;
    for (int n = 0; n < 4000; n++) begin
      logic [7:0] s;
      @(negedge clk);
      we = 1'($urandom); tf = 1'($urandom);
      op = ($urandom % 5 == 0) ? PR_CHANGE : ($urandom % 6 == 0) ? PR_NULL : PR_CMP;
      pd1_addr = 3'($urandom); pd2_addr = 3'($urandom); imm4 = 4'($urandom);
      rd_addr_a = 3'($urandom); rd_addr_b = 3'($urandom);
      #1;
      s = model[cur]; s[0] = 1'b1;
      checks += 3;
      if (pred_a !== s[rd_addr_a]) begin failures++; $display("FAIL port A n=%0d", n); end
      if (pred_b !== s[rd_addr_b]) begin failures++; $display("FAIL port B n=%0d", n); end
      if (active_idx !== 4'(cur)) begin failures++; $display("FAIL active set index"); end
      @(posedge clk);
      if (we && op == PR_CMP) begin model[cur][pd1_addr] = tf; model[cur][pd2_addr] = !tf; end
      if (we && op == PR_CHANGE) cur = imm4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
