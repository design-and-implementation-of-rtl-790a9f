// tb_bypass_unit: self-checking test of the forwarding selects.
// Random register addresses and write flags for stages 3, 4 and 5 (with a
// bias toward matches) against the rule: R0 is never forwarded, otherwise
// the nearest writing stage that matches wins (3, then 4, then 5), else the
// register file. Combinational.
module tb_bypass_unit;
  logic [4:0] rs_a, rs_b, s3_rd, s4_rd, s5_rd;
  logic       s3_we, s4_we, s5_we;
  logic [1:0] sel_a, sel_b;
  int checks = 0, failures = 0;

  bypass_unit dut (.*);
  initial begin #10_000_000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  function automatic logic [1:0] want(input logic [4:0] a);
    if (a == 0) return 0;
    if (s3_we && s3_rd == a) return 1;
    if (s4_we && s4_rd == a) return 2;
    if (s5_we && s5_rd == a) return 3;
    return 0;
  endfunction

  initial begin
    for (int n = 0; n < 5000; n++) begin
      rs_a = 5'($urandom % 4); rs_b = 5'($urandom % 4);
      s3_rd = 5'($urandom % 4); s4_rd = 5'($urandom % 4); s5_rd = 5'($urandom % 4);
      s3_we = 1'($urandom); s4_we = 1'($urandom); s5_we = 1'($urandom);
      #1; checks += 2;
      if (sel_a !== want(rs_a)) begin failures++; $display("FAIL a"); end
      if (sel_b !== want(rs_b)) begin failures++; $display("FAIL b"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
