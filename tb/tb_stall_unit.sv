// tb_stall_unit: self-checking test of the stall and flush control.
// Checks that an instruction with an issue gap g keeps the front end held
// for exactly g cycles after it issues (so cmp takes 3 cycles and loadi 5),
// that a busy stage 3 or init freezes everything without consuming the
// hold count, and that a taken jump flushes only when it issues.
module tb_stall_unit;
  logic       clk = 0, reset = 1, init = 0, s3_busy = 0, id_valid = 0, jmp_taken = 0;
  logic [2:0] id_gap = 0;
  logic       freeze, hold, issue, flush;
  int checks = 0, failures = 0;

  stall_unit dut (.*);
  always #5 clk = !clk;
  initial begin #10_000_000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // issue one instruction with gap g; return cycles until the next issue
  task automatic issue_time(input int g, output int cyc);
    @(negedge clk);
    id_valid = 1; id_gap = 3'(g);
    chk("issues", issue);
    cyc = 1;
    @(negedge clk);
    id_gap = 0;
    while (!issue) begin cyc++; @(negedge clk); end
  endtask

  initial begin
    int c;
    @(posedge clk); #1 reset = 0;
    for (int g = 0; g <= 4; g++) begin
      issue_time(g, c);
      chk($sformatf("gap %0d takes %0d cycles", g, c), c == g + 1);
    end
    // busy freezes and keeps the hold count
    @(negedge clk); id_valid = 1; id_gap = 4;
    @(negedge clk); id_gap = 0; s3_busy = 1; #1;
    chk("freeze while busy", freeze && !hold && !issue);
    repeat (5) @(negedge clk);
    s3_busy = 0; #1;
    c = 0;
    while (!issue) begin c++; @(negedge clk); #1; end
    chk("hold resumes after busy", c == 4);
    // init freezes
    @(negedge clk); init = 1; #1;
    chk("freeze during init", freeze && !issue);
    @(negedge clk); init = 0;
    // flush only on an issuing jump
    @(negedge clk); jmp_taken = 1; id_gap = 0; #1;
    chk("flush on taken jump", flush);
    s3_busy = 1; #1;
    chk("no flush while frozen", !flush);
    s3_busy = 0; jmp_taken = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
