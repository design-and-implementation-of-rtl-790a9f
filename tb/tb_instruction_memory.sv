// tb_instruction_memory: self-checking test of the instruction memory.
// Power-up contents read zero. The initialisation port writes one word per
// clock (all 512 addresses, random data); the asynchronous read port must
// return the stored word in the same cycle the address is applied, and a
// read with wea low must not change the contents.
module tb_instruction_memory;
  logic        clka = 0, wea = 0;
  logic [8:0]  addra = 0;
  logic [31:0] dina = 0, douta;
  logic [31:0] model [512];
  int checks = 0, failures = 0;

  instruction_memory dut (.*);
  always #5 clka = !clka;
  initial begin #10_000_000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    #1;
    for (int i = 0; i < 512; i += 37) begin
      addra = 9'(i); #1; checks++;
      if (douta !== 0) begin failures++; $display("FAIL power-up %0d", i); end
    end
    // one word per clock
    wea = 1;
    for (int i = 0; i < 512; i++) begin
      @(negedge clka);
      addra = 9'(i); dina = $urandom; model[i] = dina;
    end
    @(negedge clka); wea = 0;
    for (int n = 0; n < 2000; n++) begin
      addra = 9'($urandom); dina = $urandom;
      #1; checks++;
      if (douta !== model[addra]) begin failures++; $display("FAIL read %0d got %h exp %h", addra, douta, model[addra]); end
      @(negedge clka);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
