// tb_data_memory: self-checking test of the data memory.
// Power-up contents read zero. Random writes with random byte enables are
// applied against a byte-level model; reads are combinational and must
// return the model word in the same cycle; a write takes effect at the
// clock edge only in the enabled bytes.
module tb_data_memory;
  logic        clka = 0;
  logic [7:0]  wea = 0;
  logic [9:0]  addr = 0;
  logic [63:0] dina = 0, dout;
  logic [63:0] model [1024];
  int checks = 0, failures = 0;

  data_memory dut (.*);
  always #5 clka = !clka;
  initial begin #10_000_000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    for (int i = 0; i < 1024; i++) model[i] = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clka);
      addr = 10'($urandom % 64); dina = {$urandom, $urandom};
      wea = ($urandom % 3 == 0) ? 8'h00 : 8'($urandom);
      #1; checks++;
      if (dout !== model[addr]) begin failures++; $display("FAIL read %0d got %h exp %h", addr, dout, model[addr]); end
      @(posedge clka);
      for (int b = 0; b < 8; b++) if (wea[b]) model[addr][8*b +: 8] = dina[8*b +: 8];
      #1; checks++;
      if (dout !== model[addr]) begin failures++; $display("FAIL after write %0d got %h exp %h", addr, dout, model[addr]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
