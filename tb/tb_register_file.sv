// tb_register_file: self-checking test of the 32 x 64 register file.
// Random reads and writes on both ports against a model: reset clears all
// registers, R0 always reads 0, a write lands at the clock edge, a read of
// the register being written in the same cycle returns the new value
// (write-through), and port 2 wins when both ports write the same register.
module tb_register_file;
  logic        clk = 0, reset = 1;
  logic [4:0]  Rs1_read_addr = 0, Rs2_read_addr = 0, Rs1_write_addr = 0, Rs2_write_addr = 0;
  logic [63:0] Rs1_data_write = 0, Rs2_data_write = 0, Rs1_data_read, Rs2_data_read;
  logic        write_enable_1 = 0, write_enable_2 = 0;
  logic [63:0] model [32];
  int checks = 0, failures = 0;

  register_file dut (.*);
  always #5 clk = !clk;
  initial begin #10_000_000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  function automatic logic [63:0] expect_rd(input logic [4:0] a);
    if (a == 0) return 0;
    if (write_enable_2 && Rs2_write_addr == a) return Rs2_data_write;
    if (write_enable_1 && Rs1_write_addr == a) return Rs1_data_write;
    return model[a];
  endfunction

  initial begin
    for (int i = 0; i < 32; i++) model[i] = 0;
    @(posedge clk); #1 reset = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      Rs1_read_addr = 5'($urandom); Rs2_read_addr = 5'($urandom);
      Rs1_write_addr = 5'($urandom % 8); Rs2_write_addr = 5'($urandom % 8);
      Rs1_data_write = {$urandom, $urandom}; Rs2_data_write = {$urandom, $urandom};
      write_enable_1 = 1'($urandom); write_enable_2 = 1'($urandom);
      if (n % 3 == 0) Rs1_read_addr = Rs2_write_addr;
      #1;
      checks += 2;
      if (Rs1_data_read !== expect_rd(Rs1_read_addr)) begin failures++; $display("FAIL port1 addr %0d", Rs1_read_addr); end
      if (Rs2_data_read !== expect_rd(Rs2_read_addr)) begin failures++; $display("FAIL port2 addr %0d", Rs2_read_addr); end
      @(posedge clk);
      if (write_enable_1 && Rs1_write_addr != 0) model[Rs1_write_addr] = Rs1_data_write;
      if (write_enable_2 && Rs2_write_addr != 0) model[Rs2_write_addr] = Rs2_data_write;
    end
    // reset clears
    @(negedge clk); write_enable_1 = 0; write_enable_2 = 0; reset = 1;
    @(negedge clk); reset = 0;
    for (int i = 0; i < 32; i++) begin
      Rs1_read_addr = 5'(i); #1; checks++;
      if (Rs1_data_read !== 0) begin failures++; $display("FAIL reset R%0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
