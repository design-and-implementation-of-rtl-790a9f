// tb_register_input: self-checking test of the stage-5 register input unit.
// Random values for loadi (each subword k), extract and deposit (random
// position and length, length 0 meaning 64) and pass-through are compared
// with a bit-by-bit reference. Combinational.
module tb_register_input;
  import plx_pkg::*;
  reg_input_e  mode;
  logic [1:0]  k;
  logic [15:0] imm16;
  logic [5:0]  pos, len;
  logic [63:0] rs1, rd_old, result, rd_new;
  int checks = 0, failures = 0;

  register_input dut (.*);
  initial begin #10_000_000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [63:0] e;
      int L;
      mode = reg_input_e'($urandom % 4);
      k = 2'($urandom); imm16 = 16'($urandom);
      pos = 6'($urandom); len = 6'($urandom);
      rs1 = {$urandom, $urandom}; rd_old = {$urandom, $urandom}; result = {$urandom, $urandom};
      L = len == 0 ? 64 : len;
      e = rd_old;
      case (mode)
        RI_LOADI: for (int b = 0; b < 16; b++) e[16*k + b] = imm16[b];
        RI_EXTRACT: for (int b = 0; b < L; b++) e[b] = (pos + b < 64) ? rs1[pos + b] : 1'b0;
        RI_DEPOSIT: for (int b = 0; b < L; b++) if (pos + b < 64) e[pos + b] = rs1[b];
        default: e = result;
      endcase
      #1; checks++;
      if (rd_new !== e) begin failures++; $display("FAIL mode %0d pos %0d len %0d got %h exp %h", mode, pos, len, rd_new, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
