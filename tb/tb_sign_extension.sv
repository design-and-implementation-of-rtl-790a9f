// tb_sign_extension: exhaustive test of the sign-extension unit.
// Every 13-bit immediate in all three modes (zero, sign and one
// extension) is compared with the expected 64-bit value. Combinational.
module tb_sign_extension;
  import plx_pkg::*;
  logic [12:0] imm;
  sext_mode_e  mode;
  logic [63:0] ext;
  int checks = 0, failures = 0;

  sign_extension dut (.*);
  initial begin #10_000_000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    for (int m = 0; m < 3; m++)
      for (int i = 0; i < 8192; i++) begin
        logic [63:0] e;
        imm = 13'(i); mode = sext_mode_e'(m);
        #1;
        case (m)
          0: e = 64'(i);
          1: e = 64'($signed(imm));
          default: e = {51'h7FFFFFFFFFFFF, imm};
        endcase
        checks++;
        if (ext !== e) begin failures++; $display("FAIL mode %0d imm %h got %h", m, imm, ext); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
