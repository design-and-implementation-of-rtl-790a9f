// tb_shifter: self-checking test of the shifter.
// Random operands for pshift / pshifti (left, right, right arithmetic at
// 2, 4 and 8 bytes, by register or immediate amount), pshiftadd (1..3,
// left and right, with 16-bit signed saturation), shrp, slli, srai and srli
// are compared with per-lane integer arithmetic in the testbench.
// Combinational: checked in the cycle the operands are applied.
module tb_shifter;
  logic [63:0] Rs1, Rs2, Rd;
  logic [7:0]  S;
  logic [12:0] Imm;
  logic        enable;
  int checks = 0, failures = 0;

  shifter dut (.*);
  initial begin #10_000_000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    logic [63:0] e;
    for (int n = 0; n < 3000; n++) begin
      int kind, amt;
      Rs1 = {$urandom, $urandom}; Rs2 = {$urandom, $urandom};
      Imm = 13'($urandom);
      enable = 1;
      kind = $urandom % 6;
      amt = Imm[5:0];
      case (kind)
        0: begin // pshift / pshifti
          int w;
          logic imm_amt, right, arith;
          imm_amt = 1'($urandom); right = 1'($urandom); arith = right & 1'($urandom);
          S = {3'b000, imm_amt, arith, right, 2'($urandom % 3)};
          w = S[1:0] == 2'b10 ? 16 : S[1:0] == 2'b01 ? 32 : 64;
          if (!imm_amt) begin
            Rs2 = 64'($urandom % 80);
            amt = Rs2;
          end
          for (int l = 0; l < 64 / w; l++) begin
            logic signed [127:0] x;
            logic [127:0] u, r;
            u = 128'(Rs1 >> (w*l)) & ((128'(1) << w) - 1);
            x = (arith && u[w-1]) ? $signed(u | ~((128'(1) << w) - 1)) : $signed(u);
            if (!right) r = u << amt;
            else        r = 128'(x >>> amt);
            for (int b = 0; b < w; b++) e[w*l + b] = (amt >= w && !(right && arith)) ? 1'b0 : r[b];
          end
        end
        1: begin // pshiftadd
          int sh;
          logic right;
          sh = 1 + $urandom % 3; right = 1'($urandom);
          S = {1'b0, 2'(sh), 2'b00, right, 2'b00};
          for (int l = 0; l < 4; l++) begin
            int a, b, v;
            a = $signed(Rs1[16*l +: 16]); b = $signed(Rs2[16*l +: 16]);
            v = right ? (a >>> sh) : (a <<< sh);
            if (v > 32767) v = 32767; else if (v < -32768) v = -32768;
            v = v + b;
            if (v > 32767) v = 32767; else if (v < -32768) v = -32768;
            e[16*l +: 16] = 16'(v);
          end
        end
        2: begin S = 8'b1000_0000; e = 64'({Rs1, Rs2} >> amt); end
        3: begin S = 8'b1010_0000; e = Rs1 << amt; end
        4: begin S = 8'b1100_0000; e = $signed(Rs1) >>> amt; end
        default: begin S = 8'b1110_0000; e = Rs1 >> amt; end
      endcase
      #1;
      checks++;
      if (Rd !== e) begin failures++; $display("FAIL S=%b a=%h b=%h imm=%0d got %h exp %h", S, Rs1, Rs2, Imm[5:0], Rd, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
