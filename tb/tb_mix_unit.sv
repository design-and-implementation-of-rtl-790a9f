// tb_mix_unit: self-checking test of the mix / mux / permute unit.
// Random operands for each operation are compared with a byte-level
// reference written directly from the operation definitions (mix.l/mix.r at
// 1, 2 and 4 bytes, mux rev/mix/shuf/alt/brcst, permute). Combinational:
// results are checked in the cycle the operands are applied.
module tb_mix_unit;
  logic [63:0] Rs1, Rs2, Rd;
  logic [4:0]  S;
  logic        enable;
  int checks = 0, failures = 0;

  mix_unit dut (.*);
  initial begin #10_000_000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  function automatic logic [63:0] by_order(input logic [63:0] a, input int o[8]);
    // o[0] is the source of the most significant result byte
    logic [63:0] r;
    for (int k = 0; k < 8; k++) r[8*(7-k) +: 8] = a[8*o[k] +: 8];
    return r;
  endfunction

  initial begin
    logic [63:0] e;
    int o_rev[8]  = '{0,1,2,3,4,5,6,7};
    int o_mix[8]  = '{7,3,5,1,6,2,4,0};
    int o_shuf[8] = '{7,3,6,2,5,1,4,0};
    int o_alt[8]  = '{7,5,3,1,6,4,2,0};
    for (int n = 0; n < 2000; n++) begin
      int kind;
      Rs1 = {$urandom, $urandom}; Rs2 = {$urandom, $urandom};
      enable = 1;
      kind = $urandom % 9;
      case (kind)
        0, 1, 2: begin
          int w;
          logic right;
          right = 1'($urandom);
          S = {2'b00, right, kind == 0 ? 2'b11 : kind == 1 ? 2'b10 : 2'b01};
          w = kind == 0 ? 8 : kind == 1 ? 16 : 32;
          for (int j = 0; j < 64 / (2*w); j++) begin
            int src;
            src = right ? 2*j : 2*j + 1;
            e[w*(2*j+1) +: 32] = 32'(Rs1 >> (w*src));
            e[w*(2*j)   +: 32] = 32'(Rs2 >> (w*src));
          end
          for (int j = 0; j < 64 / (2*w); j++) begin
            int src;
            logic [31:0] x, y;
            src = right ? 2*j : 2*j + 1;
            x = 32'(Rs1 >> (w*src)); y = 32'(Rs2 >> (w*src));
            for (int b = 0; b < w; b++) begin
              e[w*(2*j+1) + b] = x[b];
              e[w*(2*j) + b]   = y[b];
            end
          end
        end
        3: begin S = 5'b01000; e = by_order(Rs1, o_rev); end
        4: begin S = 5'b01100; e = by_order(Rs1, o_mix); end
        5: begin S = 5'b10000; e = by_order(Rs1, o_shuf); end
        6: begin S = 5'b10100; e = by_order(Rs1, o_alt); end
        7: begin
          S = $urandom % 2 ? 5'b11011 : 5'b11010;
          e = S[0] ? {8{Rs1[7:0]}} : {4{Rs1[15:0]}};
        end
        default: begin
          S = 5'b11100;
          Rs2 = 64'($urandom % 256);
          for (int i = 0; i < 4; i++) e[16*i +: 16] = Rs1[16*Rs2[2*i +: 2] +: 16];
        end
      endcase
      #1;
      checks++;
      if (Rd !== e) begin failures++; $display("FAIL S=%b a=%h b=%h got %h exp %h", S, Rs1, Rs2, Rd, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
