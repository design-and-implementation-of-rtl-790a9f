// tb_alu: self-checking test of the stage-3 ALU.
//
// Random operands for every operation class (padd/psub with modular,
// signed-saturating and unsigned-saturating forms at all four subword sizes,
// add-increment, subtract-decrement, averages, logic ops, 64-bit compares,
// parallel compares, max/min, test bit, address addition) are checked
// against a lane-by-lane reference model written with wide integers. The
// number of cycles until done is checked against the document's counts:
// 1 for most operations, 2 for subtraction and add-with-increment, 3 for
// subtract-with-decrement.
module tb_alu;
  logic        clk = 0, reset = 1, enable = 0;
  logic [19:0] S;
  logic [63:0] Rs1, Rs2, Rd;
  logic        trap, T_F, done;
  logic [7:0]  OVF;
  int checks = 0, failures = 0;

  alu dut (.*);
  always #5 clk = !clk;
  initial begin #50_000_000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  function automatic int unsigned nbytes(input logic [1:0] c);
    return c == 2'b11 ? 1 : c == 2'b10 ? 2 : c == 2'b01 ? 4 : 8;
  endfunction

  // reference for the adder path; returns result and per-byte overflow
  task automatic ref_add(input logic [19:0] s, input logic [63:0] a, input logic [63:0] b,
                         output logic [63:0] r, output logic [7:0] ov);
    int unsigned nb, w;
    r = '0; ov = '0;
    nb = s[15] ? 8 : nbytes(s[1:0]);
    w = 8 * nb;
    for (int l = 0; l < 8 / nb; l++) begin
      logic [66:0] x, y, z, mx, smax, smin;
      logic signed [66:0] sx, sy, sz;
      logic uo, so;
      mx = (67'(1) << w) - 1;
      x = (67'(a) >> (w*l)) & mx;
      y = (67'(b) >> (w*l)) & mx;
      sx = x[w-1 +: 1] ? $signed(x | ~mx) : $signed(x);
      sy = y[w-1 +: 1] ? $signed(y | ~mx) : $signed(y);
      if (s[15]) begin
        z = x + y;
      end else if (s[5]) begin
        z  = x - y - (s[4] ? 1 : 0);
        sz = sx - sy - (s[4] ? 1 : 0);
      end else begin
        z  = x + y + (s[4] ? 1 : 0);
        sz = sx + sy + (s[4] ? 1 : 0);
      end
      uo = s[5] ? $signed(z) < 0 : (z > mx);
      smax = mx >> 1;
      so = sz > $signed(smax) || sz < -$signed(smax) - 1;
      if (!s[15]) begin
        if (s[6]) begin
          // average: (w+1)-bit sum / difference shifted right by one
          z = (z >> 1) & mx;
        end else if (s[2]) begin
          ov[nb*(l+1)-1] = so;
        end else if (s[3]) begin
          ov[nb*(l+1)-1] = so;
          if (sz > $signed(smax)) z = smax;
          else if (sz < -$signed(smax) - 1) z = smax + 1;
        end else begin
          ov[nb*(l+1)-1] = uo;
          if (uo) z = s[5] ? 0 : mx;
        end
      end
      r |= 64'((z & mx) << (w*l));
    end
  endtask

  function automatic logic cmp_ref(input logic [3:0] c, input logic [63:0] a, input logic [63:0] b);
    case (c)
      0: return a == b;  1: return a != b;
      2: return $signed(a) < $signed(b);  3: return $signed(a) <= $signed(b);
      4: return $signed(a) > $signed(b);  5: return $signed(a) >= $signed(b);
      6: return a < b;  7: return a <= b;  8: return a > b;  9: return a >= b;
      default: return 0;
    endcase
  endfunction

  function automatic logic [63:0] pcmp_ref(input logic [1:0] m, input logic [1:0] sz,
                                           input logic [63:0] a, input logic [63:0] b);
    logic [63:0] r;
    int unsigned w;
    w = 8 * nbytes(sz);
    r = '0;
    for (int l = 0; l < 64 / w; l++) begin
      logic [63:0] x, y, mx;
      logic signed [64:0] sx, sy;
      logic gt, pick;
      mx = (w == 64) ? '1 : (64'(1) << w) - 1;
      x = (a >> (w*l)) & mx;
      y = (b >> (w*l)) & mx;
      sx = x[w-1] ? $signed({1'b1, x | ~mx}) : $signed({1'b0, x});
      sy = y[w-1] ? $signed({1'b1, y | ~mx}) : $signed({1'b0, y});
      gt = sx > sy;
      case (m)
        2'b01: pick = x == y;
        2'b00: pick = gt;
        2'b11: pick = (w == 8) ? x > y : gt;
        default: pick = (w == 8) ? !(x > y) : !gt;
      endcase
      if (m[1]) r |= (pick ? x : y) << (w*l);
      else      r |= (pick ? mx : 64'd0) << (w*l);
    end
    return r;
  endfunction

  task automatic run(input logic [19:0] s, input logic [63:0] a, input logic [63:0] b,
                     input int exp_cyc, output int cyc);
    @(negedge clk);
    S = s; Rs1 = a; Rs2 = b; enable = 1; cyc = 1;
    #1;
    while (!done && cyc < 10) begin @(negedge clk); cyc++; end
  endtask

  function automatic logic [63:0] rnd64();
    logic [63:0] v;
    v = {$urandom, $urandom};
    case ($urandom % 6)
      0: v = '0;
      1: v = '1;
      2: v = {8{8'h7f}};
      3: v = {8{8'h80}};
      default: ;
    endcase
    return v;
  endfunction

  initial begin
    int cyc;
    logic [63:0] a, b, er;
    logic [7:0]  eo;
    logic [19:0] s;
    S = '0; Rs1 = '0; Rs2 = '0;
    repeat (2) @(posedge clk);
    reset = 0;
    for (int n = 0; n < 4000; n++) begin
      int kind, exp;
      a = rnd64(); b = rnd64();
      kind = $urandom % 6;
      s = 20'h20000;
      case (kind)
        0: begin // adder ops
          s[1:0] = 2'($urandom);
          s[3:2] = 2'($urandom % 3);       // 00 unsigned sat, 01 modular, 10 signed sat
          s[5] = 1'($urandom); s[4] = 1'($urandom);
          ref_add(s, a, b, er, eo);
          exp = 1 + s[5] + s[4];
          run(s, a, b, exp, cyc);
          checks += 3;
          if (Rd !== er || OVF !== eo) begin failures++; $display("FAIL add S=%h a=%h b=%h got %h/%h exp %h/%h", s, a, b, Rd, OVF, er, eo); end
          if (cyc != exp) begin failures++; $display("FAIL cycles S=%h got %0d exp %0d", s, cyc, exp); end
          if (T_F !== 0) failures++;
        end
        1: begin // averages
          s[1:0] = 2'($urandom); s[6] = 1; s[5] = 1'($urandom); s[4] = s[5] ? 0 : 1'($urandom);
          ref_add(s, a, b, er, eo);
          run(s, a, b, 1, cyc);
          checks += 2;
          if (Rd !== er || OVF !== 0) begin failures++; $display("FAIL avg S=%h a=%h b=%h got %h exp %h", s, a, b, Rd, er); end
          if (cyc != 1) begin failures++; $display("FAIL avg cycles %0d", cyc); end
        end
        2: begin // logic
          logic [2:0] op;
          op = 3'($urandom % 5);
          if (op == 3'b010) op = 3'b101;
          s[16] = 1; s[14:12] = op;
          case (op)
            3'b000: er = a & b;  3'b001: er = a & ~b;  3'b011: er = ~a;
            3'b100: er = a | b;  default: er = a ^ b;
          endcase
          run(s, a, b, 1, cyc);
          checks += 2;
          if (Rd !== er) begin failures++; $display("FAIL logic op=%b got %h exp %h", op, Rd, er); end
          if (cyc != 1) failures++;
        end
        3: begin // cmp
          s[16] = 1; s[14:12] = 3'b010; s[10:7] = 4'($urandom % 10);
          if ($urandom % 4 == 0) b = a;
          run(s, a, b, 1, cyc);
          checks += 2;
          if (T_F !== cmp_ref(s[10:7], a, b)) begin failures++; $display("FAIL cmp c=%0d a=%h b=%h", s[10:7], a, b); end
          if (cyc != 1) failures++;
        end
        4: begin // pcmp / pmax / pmin
          s[16] = 1; s[14:12] = 3'b010; s[11] = 1; s[8:7] = 2'($urandom); s[1:0] = 2'($urandom % 3 + 1);
          if ($urandom % 3 == 0) b = {a[63:32], b[31:0]};
          run(s, a, b, 1, cyc);
          er = pcmp_ref(s[8:7], s[1:0], a, b);
          checks++;
          if (Rd !== er) begin failures++; $display("FAIL pcmp m=%b sz=%b a=%h b=%h got %h exp %h", s[8:7], s[1:0], a, b, Rd, er); end
        end
        default: begin // test bit and address add
          if ($urandom % 2) begin
            s = 20'b0100_0000_0000_0000_0000;
            b = 64'($urandom % 64);
            run(s, a, b, 1, cyc);
            checks += 2;
            if (T_F !== a[b[5:0]] || trap !== a[b[5:0]]) begin failures++; $display("FAIL testbit"); end
            if (cyc != 1) failures++;
          end else begin
            s = 20'b0010_1000_0000_0000_0000 | 20'(($urandom % 4));
            run(s, a, b, 1, cyc);
            checks += 2;
            if (Rd !== a + b) begin failures++; $display("FAIL address add"); end
            if (cyc != 1) failures++;
          end
        end
      endcase
      @(negedge clk); enable = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
