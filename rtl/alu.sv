// alu: arithmetic/logic unit of stage 3 of the PLX processor.
//
// The adder is a chain of eight 1-byte adders (document, section 2.5.1).
// Each byte adder reports, besides its carry out, the carry into its top bit,
// so that signed overflow of a subword is the XOR of the two. The carry
// between bytes is cut at subword boundaries, giving eight 8-bit, four
// 16-bit, two 32-bit or one 64-bit addition from the same hardware. Around
// the adder sit saturation (signed or unsigned), averaging (the carry out
// becomes the new top bit before a one-bit right shift), a logic unit
// (and, andcm, or, xor, not), a 64-bit comparator for cmp/cmpi, a subword
// comparator for pcmp/pmax/pmin, the test-bit logic and the load/store
// address adder.
//
// Interface: S is the 20-bit control word whose bit assignment is the
// document's ALU signal table (see plx_pkg). Rd is the result, T_F the
// compare / test-bit outcome, trap is raised by test bit, OVF has one bit per
// byte adder and is set at the top byte of each subword that overflowed.
//
// Timing: the result is computed combinationally in one pass. The document's
// ALU reuses its adder over several cycles (negate, then add, then decrement);
// this design keeps the document's cycle counts instead through a step
// counter: while enable is high, done rises in the last cycle of the
// operation: 1 cycle for most operations, 2 for subtraction and for
// add-with-increment, 3 for subtract-with-decrement. Subtraction uses
// Rs1 + ~Rs2 + 1 in a single pass (the document's formula "n = ~b - 1"
// is read as the usual two's complement negation).
module alu
  import plx_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        enable,
  input  logic [19:0] S,
  input  logic [63:0] Rs1,
  input  logic [63:0] Rs2,
  output logic [63:0] Rd,
  output logic        trap,
  output logic [7:0]  OVF,
  output logic        T_F,
  output logic        done
);
  // ------------------------------------------------------------ decode S
  logic       sub, incr, avg, sat_s, modular, is_logic, is_mem, is_tbit, par_cmp;
  logic [1:0] size;
  logic [2:0] lop;
  logic [3:0] cond;
  assign sub      = S[5];
  assign incr     = S[4];
  assign avg      = S[6];
  assign sat_s    = S[3];
  assign modular  = S[2];
  assign size     = S[1:0];
  assign is_tbit  = S[18:17] == 2'b10;
  assign is_logic = S[16] && !is_tbit;
  assign is_mem   = S[15];
  assign lop      = S[14:12];
  assign par_cmp  = S[11];
  assign cond     = S[10:7];

  // lane_start[i]: byte i is the lowest byte of its subword
  // lane_top[i]  : byte i is the highest byte of its subword
  logic [7:0] lane_start, lane_top;
  always_comb begin
    automatic int unsigned nb;
    nb = is_mem ? 8 : lane_bytes(size);
    for (int i = 0; i < 8; i++) begin
      lane_start[i] = (i % nb) == 0;
      lane_top[i]   = (i % nb) == nb - 1;
    end
  end

  // ------------------------------------------------------ byte-sliced adder
  logic [63:0] b_op, sum;
  logic [7:0]  c_out, c_msb;     // carry out of each byte, carry into bit 7
  logic        cin_lane;
  always_comb begin
    logic       c, c7;
    logic [7:0] bsum;
    b_op = (sub && !is_mem) ? ~Rs2 : Rs2;
    // +1 for subtract (two's complement), +1 for add-increment or rounding
    // average, none for subtract-decrement
    cin_lane = is_mem ? 1'b0 : (sub ? !incr : incr);
    c = 1'b0;
    for (int i = 0; i < 8; i++) begin
      if (lane_start[i]) c = cin_lane;
      {c7, bsum[6:0]}  = {1'b0, Rs1[8*i +: 7]} + {1'b0, b_op[8*i +: 7]} + 8'(c);
      {c, bsum[7]}     = 2'(Rs1[8*i+7]) + 2'(b_op[8*i+7]) + 2'(c7);
      sum[8*i +: 8]  = bsum;
      c_msb[i]       = c7;
      c_out[i]       = c;
    end
  end

  // ----------------------------------------- saturation / averaging per lane
  logic [63:0] add_res;
  logic [7:0]  ovf_v;
  always_comb begin
    automatic int unsigned nb, lsb;
    logic s_ovf, u_ovf, a_neg;
    add_res = sum;
    ovf_v   = '0;
    nb      = is_mem ? 8 : lane_bytes(size);
    for (int i = 0; i < 8; i++) begin
      lsb   = 8 * (i + 1 - nb);
      s_ovf = c_msb[i] ^ c_out[i];
      u_ovf = sub ? !c_out[i] : c_out[i];
      a_neg = Rs1[8*i+7];
      if (lane_top[i] && !is_mem) begin
        ovf_v[i] = (modular || sat_s) ? s_ovf : u_ovf;
        if (avg) begin
          // the (L+1)-bit sum or difference, shifted right by one
          for (int k = 0; k < 64; k++)
            if (k >= lsb && k < 8*(i+1)-1) add_res[k] = sum[k+1];
          add_res[8*i+7] = sub ? !c_out[i] : c_out[i];
          ovf_v[i] = 1'b0;
        end else if (!modular) begin
          if (sat_s && s_ovf) begin
            for (int k = 0; k < 64; k++)
              if (k >= lsb && k <= 8*i+7) add_res[k] = !a_neg;
            add_res[8*i+7] = a_neg;
          end else if (!sat_s && u_ovf) begin
            for (int k = 0; k < 64; k++)
              if (k >= lsb && k <= 8*i+7) add_res[k] = !sub;
          end
        end
      end
    end
  end

  // --------------------------------------------------------- compare paths
  function automatic logic cmp64(input logic [3:0] c, input logic [63:0] a, input logic [63:0] b);
    logic signed [63:0] sa, sb;
    sa = a; sb = b;
    case (c)
      4'b0000: return a == b;
      4'b0001: return a != b;
      4'b0010: return sa <  sb;
      4'b0011: return sa <= sb;
      4'b0100: return sa >  sb;
      4'b0101: return sa >= sb;
      4'b0110: return a <  b;
      4'b0111: return a <= b;
      4'b1000: return a >  b;
      4'b1001: return a >= b;
      default: return 1'b0;
    endcase
  endfunction

  // pcmp.eq / pcmp.gt (signed), pmax / pmin (unsigned bytes, signed wider)
  logic [63:0] pcmp_res;
  always_comb begin
    automatic int unsigned nb;
    logic [63:0] a, b;
    logic        eq, gt_s, gt_u, pick_a;
    nb = lane_bytes(size);
    pcmp_res = '0;
    eq = 1'b0; gt_s = 1'b0; gt_u = 1'b0; pick_a = 1'b0;
    for (int l = 0; l < 8; l++) begin
      a = '0; b = '0;
      if (l < 8 / nb) begin
        for (int k = 0; k < 64; k++)
          if (k < 8*nb) begin a[k] = Rs1[8*nb*l + k]; b[k] = Rs2[8*nb*l + k]; end
        eq   = a == b;
        gt_u = a > b;
        // signed compare: flip the sign bit of each lane
        gt_s = (a ^ (64'(1) << (8*nb-1))) > (b ^ (64'(1) << (8*nb-1)));
        case (S[8:7])
          2'b01:   pick_a = eq;                          // pcmp.eq
          2'b00:   pick_a = gt_s;                        // pcmp.gt
          2'b11:   pick_a = (nb == 1) ? gt_u : gt_s;     // pmax
          default: pick_a = (nb == 1) ? !gt_u : !gt_s;   // pmin
        endcase
        for (int k = 0; k < 64; k++)
          if (k < 8*nb) begin
            if (S[8]) pcmp_res[8*nb*l + k] = pick_a ? a[k] : b[k];
            else      pcmp_res[8*nb*l + k] = pick_a;
          end
      end
    end
  end

  // ---------------------------------------------------------- output select
  always_comb begin
    Rd   = '0;
    T_F  = 1'b0;
    trap = 1'b0;
    OVF  = '0;
    if (is_tbit) begin
      T_F  = Rs1[Rs2[5:0]];
      trap = T_F;
    end else if (is_logic) begin
      unique case (logic_op_e'(lop))
        LG_AND:   Rd = Rs1 & Rs2;
        LG_ANDCM: Rd = Rs1 & ~Rs2;
        LG_NOT:   Rd = ~Rs1;
        LG_OR:    Rd = Rs1 | Rs2;
        LG_XOR:   Rd = Rs1 ^ Rs2;
        LG_CMP: begin
          if (par_cmp) Rd = pcmp_res;
          else         T_F = cmp64(cond, Rs1, Rs2);
        end
        default:  Rd = '0;
      endcase
    end else begin
      Rd  = add_res;
      OVF = ovf_v;
    end
  end

  // --------------------------------------------- multi-cycle step counter
  logic [1:0] step, n_cycles;
  always_comb begin
    n_cycles = 2'd1;
    if (!is_logic && !is_tbit && !is_mem && !avg)
      n_cycles = 2'd1 + 2'(sub) + 2'(incr);
  end
  assign done = enable && (step == n_cycles - 2'd1);

  always_ff @(posedge clk) begin
    if (reset || !enable || done) step <= '0;
    else                          step <= step + 2'd1;
  end
endmodule
