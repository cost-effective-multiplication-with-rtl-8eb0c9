// psa_ref_pkg: reference model of the constant-multiply instruction mix.
//
// Every function works on plain 32-bit integers, independent of the RTL
// bit-level structure: a 16-bit subword is sign-extended to an int, the
// operation is done with ordinary integer arithmetic, and the result is
// clamped or wrapped back to 16 bits as the instruction defines.
package psa_ref_pkg;
  import psa_pkg::*;

  function automatic int sx16(logic [15:0] v);
    return int'($signed(v));
  endfunction

  function automatic logic [15:0] clamp16(int v);
    if (v > 32767)  return 16'h7fff;
    if (v < -32768) return 16'h8000;
    return v[15:0];
  endfunction

  // floor(v / 2^k) for any sign, by repeated halving toward minus infinity.
  function automatic int floor_div_pow2(int v, int k);
    int r = v;
    for (int i = 0; i < k; i++) r = (r - ((r % 2 + 2) % 2)) / 2;
    return r;
  endfunction

  // Left preshift with saturation, or arithmetic right preshift.
  function automatic int ref_pre(int a, bit left, int x);
    if (left) return sx16(clamp16(a * (1 << x)));
    return floor_div_pow2(a, x);
  endfunction

  function automatic logic [15:0] ref_lane(instr_t ins, logic [15:0] a, logic [15:0] b);
    int av = sx16(a), bv = sx16(b);
    int n  = int'(ins.amt);
    case (ins.op)
      OP_PADD:    return clamp16(av + bv);
      OP_PSUB:    return clamp16(av - bv);
      OP_PSHLADD: return clamp16(ref_pre(av, 1'b1, n % 4) + bv);
      OP_PSHRADD: return clamp16(ref_pre(av, 1'b0, n % 4) + bv);
      OP_PSHL:    begin int p = av * (1 << n); return p[15:0]; end
      OP_PSHR:    return 16'(floor_div_pow2(av, n));
      OP_PAVG:    return 16'(floor_div_pow2(av + bv + 1, 1));
      default:    return 16'h0;
    endcase
  endfunction

  // Whether the instruction saturates (preshift or sum clamped).
  function automatic bit ref_sat(instr_t ins, logic [15:0] a, logic [15:0] b);
    int av = sx16(a), bv = sx16(b);
    int n  = int'(ins.amt) % 4;
    int p;
    case (ins.op)
      OP_PADD: return (av + bv > 32767) || (av + bv < -32768);
      OP_PSUB: return (av - bv > 32767) || (av - bv < -32768);
      OP_PSHLADD: begin
        p = av * (1 << n);
        if (p > 32767 || p < -32768) return 1'b1;
        return (p + bv > 32767) || (p + bv < -32768);
      end
      OP_PSHRADD: begin
        p = floor_div_pow2(av, n);
        return (p + bv > 32767) || (p + bv < -32768);
      end
      default: return 1'b0;
    endcase
  endfunction

endpackage
