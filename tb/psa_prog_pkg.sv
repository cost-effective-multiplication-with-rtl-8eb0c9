// psa_prog_pkg: instruction programs for testing the preshift unit.
//
// A program is a list of register-to-register instructions of the
// constant-multiply mix, each naming two source registers and one
// destination register (a fresh one per instruction, so the list is a
// data-flow graph). The builders here produce:
//   * multiplication by an integer constant, as a Horner chain from the
//     most significant set bit down, with PSHLxADD (cmul_int);
//   * multiplication by a fixed-point constant with F fraction bits
//     (cmul_fix): the integer part as above, the fraction as a Horner chain
//     from its lowest set bit up, each next set bit d places higher added
//     by one PSHRxADD (d <= 3) or a PSHR followed by PSHR3ADD (d > 3), and
//     the two parts joined by one addition. Only integer multiples of x are
//     ever shifted left, and no intermediate value exceeds the product.
//   * the 8-point AAN forward and inverse DCT flows (29 additions and five
//     constant multiplications each), on 64-bit words of four subwords, so
//     four independent columns are transformed at once.
// eval() runs a program on the integer reference model.
package psa_prog_pkg;
  import psa_pkg::*;
  import psa_ref_pkg::*;

  typedef struct {
    instr_t ins;
    int     a;
    int     b;
    int     dst;
  } prog_op_t;

  // Constants of the AAN flows.
  localparam real C0707 = 0.707106781;
  localparam real C0382 = 0.382683433;
  localparam real C0541 = 0.541196100;
  localparam real C1306 = 1.306562965;
  localparam real C1414 = 1.414213562;
  localparam real C1847 = 1.847759065;
  localparam real C1082 = 1.082392200;
  localparam real C2613 = 2.613125930;

  class program_t;
    prog_op_t ops[$];
    int       nregs;
    int       frac;      // fraction bits of the constants (10 for C2.10, 12 for C3.12)
    int       n_mul;     // instructions spent on constant multiplications

    function new(int nin, int frac_bits);
      nregs = nin;
      frac  = frac_bits;
      n_mul = 0;
    endfunction

    function int emit(op_e op, int amt, int a, int b);
      prog_op_t o;
      o.ins.op  = op;
      o.ins.amt = 4'(amt);
      o.a       = a;
      o.b       = b;
      o.dst     = nregs++;
      ops.push_back(o);
      return o.dst;
    endfunction

    function int add(int a, int b); return emit(OP_PADD, 0, a, b); endfunction
    function int sub(int a, int b); return emit(OP_PSUB, 0, a, b); endfunction

    // x times round(c * 2^frac) / 2^frac.
    function int cmul(int x, real c);
      return cmul_fix(x, int'(c * (2.0 ** frac)));
    endfunction

    // x times a positive integer q, most significant bit first: each next
    // set bit d places lower is taken in by one PSHLxADD (d <= 3) or by a
    // PSHL followed by PSHL3ADD (d > 3), and trailing zeros by a last PSHL.
    // Every intermediate value is at most the final product, so nothing
    // overflows that the product itself would not.
    function int cmul_int(int x, int q);
      int bits[$];
      int acc, n0;
      for (int i = 30; i >= 0; i--) if (q[i]) bits.push_back(i);
      n0  = ops.size();
      acc = x;
      for (int j = 1; j < bits.size(); j++) begin
        int d = bits[j-1] - bits[j];
        if (d > 3) begin
          acc = emit(OP_PSHL, d - 3, acc, acc);
          d   = 3;
        end
        acc = emit(OP_PSHLADD, d, acc, x);
      end
      if (bits[bits.size()-1] > 0) acc = emit(OP_PSHL, bits[bits.size()-1], acc, acc);
      n_mul += ops.size() - n0;
      return acc;
    endfunction

    // x times q / 2^frac for a fixed-point constant q: the integer part by
    // cmul_int, the fraction by a right-shifting Horner chain (no
    // fractional value is ever shifted left), then one PADD.
    function int cmul_fix(int x, int q);
      int ip = q >> frac;
      int fp = q & ((1 << frac) - 1);
      int bits[$];
      int acc, n0, ir, sh;
      if (fp == 0) return cmul_int(x, ip);
      for (int i = 0; i < frac; i++) if (fp[i]) bits.push_back(i);
      n0  = ops.size();
      acc = x;
      for (int j = 1; j < bits.size(); j++) begin
        int d = bits[j] - bits[j-1];
        if (d > 3) begin
          acc = emit(OP_PSHR, d - 3, acc, acc);
          d   = 3;
        end
        acc = emit(OP_PSHRADD, d, acc, x);
      end
      sh = frac - bits[bits.size()-1];
      if (ip == 0 || sh > 3) acc = emit(OP_PSHR, sh, acc, acc);
      n_mul += ops.size() - n0;
      if (ip == 0) return acc;
      // Integer part, then the last right shift merged into the addition.
      ir = (ip == 1) ? x : cmul_int(x, ip);
      n_mul++;
      if (sh > 3) return emit(OP_PADD, 0, ir, acc);
      return emit(OP_PSHRADD, sh, acc, ir);
    endfunction

    // 8-point AAN forward DCT; output k is the DCT sum times 2cos(k*pi/16)
    // (times 1 for k = 0).
    function void fdct8(int d[8], output int o[8]);
      int t0, t1, t2, t3, t4, t5, t6, t7, t10, t11, t12, t13;
      int z1, z2, z3, z4, z5, z11, z13;
      t0 = add(d[0], d[7]); t7 = sub(d[0], d[7]);
      t1 = add(d[1], d[6]); t6 = sub(d[1], d[6]);
      t2 = add(d[2], d[5]); t5 = sub(d[2], d[5]);
      t3 = add(d[3], d[4]); t4 = sub(d[3], d[4]);
      t10 = add(t0, t3); t13 = sub(t0, t3);
      t11 = add(t1, t2); t12 = sub(t1, t2);
      o[0] = add(t10, t11); o[4] = sub(t10, t11);
      z1 = cmul(add(t12, t13), C0707);
      o[2] = add(t13, z1); o[6] = sub(t13, z1);
      t10 = add(t4, t5); t11 = add(t5, t6); t12 = add(t6, t7);
      z5 = cmul(sub(t10, t12), C0382);
      z2 = add(cmul(t10, C0541), z5);
      z4 = add(cmul(t12, C1306), z5);
      z3 = cmul(t11, C0707);
      z11 = add(t7, z3); z13 = sub(t7, z3);
      o[5] = add(z13, z2); o[3] = sub(z13, z2);
      o[1] = add(z11, z4); o[7] = sub(z11, z4);
    endfunction

    // 8-point AAN inverse DCT: idct8(fdct8(x)) = 8x.
    function void idct8(int d[8], output int o[8]);
      int t0, t1, t2, t3, t4, t5, t6, t7, t10, t11, t12, t13;
      int z5, z10, z11, z12, z13;
      t10 = add(d[0], d[4]); t11 = sub(d[0], d[4]);
      t13 = add(d[2], d[6]);
      t12 = sub(cmul(sub(d[2], d[6]), C1414), t13);
      t0 = add(t10, t13); t3 = sub(t10, t13);
      t1 = add(t11, t12); t2 = sub(t11, t12);
      z13 = add(d[5], d[3]); z10 = sub(d[5], d[3]);
      z11 = add(d[1], d[7]); z12 = sub(d[1], d[7]);
      t7  = add(z11, z13);
      t11 = cmul(sub(z11, z13), C1414);
      z5  = cmul(add(z10, z12), C1847);
      t10 = sub(cmul(z12, C1082), z5);
      t12 = sub(z5, cmul(z10, C2613));
      t6 = sub(t12, t7); t5 = sub(t11, t6); t4 = add(t10, t5);
      o[0] = add(t0, t7); o[7] = sub(t0, t7);
      o[1] = add(t1, t6); o[6] = sub(t1, t6);
      o[2] = add(t2, t5); o[5] = sub(t2, t5);
      o[4] = add(t3, t4); o[3] = sub(t3, t4);
    endfunction

    // Length of the longest dependence chain (the level of the graph).
    function int depth();
      int lvl[] = new[nregs];
      int m = 0;
      foreach (lvl[i]) lvl[i] = 0;
      foreach (ops[i]) begin
        int l = 1 + ((lvl[ops[i].a] > lvl[ops[i].b]) ? lvl[ops[i].a] : lvl[ops[i].b]);
        lvl[ops[i].dst] = l;
        if (l > m) m = l;
      end
      return m;
    endfunction

    // Run the program on the reference model; regs must hold the inputs.
    function void eval(ref logic [63:0] regs[]);
      foreach (ops[i])
        for (int l = 0; l < 4; l++)
          regs[ops[i].dst][l*16 +: 16] =
            ref_lane(ops[i].ins, regs[ops[i].a][l*16 +: 16], regs[ops[i].b][l*16 +: 16]);
    endfunction
  endclass

endpackage
