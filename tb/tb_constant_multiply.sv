// tb_constant_multiply: multiplication by every constant of the four
// fixed-point formats, on the preshift unit at its default size.
//
// For each format every positive constant is turned into an instruction
// sequence of the mix (integer constants: Horner chain of PSHLxADD from the
// top bit; fractional constants: integer part the same way, fraction by a
// right-shifting PSHRxADD chain), and the sequence runs on the unit with a
// random multiplicand in each of the four subwords, chosen so that the
// product fits 16 bits (and, for fractional constants, |x| < 2^14, as the
// fraction chain holds up to 2|x| before its last shift). Checks: every result word equals the integer
// reference model; integer products are exact; fractional products lie
// within the truncation bound below the exact value; no instruction
// saturates, since no intermediate value exceeds the product; the cycle
// count never beats the data-flow depth. The average sequence length of
// each format is printed.
//   C8.0: 1..255   C12.0: 1..4095   C2.10: 1..4095   C3.12: every STEP-th of 1..32767
module tb_constant_multiply;
  import psa_pkg::*;
  import psa_ref_pkg::*;
  import psa_prog_pkg::*;

  localparam int NA   = 4;   // default number of preshift ALUs of the unit
  localparam int STEP = 1;   // C3.12 constants tried: 1, 1+STEP, ...

  logic            clk;
  logic            rst_n = 1'b0;
  logic [NA-1:0]   issue_valid;
  instr_t          issue_instr [NA];
  logic [63:0]     issue_a [NA];
  logic [63:0]     issue_b [NA];
  logic [NA-1:0]   res_valid;
  logic [63:0]     res [NA];
  logic [3:0]      res_sat [NA];

  int checks = 0, failures = 0;
  int n_op [7];
  int n_pre_left = 0, n_pre_right = 0, n_pre_pos_sat = 0, n_pre_neg_sat = 0;
  int n_sum_sat = 0, n_full_issue = 0, n_idle_slot = 0;

  preshift_mm_unit dut (
    .clk, .rst_n, .issue_valid, .issue_instr, .issue_a, .issue_b,
    .res_valid, .res, .res_sat
  );

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Count the mechanisms one instruction exercises, lane by lane.
  function automatic void count_mech(instr_t ins, logic [63:0] a, logic [63:0] b);
    n_op[int'(ins.op)]++;
    if (ins.op == OP_PSHLADD && ins.amt[1:0] != 0) n_pre_left++;
    if (ins.op == OP_PSHRADD && ins.amt[1:0] != 0) n_pre_right++;
    for (int l = 0; l < 4; l++) begin
      int av = sx16(a[l*16 +: 16]);
      int p  = av * (1 << int'(ins.amt[1:0]));
      if (ins.op == OP_PSHLADD && p > 32767)  n_pre_pos_sat++;
      if (ins.op == OP_PSHLADD && p < -32768) n_pre_neg_sat++;
      if (ins.op != OP_PSHLADD || (p <= 32767 && p >= -32768))
        if (ref_sat(ins, a[l*16 +: 16], b[l*16 +: 16])) n_sum_sat++;
    end
  endfunction

  // List-schedule prog on the unit. regs holds the inputs on entry and every
  // register on exit; returns the number of issue cycles.
  task automatic run(program_t prog, ref logic [63:0] regs[], output int cycles);
    logic [63:0] expv[] = new[prog.nregs];
    int  rdy[] = new[prog.nregs];
    bit  done[] = new[prog.ops.size()];
    int  slot_op [NA];
    int  left = prog.ops.size();
    foreach (rdy[i]) rdy[i] = (i < prog.nregs - prog.ops.size()) ? 0 : 1 << 30;
    foreach (expv[i]) expv[i] = regs[i];
    prog.eval(expv);
    foreach (done[i]) done[i] = 1'b0;
    cycles = 0;
    while (left > 0) begin
      int k = 0;
      issue_valid = '0;
      foreach (prog.ops[i]) begin
        if (!done[i] && k < NA && rdy[prog.ops[i].a] <= cycles && rdy[prog.ops[i].b] <= cycles) begin
          issue_valid[k] = 1'b1;
          issue_instr[k] = prog.ops[i].ins;
          issue_a[k]     = regs[prog.ops[i].a];
          issue_b[k]     = regs[prog.ops[i].b];
          count_mech(prog.ops[i].ins, issue_a[k], issue_b[k]);
          slot_op[k] = i;
          done[i]    = 1'b1;
          k++;
        end
      end
      if (k == NA) n_full_issue++;
      else         n_idle_slot++;
      @(posedge clk); #1;
      issue_valid = '0;
      for (int s = 0; s < NA; s++) begin
        check(res_valid[s] == (s < k), $sformatf("res_valid[%0d]=%b cycle %0d", s, res_valid[s], cycles));
        if (s < k) begin
          prog_op_t o = prog.ops[slot_op[s]];
          logic [3:0] esat;
          for (int l = 0; l < 4; l++) esat[l] = ref_sat(o.ins, regs[o.a][l*16 +: 16], regs[o.b][l*16 +: 16]);
          regs[o.dst] = res[s];
          rdy[o.dst]  = cycles + 1;
          check(res[s] == expv[o.dst] && res_sat[s] == esat,
                $sformatf("%s amt=%0d a=%h b=%h -> %h sat=%b, expected %h sat=%b", o.ins.op.name(),
                          o.ins.amt, regs[o.a], regs[o.b], res[s], res_sat[s], expv[o.dst], esat));
          left--;
        end
      end
      cycles++;
    end
  endtask

  function automatic logic [63:0] pack4(int v0, int v1, int v2, int v3);
    return {16'(v3), 16'(v2), 16'(v1), 16'(v0)};
  endfunction

  // All constants of one format: ibits integer and frac fraction bits.
  task automatic run_format(int ibits, int frac, int step);
    int total = 0, count = 0, maxlen = 0, sat0 = n_sum_sat + n_pre_pos_sat + n_pre_neg_sat;
    int last = (1 << (ibits + frac)) - 1;
    for (int q = 1; q <= last; q += step) begin
      program_t p = new(1, frac);
      logic [63:0] regs[];
      int r, cyc, lim, len;
      int xs[4];
      r = p.cmul_fix(0, q);
      regs = new[p.nregs];
      // Largest |x| whose product fits: |x| * q / 2^frac <= 32767.
      lim = int'((longint'(32767) << frac) / q);
      if (lim > 32767) lim = 32767;
      // The fraction chain holds up to 2|x| before its last shift.
      if (frac > 0 && lim > 16383) lim = 16383;
      foreach (xs[l]) xs[l] = $urandom_range(0, 2 * lim) - lim;
      xs[0] = lim;
      regs[0] = {16'(xs[3]), 16'(xs[2]), 16'(xs[1]), 16'(xs[0])};
      if (p.ops.size() == 0) continue;   // q = 1 in C8.0 / C12.0 needs no instruction
      run(p, regs, cyc);
      len = p.ops.size();
      total += len; count++;
      if (len > maxlen) maxlen = len;
      check(cyc >= p.depth(), $sformatf("q=%0d cycles %0d below depth", q, cyc));
      for (int l = 0; l < 4; l++) begin
        longint ex = longint'(xs[l]) * q;   // exact product times 2^frac
        longint got = longint'(sx16(regs[r][l*16 +: 16])) << frac;
        longint err = got - ex;             // in units of 2^-frac
        if (frac == 0)
          check(err == 0, $sformatf("C%0d.0 q=%0d x=%0d got %0d", ibits, q, xs[l], sx16(regs[r][l*16 +: 16])));
        else
          check(err <= 0 && err > -(longint'(len + 1) << frac),
                $sformatf("C%0d.%0d q=%0d x=%0d got %0d err %0d/2^%0d", ibits, frac, q, xs[l],
                          sx16(regs[r][l*16 +: 16]), err, frac));
      end
    end
    check(n_sum_sat + n_pre_pos_sat + n_pre_neg_sat == sat0, "a constant multiplication saturated");
    $display("C%0d.%0d: %0d constants, average length %0d.%03d, longest %0d instructions",
             ibits, frac, count, total / count, (total % count) * 1000 / count, maxlen);
  endtask

  initial begin
    issue_valid = '0;
    foreach (issue_instr[k]) begin
      issue_instr[k] = '{op: OP_PADD, amt: 4'd0};
      issue_a[k] = '0;
      issue_b[k] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    run_format(8, 0, 1);
    run_format(12, 0, 1);
    run_format(2, 10, 1);
    run_format(3, 12, STEP);
    check(n_pre_left > 0 && n_pre_right > 0, "both preshift directions used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
