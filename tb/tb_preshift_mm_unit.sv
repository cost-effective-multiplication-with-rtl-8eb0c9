// tb_preshift_mm_unit: end-to-end test of the preshift unit at its default
// size (four preshift ALUs, four 16-bit subwords per word).
//
// The testbench plays the role of register file and scheduler. Programs of
// the instruction mix are list-scheduled: every cycle up to NUM_ALUS
// instructions whose sources are ready are issued, one per slot, and their
// results are written back one cycle later. Every result word is compared
// with the integer reference model. Programs run:
//   1. the worked five-instruction sequence for x * 11.111001001b, which is
//      three levels deep and must finish in three cycles;
//   2. the AAN 8-point DCT and inverse DCT on four columns at once, with
//      constants in C2.10 and C3.12, checked against the DCT definition and
//      for the round trip idct(fdct(x)) = 8x, with the cycle count bounded
//      by the data-flow depth and by instructions / NUM_ALUS;
//   3. directed cases that saturate the preshift (both signs) and the sum,
//      and a random program of every instruction.
// Each mechanism (left and right preshift, both preshift clamps, the sum
// clamp, every opcode, a cycle with all slots busy, a cycle with idle
// slots, reset) is counted and must occur at least once.
module tb_preshift_mm_unit;
  import psa_pkg::*;
  import psa_ref_pkg::*;
  import psa_prog_pkg::*;

  localparam int NA = 4;   // default number of preshift ALUs of the unit

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
  int n_sum_sat = 0, n_full_issue = 0, n_idle_slot = 0, n_reset = 0;

  preshift_mm_unit dut (
    .clk, .rst_n, .issue_valid, .issue_instr, .issue_a, .issue_b,
    .res_valid, .res, .res_sat
  );

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (200000) @(posedge clk);
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

  // Figure-style sequence: x * 11.111001001b in five instructions, three levels.
  task automatic test_sequence();
    program_t p = new(1, 9);
    logic [63:0] regs[];
    int r2, r3, r4, r5, r6, cyc;
    r2 = p.emit(OP_PSHRADD, 3, 0, 0);    // 1.001b   x
    r3 = p.emit(OP_PSHLADD, 1, 0, 0);    // 11b      x
    r4 = p.emit(OP_PSHRADD, 3, r2, r3);  // 11.001001b x
    r5 = p.emit(OP_PSHRADD, 1, 0, r3);   // 11.1b    x
    r6 = p.emit(OP_PSHRADD, 3, r4, r5);  // 11.111001001b x
    regs = new[p.nregs];
    regs[0] = pack4(512, 1024, -2048, 8000);
    run(p, regs, cyc);
    check(cyc == 3 && p.depth() == 3, $sformatf("sequence took %0d cycles, expected 3", cyc));
    // With multiplicands that are multiples of 512 no bit is lost: exact.
    check(regs[r6][15:0] == 16'(1993) && regs[r6][31:16] == 16'(3986) &&
          regs[r6][47:32] == 16'(-7972), $sformatf("sequence result %h", regs[r6]));
  endtask

  // Forward then inverse DCT on four random columns with F fraction bits.
  task automatic test_dct(int frac, int rounds);
    for (int r = 0; r < rounds; r++) begin
      program_t pf = new(8, frac);
      program_t pi;
      int dout[8], iout[8], cf, ci, ops_f;
      int x [4][8];
      logic [63:0] regs[];
      pf.fdct8('{0, 1, 2, 3, 4, 5, 6, 7}, dout);
      regs = new[pf.nregs];
      for (int n = 0; n < 8; n++) begin
        for (int c = 0; c < 4; c++) x[c][n] = $urandom_range(0, 200) - 100;
        regs[n] = pack4(x[0][n], x[1][n], x[2][n], x[3][n]);
      end
      run(pf, regs, cf);
      ops_f = pf.ops.size();
      check(cf >= pf.depth() && cf >= (ops_f + NA - 1) / NA,
            $sformatf("fdct cycles %0d below bound", cf));
      // Forward result against the DCT definition.
      for (int k = 0; k < 8; k++)
        for (int c = 0; c < 4; c++) begin
          real e = 0.0, g;
          for (int n = 0; n < 8; n++) e += x[c][n] * $cos((2 * n + 1) * k * 3.14159265358979 / 16.0);
          g = (k == 0) ? 1.0 : 2.0 * $cos(k * 3.14159265358979 / 16.0);
          e = e * g - real'(sx16(regs[dout[k]][c*16 +: 16]));
          check(e < 6.0 && e > -6.0, $sformatf("fdct F=%0d k=%0d col=%0d error %f", frac, k, c, e));
        end
      // Inverse on the forward result.
      pi = new(8, frac);
      pi.idct8('{0, 1, 2, 3, 4, 5, 6, 7}, iout);
      begin
        logic [63:0] r2[] = new[pi.nregs];
        for (int k = 0; k < 8; k++) r2[k] = regs[dout[k]];
        run(pi, r2, ci);
        check(ci >= pi.depth() && ci >= (pi.ops.size() + NA - 1) / NA,
              $sformatf("idct cycles %0d below bound", ci));
        for (int n = 0; n < 8; n++)
          for (int c = 0; c < 4; c++) begin
            int e = sx16(r2[iout[n]][c*16 +: 16]) - 8 * x[c][n];
            check(e <= 24 && e >= -24, $sformatf("round trip F=%0d n=%0d col=%0d error %0d", frac, n, c, e));
          end
      end
      if (r == 0)
        $display("C%0d.%0d: fdct %0d instr (%0d for multiplies) in %0d cycles, idct %0d instr (%0d for multiplies) in %0d cycles on %0d ALUs",
                 (frac == 10) ? 2 : 3, frac, ops_f, pf.n_mul, cf, pi.ops.size(), pi.n_mul, ci, NA);
    end
  endtask

  // Cases that clamp: preshift overflow of both signs and sum overflow.
  task automatic test_saturation();
    program_t p = new(2, 0);
    logic [63:0] regs[];
    int r, cyc;
    void'(p.emit(OP_PSHLADD, 3, 0, 1));  // lanes 0/1 clamp the preshift
    void'(p.emit(OP_PSHLADD, 1, 1, 0));
    void'(p.emit(OP_PADD, 0, 0, 0));     // sum clamp both ways
    void'(p.emit(OP_PSUB, 0, 0, 1));
    r = p.emit(OP_PSHRADD, 2, 0, 1);
    void'(p.emit(OP_PAVG, 0, r, 0));
    void'(p.emit(OP_PSHL, 4, r, r));
    void'(p.emit(OP_PSHR, 9, r, r));
    regs = new[p.nregs];
    regs[0] = pack4(12288, -12288, 28672, -28672);
    regs[1] = pack4(24576, 256, -32767, 32767);
    run(p, regs, cyc);
    check(cyc == ((NA >= 4) ? 3 : 5), $sformatf("saturation program took %0d cycles", cyc));
  endtask

  // Random program: random instructions on earlier registers.
  task automatic test_random(int n);
    op_e ops [7] = '{OP_PADD, OP_PSUB, OP_PSHLADD, OP_PSHRADD, OP_PSHL, OP_PSHR, OP_PAVG};
    program_t p = new(4, 0);
    logic [63:0] regs[];
    int cyc;
    for (int i = 0; i < n; i++) begin
      op_e o = ops[$urandom_range(0, 6)];
      int amt = (o == OP_PSHLADD || o == OP_PSHRADD) ? $urandom_range(1, 3) : $urandom_range(0, 15);
      void'(p.emit(o, amt, $urandom_range(0, p.nregs - 1), $urandom_range(0, p.nregs - 1)));
    end
    regs = new[p.nregs];
    for (int i = 0; i < 4; i++) regs[i] = {$urandom, $urandom};
    run(p, regs, cyc);
    check(cyc >= p.depth(), "random program cycle bound");
  endtask

  initial begin
    issue_valid = '0;
    foreach (issue_instr[k]) begin
      issue_instr[k] = '{op: OP_PADD, amt: 4'd0};
      issue_a[k] = '0;
      issue_b[k] = '0;
    end
    // Reset with valid requests pending: nothing may come out.
    issue_valid = '1;
    repeat (3) @(posedge clk);
    #1;
    check(res_valid == '0, "res_valid during reset");
    n_reset++;
    issue_valid = '0;
    rst_n = 1'b1;
    @(posedge clk); #1;
    check(res_valid == '0, "res_valid after reset");

    test_sequence();
    test_saturation();
    test_dct(10, 20);
    test_dct(12, 20);
    test_random(400);

    // Every mechanism must have been exercised.
    foreach (n_op[i]) check(n_op[i] > 0, $sformatf("opcode %0d never issued", i));
    check(n_pre_left > 0,    "no left preshift");
    check(n_pre_right > 0,   "no right preshift");
    check(n_pre_pos_sat > 0, "no positive preshift clamp");
    check(n_pre_neg_sat > 0, "no negative preshift clamp");
    check(n_sum_sat > 0,     "no sum clamp");
    check(n_full_issue > 0,  "no cycle with every ALU busy");
    check(n_idle_slot > 0,   "no cycle with an idle ALU");
    check(n_reset > 0,       "no reset");
    $display("mechanisms: left %0d right %0d pre+sat %0d pre-sat %0d sumsat %0d full %0d idle %0d",
             n_pre_left, n_pre_right, n_pre_pos_sat, n_pre_neg_sat, n_sum_sat, n_full_issue, n_idle_slot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
