// tb_preshift_adder: random and corner check of the preshift adder.
// Expected results come from integer arithmetic: preshift (clamped left,
// floored right), add or subtract, clamp to 16 bits. Both saturation flags
// are compared, and each kind of saturation must occur at least once.
module tb_preshift_adder;
  import psa_ref_pkg::*;
  logic [15:0] a, b, y;
  logic        s, lr, sub, pre_sat, sum_sat;
  logic [1:0]  sa;
  int checks = 0, failures = 0;
  int n_pre = 0, n_sum = 0;

  preshift_adder #(.W(16)) dut (
    .a(a), .b(b), .s(s), .lr(lr), .sa(sa), .sub(sub),
    .y(y), .pre_sat(pre_sat), .sum_sat(sum_sat)
  );

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [15:0] ta, logic [15:0] tb_, logic [3:0] ctl, logic tsub);
    int av, bv, k, p, sum;
    bit ep, es;
    logic [15:0] e;
    a = ta; b = tb_; {s, lr, sa} = ctl; sub = tsub;
    #1;
    av = sx16(a); bv = sx16(b);
    k  = s ? int'(sa) : 0;
    ep = 0;
    if (lr) begin
      p  = av * (1 << k);
      ep = (p > 32767) || (p < -32768);
      p  = sx16(clamp16(p));
    end else p = floor_div_pow2(av, k);
    sum = sub ? p - bv : p + bv;
    es  = (sum > 32767) || (sum < -32768);
    e   = clamp16(sum);
    checks++;
    if (y !== e || pre_sat !== ep || sum_sat !== es) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h ctl=%b sub=%b y=%h exp=%h sat=%b%b exp=%b%b",
                 a, b, ctl, sub, y, e, pre_sat, sum_sat, ep, es);
    end
    n_pre += int'(ep);
    n_sum += int'(es);
  endtask

  initial begin
    automatic logic [15:0] corners [8] = '{16'h0000, 16'h0001, 16'hffff, 16'h7fff,
                                 16'h8000, 16'h1000, 16'he000, 16'h3fff};
    foreach (corners[i]) foreach (corners[j])
      for (int c = 0; c < 16; c++) begin
        check(corners[i], corners[j], 4'(c), 1'b0);
        check(corners[i], corners[j], 4'(c), 1'b1);
      end
    for (int i = 0; i < 200000; i++)
      check(16'($urandom), 16'($urandom), 4'($urandom), 1'($urandom));
    checks++;
    if (n_pre == 0 || n_sum == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
