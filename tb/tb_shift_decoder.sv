// tb_shift_decoder: exhaustive check of the preshift control decoder.
// All 16 combinations of S, LR and SA are applied; the expected select
// lines are derived directly from the meaning of the controls.
module tb_shift_decoder;
  logic       s, lr;
  logic [1:0] sa;
  logic       pass;
  logic [2:0] left, right;
  int checks = 0, failures = 0;

  shift_decoder dut (.s(s), .lr(lr), .sa(sa), .pass(pass), .left(left), .right(right));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      logic [2:0] exp_l, exp_r;
      logic       exp_p;
      {s, lr, sa} = 4'(i);
      #1;
      exp_l = '0; exp_r = '0;
      if (s && sa != 0) begin
        if (lr) exp_l[int'(sa) - 1] = 1'b1;
        else    exp_r[int'(sa) - 1] = 1'b1;
      end
      exp_p = (exp_l == 0) && (exp_r == 0);
      checks++;
      if (left !== exp_l || right !== exp_r || pass !== exp_p) begin
        failures++;
        $display("FAIL s=%b lr=%b sa=%0d: pass=%b left=%b right=%b", s, lr, sa, pass, left, right);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
