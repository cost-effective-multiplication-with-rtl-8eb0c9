// tb_preshifter: exhaustive check of the 3-bit preshifter.
// Every 16-bit input is applied with every control setting. The expected
// value is the input times 2^k clamped to the signed range (left), or the
// input divided by 2^k rounded toward minus infinity (right), computed on
// integers; the overflow flags must match the clamp.
module tb_preshifter;
  import psa_ref_pkg::*;
  logic [15:0] din, dout;
  logic        s, lr, ov1, ov0;
  logic [1:0]  sa;
  int checks = 0, failures = 0;
  int n_pos_sat = 0, n_neg_sat = 0;

  preshifter #(.W(16)) dut (.din(din), .s(s), .lr(lr), .sa(sa), .dout(dout), .ov1(ov1), .ov0(ov0));

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      for (int c = 0; c < 16; c++) begin
        int av, k, e;
        bit e1, e0;
        din = 16'(v);
        {s, lr, sa} = 4'(c);
        #1;
        av = sx16(din);
        k  = s ? int'(sa) : 0;
        e1 = 0; e0 = 0;
        if (lr) begin
          e  = av * (1 << k);
          e1 = e > 32767;
          e0 = e < -32768;
          e  = sx16(clamp16(e));
        end else begin
          e = floor_div_pow2(av, k);
        end
        checks++;
        if (dout !== e[15:0] || ov1 !== e1 || ov0 !== e0) begin
          failures++;
          if (failures < 10) $display("FAIL din=%h s=%b lr=%b sa=%0d dout=%h exp=%h", din, s, lr, sa, dout, e[15:0]);
        end
        n_pos_sat += int'(e1);
        n_neg_sat += int'(e0);
      end
    end
    checks++;
    if (n_pos_sat == 0 || n_neg_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
