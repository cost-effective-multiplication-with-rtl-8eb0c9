// tb_saturation_detect: exhaustive check of left-preshift overflow detection.
// Every 16-bit input is tried with every select pattern (no shift, left by
// 1, 2, 3). The expected flags come from multiplying the signed value by
// 2^k in 32-bit arithmetic and comparing with the 16-bit signed range.
module tb_saturation_detect;
  logic [15:0] din;
  logic [2:0]  left;
  logic        ov1, ov0;
  int checks = 0, failures = 0;

  saturation_detect #(.W(16)) dut (.din(din), .left(left), .ov1(ov1), .ov0(ov0));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      for (int k = 0; k <= 3; k++) begin
        int p;
        bit e1, e0;
        din  = 16'(v);
        left = (k == 0) ? 3'b000 : 3'(1 << (k - 1));
        #1;
        p  = int'($signed(din)) * (1 << k);
        e1 = p > 32767;
        e0 = p < -32768;
        checks++;
        if (ov1 !== e1 || ov0 !== e0) begin
          failures++;
          if (failures < 10) $display("FAIL din=%h k=%0d ov1=%b ov0=%b", din, k, ov1, ov0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
