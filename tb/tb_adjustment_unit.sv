// tb_adjustment_unit: checks the clamp applied after an overflowing preshift.
// Random and corner inputs are applied with no flag, OV1 and OV0; the
// output must be the input, 0x7fff and 0x8000 respectively.
module tb_adjustment_unit;
  logic [15:0] din, dout;
  logic        ov1, ov0;
  int checks = 0, failures = 0;

  adjustment_unit #(.W(16)) dut (.din(din), .ov1(ov1), .ov0(ov0), .dout(dout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [15:0] d, logic o1, logic o0);
    logic [15:0] e;
    din = d; ov1 = o1; ov0 = o0;
    #1;
    e = o1 ? 16'h7fff : (o0 ? 16'h8000 : d);
    checks++;
    if (dout !== e) begin
      failures++;
      $display("FAIL din=%h ov1=%b ov0=%b dout=%h exp=%h", d, o1, o0, dout, e);
    end
  endtask

  initial begin
    automatic logic [15:0] corners [6] = '{16'h0000, 16'hffff, 16'h7fff, 16'h8000, 16'h5555, 16'haaaa};
    foreach (corners[i]) begin
      check(corners[i], 0, 0);
      check(corners[i], 1, 0);
      check(corners[i], 0, 1);
    end
    for (int i = 0; i < 3000; i++) begin
      automatic int m = $urandom_range(0, 2);
      check(16'($urandom), m == 1, m == 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
