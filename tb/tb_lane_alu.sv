// tb_lane_alu: random and corner check of one subword lane.
// Every opcode with every shift amount is applied to random and corner
// operands and compared with the integer reference model; the saturation
// flag is compared too.
module tb_lane_alu;
  import psa_pkg::*;
  import psa_ref_pkg::*;
  instr_t      ins;
  logic [15:0] a, b, y;
  logic        sat;
  int checks = 0, failures = 0;
  int per_op [7];

  lane_alu #(.W(16)) dut (.instr(ins), .a(a), .b(b), .y(y), .sat(sat));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(op_e op, int amt, logic [15:0] ta, logic [15:0] tb_);
    logic [15:0] e;
    bit es;
    ins.op = op; ins.amt = 4'(amt); a = ta; b = tb_;
    #1;
    e  = ref_lane(ins, ta, tb_);
    es = ref_sat(ins, ta, tb_);
    checks++;
    per_op[int'(op)]++;
    if (y !== e || sat !== es) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%s amt=%0d a=%h b=%h y=%h exp=%h sat=%b exp=%b",
                 op.name(), amt, ta, tb_, y, e, sat, es);
    end
  endtask

  initial begin
    automatic op_e ops [7] = '{OP_PADD, OP_PSUB, OP_PSHLADD, OP_PSHRADD, OP_PSHL, OP_PSHR, OP_PAVG};
    automatic logic [15:0] corners [6] = '{16'h0000, 16'h0001, 16'hffff, 16'h7fff, 16'h8000, 16'h4001};
    foreach (ops[o])
      for (int amt = 0; amt < 16; amt++) begin
        automatic int xa = (ops[o] == OP_PSHLADD || ops[o] == OP_PSHRADD) ? amt % 4 : amt;
        foreach (corners[i]) foreach (corners[j]) check(ops[o], xa, corners[i], corners[j]);
        for (int r = 0; r < 1000; r++) check(ops[o], xa, 16'($urandom), 16'($urandom));
      end
    foreach (per_op[i]) begin
      checks++;
      if (per_op[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
