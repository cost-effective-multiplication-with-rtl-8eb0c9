// tb_subword_alu: checks that the four subword lanes work independently.
// Random instructions run on random 64-bit words; each 16-bit field of the
// result and each lane's saturation flag is compared with the reference
// model applied to that field alone, so a carry or shift leaking across a
// subword boundary is caught.
module tb_subword_alu;
  import psa_pkg::*;
  import psa_ref_pkg::*;
  instr_t      ins;
  logic [63:0] a, b, y;
  logic [3:0]  sat;
  int checks = 0, failures = 0;

  subword_alu #(.SW(16), .NL(4)) dut (.instr(ins), .a(a), .b(b), .y(y), .sat(sat));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic op_e ops [7] = '{OP_PADD, OP_PSUB, OP_PSHLADD, OP_PSHRADD, OP_PSHL, OP_PSHR, OP_PAVG};
    for (int i = 0; i < 50000; i++) begin
      ins.op  = ops[$urandom_range(0, 6)];
      ins.amt = (ins.op == OP_PSHLADD || ins.op == OP_PSHRADD) ? 4'($urandom_range(1, 3))
                                                               : 4'($urandom);
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      #1;
      for (int l = 0; l < 4; l++) begin
        logic [15:0] e;
        bit es;
        e  = ref_lane(ins, a[l*16 +: 16], b[l*16 +: 16]);
        es = ref_sat(ins, a[l*16 +: 16], b[l*16 +: 16]);
        checks++;
        if (y[l*16 +: 16] !== e || sat[l] !== es) begin
          failures++;
          if (failures < 10)
            $display("FAIL op=%s lane=%0d a=%h b=%h y=%h exp=%h", ins.op.name(), l,
                     a[l*16 +: 16], b[l*16 +: 16], y[l*16 +: 16], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
