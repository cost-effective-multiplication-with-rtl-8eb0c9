// lane_alu: one 16-bit subword lane of the constant-multiply instruction mix.
//
// Executes one instruction on signed subwords a (op1) and b (op2):
//   PADD, PSUB        saturating add and subtract,
//   PSHLADD, PSHRADD  op1 preshifted left or right by x = 1..3, then added
//                     to op2 with saturation (the preshift_adder),
//   PSHL, PSHR        shift op1 by n = 0..15, left logical or right
//                     arithmetic, bits shifted out are lost,
//   PAVG              average of op1 and op2, rounded half up.
// Add, subtract and both preshift_add forms share one preshift_adder. The
// shifter for the plain shifts, the rounding of the average and the
// non-saturating left shift are this design's own choices. sat reports
// that a preshift or a sum was clamped. Combinational.
module lane_alu
  import psa_pkg::*;
#(
  parameter int unsigned W = SUBWORD_W
) (
  input  instr_t       instr,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y,
  output logic         sat
);

  logic         pa_s, pa_lr, pa_sub;
  logic [1:0]   pa_sa;
  logic [W-1:0] pa_y;
  logic         pa_pre_sat, pa_sum_sat;
  logic [W-1:0] avg;

  // Control of the shared preshift_adder.
  always_comb begin
    pa_s   = (instr.op == OP_PSHLADD) || (instr.op == OP_PSHRADD);
    pa_lr  = (instr.op == OP_PSHLADD);
    pa_sa  = instr.amt[1:0];
    pa_sub = (instr.op == OP_PSUB);
  end

  preshift_adder #(.W(W)) u_padd (
    .a(a), .b(b), .s(pa_s), .lr(pa_lr), .sa(pa_sa), .sub(pa_sub),
    .y(pa_y), .pre_sat(pa_pre_sat), .sum_sat(pa_sum_sat)
  );

  always_comb begin
    // floor((a + b + 1) / 2) without a guard bit: halve each operand, then
    // add back the carry of their two low bits.
    avg = W'($signed(a) >>> 1) + W'($signed(b) >>> 1) + W'(a[0] | b[0]);
    y   = pa_y;
    sat = 1'b0;
    unique case (instr.op)
      OP_PADD, OP_PSUB, OP_PSHLADD, OP_PSHRADD: begin
        y   = pa_y;
        sat = pa_pre_sat | pa_sum_sat;
      end
      OP_PSHL: y = a << instr.amt;
      OP_PSHR: y = W'($signed(a) >>> instr.amt);
      OP_PAVG: y = avg;
      default: y = pa_y;
    endcase
  end

endmodule
