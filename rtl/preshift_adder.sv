// preshift_adder: a W-bit adder whose first operand passes a 3-bit preshifter.
//
// y = sat(pre(a) + b) or, with sub set, y = sat(pre(a) - b), where pre()
// is the preshifter (left or right by 0..3 bits, left shifts saturating).
// The sum is formed one bit wider than the operands and clamped to the
// signed W-bit range, the saturating overflow handling of subword
// multimedia instruction sets. With S = 0 it is a plain saturating adder
// and subtractor, so the same unit serves normal additions. Subtraction and
// the sum saturation are this design's reading of how the unit is used;
// the preshifter follows the design's own structure. Combinational.
module preshift_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,        // preshifted operand (op1)
  input  logic [W-1:0] b,        // op2
  input  logic         s,        // 1: preshift a
  input  logic         lr,       // 1: left, 0: right
  input  logic [1:0]   sa,       // preshift amount
  input  logic         sub,      // 1: pre(a) - b
  output logic [W-1:0] y,
  output logic         pre_sat,  // the preshift was clamped
  output logic         sum_sat   // the sum was clamped
);

  localparam logic [W-1:0] MAXV = {1'b0, {(W-1){1'b1}}};
  localparam logic [W-1:0] MINV = {1'b1, {(W-1){1'b0}}};

  logic [W-1:0] a_pre;
  logic         ov1, ov0;
  logic [W:0]   sum;       // one guard bit
  logic [W-1:0] b_op;

  preshifter #(.W(W)) u_pre (
    .din(a), .s(s), .lr(lr), .sa(sa), .dout(a_pre), .ov1(ov1), .ov0(ov0)
  );

  always_comb begin
    b_op    = sub ? ~b : b;
    sum     = {a_pre[W-1], a_pre} + {b_op[W-1], b_op} + (W+1)'(sub);
    pre_sat = ov1 | ov0;
    sum_sat = sum[W] ^ sum[W-1];
    if (!sum_sat)    y = sum[W-1:0];
    else if (sum[W]) y = MINV;
    else             y = MAXV;
  end

endmodule
