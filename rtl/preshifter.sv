// preshifter: the 3-bit preshifter in front of the preshift_adder.
//
// The W-bit signed input is shifted left or right by 0..3 bits as chosen by
// S, LR and SA[1:0]. shift_decoder turns those into one-hot select lines,
// an AND-OR multiplexer picks one of the seven shifted copies, and
// saturation_detect with adjustment_unit replace a left shift that
// overflows by the largest or smallest signed value. Right shifts are
// arithmetic (the sign is copied in) and drop the bits shifted out, which
// rounds toward minus infinity; the rounding is this design's own choice.
// Combinational; the ov outputs report the clamp.
module preshifter #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] din,
  input  logic         s,      // 1: preshift
  input  logic         lr,     // 1: left, 0: right
  input  logic [1:0]   sa,     // shift amount
  output logic [W-1:0] dout,
  output logic         ov1,    // left shift overflowed positive, clamped
  output logic         ov0     // left shift overflowed negative, clamped
);

  logic       pass;
  logic [2:0] left, right;
  logic [W-1:0] shifted;

  shift_decoder u_dec (
    .s(s), .lr(lr), .sa(sa), .pass(pass), .left(left), .right(right)
  );

  saturation_detect #(.W(W)) u_sat (
    .din(din), .left(left), .ov1(ov1), .ov0(ov0)
  );

  // AND-OR selection among the seven shifted copies.
  always_comb begin
    shifted = {W{pass}} & din;
    for (int k = 1; k <= 3; k++) begin
      shifted |= {W{left[k-1]}}  & (din << k);
      shifted |= {W{right[k-1]}} & W'($signed(din) >>> k);
    end
  end

  adjustment_unit #(.W(W)) u_adj (
    .din(shifted), .ov1(ov1), .ov0(ov0), .dout(dout)
  );

endmodule
