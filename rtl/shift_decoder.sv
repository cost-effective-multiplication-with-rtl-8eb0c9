// shift_decoder: turns the preshift control inputs into one-hot select lines.
//
// Inputs follow the preshifter of the design: S enables the preshift, LR
// picks left (1) or right (0), SA[1:0] is the shift distance. The outputs are
// mutually exclusive select lines: pass (no shift), left[k-1] (shift left by
// k) and right[k-1] (shift right by k), k = 1..3. SA = 0 with S = 1 selects
// pass; that case is this design's own choice. Purely combinational.
module shift_decoder (
  input  logic       s,      // 1: preshift, 0: pass the input unchanged
  input  logic       lr,     // 1: left, 0: right
  input  logic [1:0] sa,     // shift amount 0..3
  output logic       pass,   // no shift
  output logic [2:0] left,   // left[k-1]:  shift left by k
  output logic [2:0] right   // right[k-1]: shift right by k
);

  logic [2:0] amt_hot;  // one-hot of SA = 1, 2, 3

  always_comb begin
    amt_hot[0] = ~sa[1] &  sa[0];
    amt_hot[1] =  sa[1] & ~sa[0];
    amt_hot[2] =  sa[1] &  sa[0];
    left       = {3{s &  lr}} & amt_hot;
    right      = {3{s & ~lr}} & amt_hot;
    pass       = ~(|left) & ~(|right);
  end

endmodule
