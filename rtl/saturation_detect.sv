// saturation_detect: overflow detection for a left preshift by k = 1..3.
//
// A left shift of a signed W-bit value by k bits overflows when the k bits
// below the sign bit, I[W-2] .. I[W-1-k], are not all copies of the sign.
// For a positive input (sign 0) any 1 among them raises OV1 (positive
// overflow); for a negative input (sign 1) any 0 among them raises OV0
// (negative overflow). OV1 and OV0 are never both set. The select lines
// come from shift_decoder; with no left shift selected both flags are 0.
// Combinational.
module saturation_detect #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] din,
  input  logic [2:0]   left,   // one-hot: left[k-1] = shift left by k
  output logic         ov1,    // positive overflow
  output logic         ov0     // negative overflow
);

  // Bits that a left shift by 1, 2 or 3 pushes into or past the sign.
  logic [2:0] any_one;   // some of I[W-2] .. I[W-1-k] is 1
  logic [2:0] any_zero;  // some of I[W-2] .. I[W-1-k] is 0

  always_comb begin
    any_one[0]  = din[W-2];
    any_one[1]  = din[W-2] | din[W-3];
    any_one[2]  = din[W-2] | din[W-3] | din[W-4];
    any_zero[0] = ~din[W-2];
    any_zero[1] = ~(din[W-2] & din[W-3]);
    any_zero[2] = ~(din[W-2] & din[W-3] & din[W-4]);
    ov1 = ~din[W-1] & (|(left & any_one));
    ov0 =  din[W-1] & (|(left & any_zero));
  end

endmodule
