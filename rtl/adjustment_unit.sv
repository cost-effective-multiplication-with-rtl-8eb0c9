// adjustment_unit: clamps a preshifted value after an overflow.
//
// On a positive overflow (OV1) the output is the largest W-bit signed value
// (0x7fff for 16 bits), on a negative overflow (OV0) the smallest (0x8000);
// otherwise the shifted value passes through. Because OV1 and OV0 are never
// set together, every bit needs only one gating term: the sign bit is forced
// to 1 by OV0 and cleared by OV1, every other bit is forced to 1 by OV1 and
// cleared by OV0. This is the logic form of the small per-bit cell of the
// design; the transistor-level cell itself is not modelled. Combinational.
module adjustment_unit #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] din,   // shifted value
  input  logic         ov1,   // positive overflow
  input  logic         ov0,   // negative overflow
  output logic [W-1:0] dout
);

  always_comb begin
    dout[W-1]   = (din[W-1] & ~ov1) | ov0;
    dout[W-2:0] = (din[W-2:0] & {(W-1){~ov0}}) | {(W-1){ov1}};
  end

  // The two flags come from one detector and exclude each other.
  always_comb assert (!(ov1 && ov0)) else $error("OV1 and OV0 both set");

endmodule
