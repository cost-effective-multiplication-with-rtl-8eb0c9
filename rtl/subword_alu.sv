// subword_alu: a 64-bit subword-parallel ALU of four 16-bit lanes.
//
// The same instruction runs on each of the LANES subwords of the two
// operand words; subword i occupies bits [i*SW +: SW]. Each lane is a
// lane_alu built around a preshift_adder, so one subword_alu equals one
// preshift_adder per subword. Carries never cross a subword boundary.
// sat[i] reports saturation in lane i. Combinational.
module subword_alu
  import psa_pkg::*;
#(
  parameter int unsigned SW = SUBWORD_W,   // subword width
  parameter int unsigned NL = LANES        // subwords per word
) (
  input  instr_t           instr,
  input  logic [SW*NL-1:0] a,
  input  logic [SW*NL-1:0] b,
  output logic [SW*NL-1:0] y,
  output logic [NL-1:0]    sat
);

  for (genvar i = 0; i < NL; i++) begin : g_lane
    lane_alu #(.W(SW)) u_lane (
      .instr(instr),
      .a(a[i*SW +: SW]),
      .b(b[i*SW +: SW]),
      .y(y[i*SW +: SW]),
      .sat(sat[i])
    );
  end

endmodule
