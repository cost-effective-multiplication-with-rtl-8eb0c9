// psa_pkg: types and constants shared by the preshift-adder datapath.
//
// The datapath works on 16-bit signed subwords, four of them packed in a
// 64-bit word, as in subword-parallel multimedia instruction sets. The
// instruction set is the small mix used to replace multiplication by a
// constant with shift-and-add sequences: parallel shifts by 1..15 bits,
// parallel add and subtract, add with the first operand preshifted left or
// right by 1..3 bits, and parallel average. The opcode encoding and the
// instruction record layout are this design's own choice.
package psa_pkg;

  // Subword width and number of subwords per machine word.
  localparam int unsigned SUBWORD_W = 16;
  localparam int unsigned LANES     = 4;

  typedef enum logic [2:0] {
    OP_PADD    = 3'd0,  // y = sat(a + b)
    OP_PSUB    = 3'd1,  // y = sat(a - b)
    OP_PSHLADD = 3'd2,  // y = sat(sat(a << x) + b), x = 1..3
    OP_PSHRADD = 3'd3,  // y = sat((a >>> x) + b),   x = 1..3
    OP_PSHL    = 3'd4,  // y = a << n,  n = 0..15 (bits shifted out are lost)
    OP_PSHR    = 3'd5,  // y = a >>> n, n = 0..15 (arithmetic)
    OP_PAVG    = 3'd6   // y = (a + b + 1) >>> 1
  } op_e;

  // One instruction as seen by an ALU: the operation and its shift amount
  // (x for the preshift_add forms, n for the plain shifts).
  typedef struct packed {
    op_e        op;
    logic [3:0] amt;
  } instr_t;

endpackage
