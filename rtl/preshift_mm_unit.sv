// preshift_mm_unit: subword arithmetic unit built from preshift ALUs only.
//
// Instead of a subword multiplier, the unit holds NUM_ALUS subword_alu
// instances (four by default, the configuration of four preshift_adders per
// 16-bit subword, which costs about the area of one multiplier and one
// adder). Multiplications by constants run as short sequences of the
// instruction mix; independent instructions of a sequence issue side by
// side, so a sequence whose data-flow graph is L levels deep finishes in L
// cycles when each level has at most NUM_ALUS instructions.
//
// Interface: each issue slot k has its own valid, instruction and two
// 64-bit operand words. Results are registered: a slot issued in cycle t
// shows res_valid[k], res[k] and res_sat[k] after the clock edge ending
// cycle t, a latency of one cycle with one instruction per slot per cycle.
// The operand supply (register file and scheduling) lies outside the unit;
// the slot interface and the one-cycle latency are this design's own
// choices. Synchronous active-low reset clears the valid bits.
module preshift_mm_unit
  import psa_pkg::*;
#(
  parameter int unsigned NUM_ALUS = 4,           // preshift ALUs (issue slots)
  parameter int unsigned SW       = SUBWORD_W,   // subword width
  parameter int unsigned NL       = LANES        // subwords per word
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NUM_ALUS-1:0]    issue_valid,
  input  instr_t                 issue_instr [NUM_ALUS],
  input  logic [SW*NL-1:0]       issue_a     [NUM_ALUS],
  input  logic [SW*NL-1:0]       issue_b     [NUM_ALUS],
  output logic [NUM_ALUS-1:0]    res_valid,
  output logic [SW*NL-1:0]       res         [NUM_ALUS],
  output logic [NL-1:0]          res_sat     [NUM_ALUS]
);

  logic [SW*NL-1:0] alu_y   [NUM_ALUS];
  logic [NL-1:0]    alu_sat [NUM_ALUS];

  for (genvar k = 0; k < NUM_ALUS; k++) begin : g_alu
    subword_alu #(.SW(SW), .NL(NL)) u_alu (
      .instr(issue_instr[k]),
      .a(issue_a[k]),
      .b(issue_b[k]),
      .y(alu_y[k]),
      .sat(alu_sat[k])
    );

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        res_valid[k] <= 1'b0;
        res[k]       <= '0;
        res_sat[k]   <= '0;
      end else begin
        res_valid[k] <= issue_valid[k];
        if (issue_valid[k]) begin
          res[k]     <= alu_y[k];
          res_sat[k] <= alu_sat[k];
        end
      end
    end
  end

endmodule
