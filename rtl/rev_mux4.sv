// rev_mux4 - 4x1 reversible multiplexer made of three COG gates.
//
// The multiplexer is built in three stages, each one COG gate used as a 2x1
// multiplexer (see cog_gate: r = a ? b : c):
//
//   stage 1: select s1 chooses between the two low data inputs d[1], d[0]
//   stage 2: select s1, taken from the p output of stage 1 (which carries
//            s1 through unchanged), chooses between the two high inputs
//            d[3], d[2]
//   stage 3: select s0 chooses between the stage 2 result (s0 = 1) and the
//            stage 1 result (s0 = 0)
//
// so y = d[{s0, s1}]: s1 picks within a pair and s0 picks the pair. This is
// the ordering of the published output expression (s0's1 selects I1,
// s0s1' selects I2), which differs from the usual {s1, s0} numbering.
//
// The six inputs (s1, s0, d[3:0]) map one-to-one onto the six outputs
// (s1_out, s0_out, y, g[2:0]); no constant (ancilla) input is needed.
// s1_out and s0_out return the select lines from the p outputs of stages 2
// and 3 so that a following multiplexer can use them; g holds the q
// (garbage) output of stages 1, 2 and 3 in bits 0, 1 and 2.
//
// Purely combinational, no clock; the path from a data input to y passes
// through two gates.
module rev_mux4 (
  input  logic [3:0] d,
  input  logic       s1,
  input  logic       s0,
  output logic       y,
  output logic       s1_out,
  output logic       s0_out,
  output logic [2:0] g
);

  logic s1_st1;     // s1 passed on by stage 1
  logic y_lo;       // stage 1 result: d[1] or d[0]
  logic y_hi;       // stage 2 result: d[3] or d[2]

  cog_gate u_stage1 (
    .a(s1),     .b(d[1]), .c(d[0]),
    .p(s1_st1), .q(g[0]), .r(y_lo)
  );

  cog_gate u_stage2 (
    .a(s1_st1), .b(d[3]), .c(d[2]),
    .p(s1_out), .q(g[1]), .r(y_hi)
  );

  cog_gate u_stage3 (
    .a(s0),     .b(y_hi), .c(y_lo),
    .p(s0_out), .q(g[2]), .r(y)
  );

endmodule
