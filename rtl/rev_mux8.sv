// rev_mux8 - 8x1 reversible multiplexer (top level).
//
// Two 4x1 reversible multiplexers (rev_mux4) and one COG gate used as a 2x1
// multiplexer (cog_gate), seven COG gates in all:
//
//   upper 4x1: data i[7:4], selects s1, s0
//   lower 4x1: data i[3:0], the same s1, s0, taken from the select outputs
//              of the upper 4x1 (the gates pass the select lines through,
//              so no fan-out gate and no constant input is needed)
//   2x1:       select s2 chooses the upper result (s2 = 1) or the lower
//              result (s2 = 0)
//
// The output follows the published sum of products
//
//   y = s0's1's2'I0 + s0's1's2 I4 + s0's1 s2'I1 + s0's1 s2 I5
//     + s0 s1's2'I2 + s0 s1's2 I6 + s0 s1 s2'I3 + s0 s1 s2 I7
//
// i.e. y = i[{s[2], s[0], s[1]}]: s2 picks the half, s0 the pair within the
// half and s1 the input within the pair.
//
// Reversibility: the eleven inputs (i, s) map one-to-one onto the eleven
// outputs (y, s_out, g). s_out returns s2, s1, s0 from the gates' pass-
// through outputs; g holds the seven garbage outputs: g[2:0] from the lower
// 4x1, g[5:3] from the upper 4x1 and g[6] from the 2x1 gate. The design has
// no ancilla inputs and ten garbage outputs (s_out and g).
//
// Purely combinational, no clock; a data input reaches y through three
// gates, the worst path (s1 through the chained select) through five.
module rev_mux8 (
  input  logic [7:0] i,
  input  logic [2:0] s,
  output logic       y,
  output logic [2:0] s_out,
  output logic [6:0] g
);

  logic y_hi, y_lo;       // results of the upper and lower 4x1
  logic s1_mid, s0_mid;   // s1, s0 passed from the upper to the lower 4x1

  rev_mux4 u_upper (
    .d(i[7:4]), .s1(s[1]), .s0(s[0]),
    .y(y_hi), .s1_out(s1_mid), .s0_out(s0_mid), .g(g[5:3])
  );

  rev_mux4 u_lower (
    .d(i[3:0]), .s1(s1_mid), .s0(s0_mid),
    .y(y_lo), .s1_out(s_out[1]), .s0_out(s_out[0]), .g(g[2:0])
  );

  cog_gate u_2x1 (
    .a(s[2]),     .b(y_hi), .c(y_lo),
    .p(s_out[2]), .q(g[6]), .r(y)
  );

endmodule
