// cog_gate - 3x3 reversible COG gate, the building cell of the multiplexer.
//
// The gate maps three bits (a, b, c) one-to-one onto three bits (p, q, r):
//
//   p = a
//   q = b ^ (a & ~c)
//   r = a ? b : c          (= a'c + ab)
//
// With a = 0 the gate passes b and c unchanged; with a = 1 it swaps them and
// replaces the new middle bit by the XNOR of b and c. Each of the eight
// input patterns gives a different output pattern, so the gate loses no
// information and its inputs can always be recovered from its outputs.
//
// Output r is a 2x1 multiplexer with a as the select line (a = 1 picks b,
// a = 0 picks c); this is how the multiplexer tree uses the gate. Output p
// carries the select line on to the next gate, so a chain of gates can share
// one select line without a separate fan-out gate. Output q is a garbage
// output: it is needed only to keep the mapping reversible.
//
// Interface: a, b, c in; p, q, r out. Purely combinational, no clock.
//
// The gate's truth table (000->000, 001->001, 010->010, 011->011, 100->110,
// 101->100, 110->101, 111->111) follows the published COG gate table; the
// Boolean form above is derived from it.
module cog_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = b ^ (a & ~c);
    r = a ? b : c;
  end

endmodule
