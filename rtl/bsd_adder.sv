// Carry-limited adder for two binary signed-digit (BSD) numbers.
//
// Each N-digit operand is a posibit vector and a negabit vector (value
// pos - neg). Every position adds the four bits of its two digits with two
// levels of full adders, and no carry travels further than one position up,
// so the delay does not depend on N:
//   level 1: FA(xp, yp, ~xn) gives s1 and c1. With ~yn it leaves at this
//            position s1 + ~yn - 2 + 2*c1, i.e. s1 + ~yn at this position and
//            a negabit (value c1 - 1) sent to the next position.
//   level 2: FA(s1, ~yn, c1 from below) gives s2 and c2. The sum digit is the
//            negabit ~s2 at this position plus the posibit c2 from below.
// The sum has N+1 digits and equals x + y exactly. This is a plain
// combinational block with no clock.
//
// The document presents a BSD adder built from a two-digit slice whose
// critical path is three full adders; its gate-level slice is not given, and
// this two-level full-adder cell with the same carry-free property is this
// design's own.
module bsd_adder #(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0] x_pos,
  input  logic [N-1:0] x_neg,
  input  logic [N-1:0] y_pos,
  input  logic [N-1:0] y_neg,
  output logic [N:0]   s_pos,
  output logic [N:0]   s_neg
);

  logic [N-1:0] s1, c1, s2, c2;
  logic [N:0]   c1_in, c2_in;   // transfers arriving at each position

  // The two levels are written as whole-vector bit operations.
  always_comb begin
    // level 1: posibit xp, posibit yp, inverted negabit ~xn
    s1 = x_pos ^ y_pos ^ ~x_neg;
    c1 = (x_pos & y_pos) | (x_pos & ~x_neg) | (y_pos & ~x_neg);
    c1_in = {c1, 1'b1};  // inverted negabit 1 = digit value 0 at the bottom
    // level 2: s1, inverted negabit ~yn, inverted negabit from below
    s2 = s1 ^ ~y_neg ^ c1_in[N-1:0];
    c2 = (s1 & ~y_neg) | (s1 & c1_in[N-1:0]) | (~y_neg & c1_in[N-1:0]);
    c2_in = {c2, 1'b0};
    // result digit i: posibit from below and negabit (inverted s2)
    s_pos = c2_in;
    s_neg = {~c1_in[N], ~s2};
  end

endmodule
