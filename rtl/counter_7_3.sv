// counter_7_3: (7,3) counter built from two small sorting networks and
// one-hot codes.
//
// The seven inputs are split into a group of four, x[3:0], and a group of
// three, x[6:4]. Each group is sorted into a thermometer code (sn4, sn3),
// padded with a fixed 1 on top and a fixed 0 at the bottom, and turned into
// a one-hot code of its count: P0..P4 for the group of four, Q0..Q3 for the
// group of three (onehot_gen). The binary count y = P + Q is then read off
// the two codes with three sum-of-products expressions:
//   y[0] = (P1 | P3) ^ (Q1 | Q3)                                  parity
//   y[1] = Q0(P2|P3) | Q1(P1|P2) | Q2 ~(P2|P3) | Q3 ~(P1|P2)
//   y[2] = P4 | P3 ~Q0 | P2 (Q2|Q3) | P1 Q3                       sum >= 4
// P0 appears in none of the equations and is left unused (a lint warning
// about it is expected). No adder is used; the critical path is three
// sorter layers, one junction gate and a two-level AND/OR.
//
// Interface: x[6:0] in (all of weight 1), y[2:0] out = number of ones in x.
// Combinational, no clock. The split, the padding and the output equations
// follow the source; which input bits form which group is this design's
// choice (any split works, since all inputs have the same weight).
module counter_7_3
  import counter_pkg::*;
(
  input  logic [C73_IN-1:0]  x,
  output logic [C73_OUT-1:0] y
);

  logic [C73_NP-1:0] sp;   // sorted group of four
  logic [C73_NQ-1:0] sq;   // sorted group of three
  logic [C73_NP:0]   p;    // one-hot P0..P4
  logic [C73_NQ:0]   q;    // one-hot Q0..Q3

  sn4 u_sn4 (.x(x[3:0]), .s(sp));
  sn3 u_sn3 (.x(x[6:4]), .s(sq));

  onehot_gen #(.N(C73_NP)) u_ohp (.s(sp), .oh(p));
  onehot_gen #(.N(C73_NQ)) u_ohq (.s(sq), .oh(q));

  always_comb begin
    y[0] = (p[1] | p[3]) ^ (q[1] | q[3]);
    y[1] = (q[0] & (p[2] | p[3]))
         | (q[1] & (p[1] | p[2]))
         | (q[2] & ~(p[2] | p[3]))
         | (q[3] & ~(p[1] | p[2]));
    y[2] = p[4]
         | (p[3] & ~q[0])
         | (p[2] & (q[2] | q[3]))
         | (p[1] & q[3]);
  end

endmodule
