// counter_15_4: (15,4) counter built from bitonic sorting networks and
// one-hot codes.
//
// The fifteen inputs go in two groups: x[7:0] into the 8-input bitonic
// sorting network and x[14:8] into the 7-input one. Each sorted group is
// padded with a fixed 1 on top and a fixed 0 at the bottom, and the single
// 1-above-0 junction gives a one-hot code of its count: P0..P8 and Q0..Q7.
// The four output bits are the binary sum P + Q, read off the two codes by
// a two-level AND/OR network (onehot_add).
//
// Interface: x[14:0] in (all of weight 1), y[3:0] out = number of ones in x.
// Combinational, no clock; the longest path is the six layers of the
// bitonic network, one junction gate and the AND/OR output stage. The use
// of 8- and 7-input bitonic networks follows the source; the grouping of
// input bits and the form of the output logic are this design's choices.
module counter_15_4
  import counter_pkg::*;
(
  input  logic [C154_IN-1:0]  x,
  output logic [C154_OUT-1:0] y
);

  logic [C154_NP-1:0] sp;   // sorted group of eight
  logic [C154_NQ-1:0] sq;   // sorted group of seven
  logic [C154_NP:0]   p;    // one-hot P0..P8
  logic [C154_NQ:0]   q;    // one-hot Q0..Q7

  bitonic_sorter #(.LOGN(3)) u_sn8 (.x(x[7:0]),  .s(sp));
  sn7_bitonic                u_sn7 (.x(x[14:8]), .s(sq));

  onehot_gen #(.N(C154_NP)) u_ohp (.s(sp), .oh(p));
  onehot_gen #(.N(C154_NQ)) u_ohq (.s(sq), .oh(q));

  onehot_add #(.NP(C154_NP), .NQ(C154_NQ), .W(C154_OUT)) u_sum (
    .p(p), .q(q), .y(y)
  );

endmodule
