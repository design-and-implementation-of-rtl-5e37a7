// binary_counters_top: the (7,3) and the (15,4) sorting-network counters side
// by side.
//
// The two counters are independent circuits; each has its own input and
// output ports here. Both are purely combinational: a result is valid one
// propagation delay after its inputs settle, and there is no clock or reset.
//
// Interface:
//   x7[6:0]   -> y7[2:0]   number of ones among x7  (counter_7_3)
//   x15[14:0] -> y15[3:0]  number of ones among x15 (counter_15_4)
module binary_counters_top
  import counter_pkg::*;
(
  input  logic [C73_IN-1:0]   x7,
  output logic [C73_OUT-1:0]  y7,
  input  logic [C154_IN-1:0]  x15,
  output logic [C154_OUT-1:0] y15
);

  counter_7_3  u_c73  (.x(x7),  .y(y7));
  counter_15_4 u_c154 (.x(x15), .y(y15));

endmodule
