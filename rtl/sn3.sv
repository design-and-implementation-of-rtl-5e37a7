// sn3: three-input sorting network for 1-bit data.
//
// Three layers of one sorter each: (2,1), then (1,0), then (2,1) again.
// After the first two layers the bottom output already holds the smallest
// value; the last layer orders the top two.
// The output is a thermometer code with its ones at the top (x[2]), so the
// number of ones is preserved and they sit above all zeros.
//
// Interface: x[2:0] in, s[2:0] out (s[2] largest). Combinational, three
// sorter delays. The choice of comparator pairs is this design's own; the
// three-layer depth follows the source description.
module sn3 (
  input  logic [2:0] x,
  output logic [2:0] s
);

  logic [2:0] l1, l2;

  // layer 1: order the upper pair
  sort2 u_l1 (.in_hi(x[2]),  .in_lo(x[1]),  .out_hi(l1[2]), .out_lo(l1[1]));
  assign l1[0] = x[0];

  // layer 2: move the smallest value to the bottom
  sort2 u_l2 (.in_hi(l1[1]), .in_lo(l1[0]), .out_hi(l2[1]), .out_lo(l2[0]));
  assign l2[2] = l1[2];

  // layer 3: order the upper pair again
  sort2 u_l3 (.in_hi(l2[2]), .in_lo(l2[1]), .out_hi(s[2]),  .out_lo(s[1]));
  assign s[0] = l2[0];

endmodule
