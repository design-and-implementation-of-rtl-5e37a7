// sn4: four-input sorting network for 1-bit data.
//
// Three layers, five sorters: (3,2) and (1,0); then (3,1) and (2,0), which
// puts the largest value on top and the smallest at the bottom; then (2,1)
// orders the middle pair. The output is a thermometer code with its ones at
// the top (s[3]).
//
// Interface: x[3:0] in, s[3:0] out (s[3] largest). Combinational, three
// sorter delays. The three-layer depth follows the source description; the
// comparator pairs are the standard optimal 4-input network.
module sn4 (
  input  logic [3:0] x,
  output logic [3:0] s
);

  logic [3:0] l1, l2;

  // layer 1: sort the two pairs
  sort2 u_l1a (.in_hi(x[3]),  .in_lo(x[2]),  .out_hi(l1[3]), .out_lo(l1[2]));
  sort2 u_l1b (.in_hi(x[1]),  .in_lo(x[0]),  .out_hi(l1[1]), .out_lo(l1[0]));

  // layer 2: maxima to the top, minima to the bottom
  sort2 u_l2a (.in_hi(l1[3]), .in_lo(l1[1]), .out_hi(l2[3]), .out_lo(l2[1]));
  sort2 u_l2b (.in_hi(l1[2]), .in_lo(l1[0]), .out_hi(l2[2]), .out_lo(l2[0]));

  // layer 3: order the middle pair
  sort2 u_l3  (.in_hi(l2[2]), .in_lo(l2[1]), .out_hi(s[2]),  .out_lo(s[1]));
  assign s[3] = l2[3];
  assign s[0] = l2[0];

endmodule
