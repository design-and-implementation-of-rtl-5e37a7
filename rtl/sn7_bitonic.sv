// sn7_bitonic: seven-input sorting network built with the bitonic method.
//
// A bitonic network needs a power-of-two number of inputs, so the seven
// inputs are placed above one fixed 0 and sorted by the 8-input bitonic
// network. The fixed 0 is never larger than any input, so it always ends up
// at the bottom output, which is dropped; the seven outputs above it are the
// sorted inputs. Sorters fed by the constant reduce to wires or to the other
// input after synthesis.
//
// Interface: x[6:0] in, s[6:0] out, ones at the top (s[6] largest).
// Combinational, six sorter delays. That the 7-input network is derived from
// the 8-input bitonic network this way is this design's choice; the source
// only states that it is built with the bitonic method.
module sn7_bitonic (
  input  logic [6:0] x,
  output logic [6:0] s
);

  logic [7:0] s8;

  bitonic_sorter #(.LOGN(3)) u_bitonic8 (.x({x, 1'b0}), .s(s8));

  assign s = s8[7:1];

  // s8[0] is the fixed 0 and carries no information.
  always_comb begin
    assert (s8[0] == 1'b0 || $isunknown(x))
      else $error("sn7_bitonic: padding zero did not reach the bottom");
  end

endmodule
