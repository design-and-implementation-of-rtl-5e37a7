// counter_pkg: constants and elaboration-time helpers shared by the
// sorting-network counters.
//
// Conventions used throughout the design:
//  * A "sorted" vector s[N-1:0] holds its ones at the top: for a count of k
//    ones, s[N-1 -: k] are 1 and the rest are 0 (a thermometer code). This
//    follows the rule that a sorter places the larger value higher.
//  * A one-hot count code oh[N:0] has exactly one bit set, oh[k] for a count k.
//  * Output widths of the two counters are those of a (7,3) and a (15,4)
//    counter.
package counter_pkg;

  // Widths of the (7,3) counter: 4 bits go to one sorting network, 3 to the
  // other.
  localparam int unsigned C73_IN   = 7;
  localparam int unsigned C73_OUT  = 3;
  localparam int unsigned C73_NP   = 4;  // bits sorted into the P code
  localparam int unsigned C73_NQ   = 3;  // bits sorted into the Q code

  // Widths of the (15,4) counter: 8 bits to the 8-input bitonic network, 7 to
  // the 7-input one.
  localparam int unsigned C154_IN  = 15;
  localparam int unsigned C154_OUT = 4;
  localparam int unsigned C154_NP  = 8;
  localparam int unsigned C154_NQ  = 7;

  // Number of comparator layers of a bitonic sorter on 2**logn inputs.
  function automatic int unsigned bitonic_layers(input int unsigned logn);
    return logn * (logn + 1) / 2;
  endfunction

  // Layer number of merge step jj (jj = kk-1 down to 0) inside bitonic
  // stage kk (kk = 1 .. logn, merging blocks of 2**kk).
  function automatic int unsigned bitonic_layer_index(input int unsigned kk,
                                                      input int unsigned jj);
    return (kk - 1) * kk / 2 + (kk - 1 - jj);
  endfunction

endpackage
