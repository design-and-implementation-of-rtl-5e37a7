// onehot_gen: one-hot code of the number of ones in a sorted sequence.
//
// The sorted sequence s[N-1:0] (ones at the top) is padded with a fixed 1
// above its top bit and a fixed 0 below its bottom bit. The padded sequence
// then always has exactly one place where a 1 sits directly above a 0, the
// 0/1 junction, even when s is all zeros or all ones. The junction below k
// ones is marked as oh[k]: oh[k] = pad[N+1-k] & ~pad[N-k]. The fixed 1 is not
// counted. Each output bit is a single 2-input gate; the two end bits
// simplify away (oh[0] = ~s[N-1], oh[N] = s[0]).
//
// Interface: s[N-1:0] sorted input, oh[N:0] one-hot output. Combinational.
// Padding and junction detection follow the source; the index convention is
// this design's own.
module onehot_gen #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] s,
  output logic [N:0]   oh
);

  logic [N+1:0] pad;

  assign pad = {1'b1, s, 1'b0};

  always_comb begin
    for (int unsigned k = 0; k <= N; k++) begin
      oh[k] = pad[N+1-k] & ~pad[N-k];
    end
  end

endmodule
