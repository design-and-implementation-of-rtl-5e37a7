// onehot_add: binary sum of two one-hot coded counts.
//
// p[NP:0] codes a count i (p[i] = 1) and q[NQ:0] a count j (q[j] = 1). Bit b
// of the sum i + j is 1 exactly when some pair (i, j) with bit b of i + j set
// is active, so
//   y[b] = OR over j of ( q[j] & OR over i with bit b of (i+j) set of p[i] ).
// This is the same shape as the hand-simplified output equations of the
// (7,3) counter (grouped by the Q code): a two-level AND/OR per output bit,
// with no carry chain. The OR terms are formed at elaboration time from the
// parameters; synthesis simplifies them further.
//
// Interface: one-hot p and q in, y[W-1:0] out. Combinational. Inputs that are
// not one-hot give a meaningless y. The generic form is this design's own;
// the source gives the output expressions for the (7,3) counter only.
module onehot_add #(
  parameter int unsigned NP = 8,
  parameter int unsigned NQ = 7,
  parameter int unsigned W  = $clog2(NP + NQ + 1)
) (
  input  logic [NP:0]  p,
  input  logic [NQ:0]  q,
  output logic [W-1:0] y
);

  always_comb begin
    y = '0;
    for (int unsigned b = 0; b < W; b++) begin
      for (int unsigned j = 0; j <= NQ; j++) begin
        logic term;
        term = 1'b0;
        for (int unsigned i = 0; i <= NP; i++) begin
          if ((((i + j) >> b) & 1) != 0) term |= p[i];
        end
        y[b] |= q[j] & term;
      end
    end
  end

endmodule
