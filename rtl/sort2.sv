// sort2: 1-bit two-input sorter, the comparator every sorting network in the
// design is made of.
//
// For 1-bit data the larger of two values is their OR and the smaller their
// AND, so the sorter is one layer of two 2-input gates. The two bits swap
// when the upper input is 0 and the lower is 1, and pass unchanged otherwise.
//
// Interface: upper/lower inputs in_hi and in_lo; out_hi gets the larger,
// out_lo the smaller value. Purely combinational, one gate delay.
module sort2 (
  input  logic in_hi,
  input  logic in_lo,
  output logic out_hi,
  output logic out_lo
);

  always_comb begin
    out_hi = in_hi | in_lo;
    out_lo = in_hi & in_lo;
  end

endmodule
