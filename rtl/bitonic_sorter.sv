// bitonic_sorter: bitonic sorting network for 2**LOGN one-bit inputs.
//
// Bitonic sort works in stages. Stage kk (kk = 1 .. LOGN) takes blocks of
// 2**kk values whose two halves are already sorted in opposite directions (a
// bitonic sequence: rising, then falling) and merges each block. A merge is
// a chain of compare-and-swap layers: values 2**jj apart are compared
// (jj = kk-1 down to 0), each comparison splitting the block into two halves
// in which every element of one half is no larger than every element of the
// other, until single elements remain. Blocks alternate direction inside a
// stage so that the next stage again sees bitonic input; the last stage
// sorts the whole vector in one direction. Every compare-and-swap is a sort2
// (OR for the larger, AND for the smaller value).
//
// For LOGN = 3 this is the 8-input network of the (15,4) counter: 6 layers,
// 24 sorters.
//
// Interface: x[N-1:0] in, s[N-1:0] out, sorted with its ones at the top
// (s[N-1] largest). Combinational, LOGN*(LOGN+1)/2 sorter delays. The method
// follows the source; the direction convention is this design's own.
module bitonic_sorter
  import counter_pkg::*;
#(
  parameter int unsigned LOGN = 3,
  localparam int unsigned N      = 1 << LOGN,
  localparam int unsigned LAYERS = bitonic_layers(LOGN)
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] s
);

  // stage[0] is the input, stage[LAYERS] the sorted output
  logic [N-1:0] stage [LAYERS+1];

  assign stage[0] = x;
  assign s        = stage[LAYERS];

  for (genvar kk = 1; kk <= LOGN; kk++) begin : g_stage
    for (genvar jj = kk - 1; jj >= 0; jj--) begin : g_merge
      localparam int unsigned L = bitonic_layer_index(kk, jj);
      for (genvar i = 0; i < N; i++) begin : g_elem
        localparam int unsigned PARTNER = i ^ (1 << jj);
        if (PARTNER > i) begin : g_cmp
          // Blocks with bit kk of the index clear sort upwards (larger value
          // at the higher index); the others sort downwards.
          if (((i >> kk) & 1) == 0) begin : g_up
            sort2 u_cmp (.in_hi(stage[L][PARTNER]), .in_lo(stage[L][i]),
                         .out_hi(stage[L+1][PARTNER]), .out_lo(stage[L+1][i]));
          end else begin : g_down
            sort2 u_cmp (.in_hi(stage[L][i]), .in_lo(stage[L][PARTNER]),
                         .out_hi(stage[L+1][i]), .out_lo(stage[L+1][PARTNER]));
          end
        end
      end
    end
  end

endmodule
