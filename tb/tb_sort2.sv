// tb_sort2: exhaustive test of the 1-bit sorter.
// All four input pairs are applied, one per clock of a testbench clock; the
// upper output must be the larger and the lower output the smaller input,
// worked out with a numeric comparison. A watchdog ends the run if the
// stimulus loop does not finish.
module tb_sort2;
  logic in_hi, in_lo, out_hi, out_lo;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  sort2 dut (.in_hi(in_hi), .in_lo(in_lo), .out_hi(out_hi), .out_lo(out_lo));

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      @(negedge clk);
      {in_hi, in_lo} = 2'(v);
      @(posedge clk);
      checks++;
      if (out_hi !== ((in_hi > in_lo) ? in_hi : in_lo) ||
          out_lo !== ((in_hi > in_lo) ? in_lo : in_hi)) begin
        failures++;
        $display("FAIL in=%b%b out=%b%b", in_hi, in_lo, out_hi, out_lo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
