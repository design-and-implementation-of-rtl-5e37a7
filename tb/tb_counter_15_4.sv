// tb_counter_15_4: exhaustive test of the (15,4) counter.
// Every one of the 2**15 input words is applied, one per testbench clock;
// the output must equal the number of ones in the word ($countones). Since
// the counter is combinational, the result is sampled in the same cycle.
// A watchdog ends the run if the stimulus loop does not finish.
module tb_counter_15_4;
  logic [15-1:0] x;
  logic [4-1:0] y;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  counter_15_4 dut (.x(x), .y(y));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 15); v++) begin
      @(negedge clk);
      x = 15'(v);
      @(posedge clk);
      checks++;
      if (int'(y) != $countones(x)) begin
        failures++;
        if (failures < 20) $display("FAIL x=%b y=%0d expected %0d", x, y, $countones(x));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
