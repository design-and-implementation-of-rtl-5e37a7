// tb_counter_7_3: exhaustive test of the (7,3) counter.
// Every one of the 2**7 input words is applied, one per testbench clock;
// the output must equal the number of ones in the word ($countones). Since
// the counter is combinational, the result is sampled in the same cycle.
// A watchdog ends the run if the stimulus loop does not finish.
module tb_counter_7_3;
  logic [7-1:0] x;
  logic [3-1:0] y;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  counter_7_3 dut (.x(x), .y(y));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 7); v++) begin
      @(negedge clk);
      x = 7'(v);
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
