// tb_onehot_gen: tests the one-hot code generator at its default size (4)
// and at the other sizes the counters use (3, 7, 8).
// For every count k a sorted thermometer word with k ones at the top is
// applied; the output must have bit k, and only bit k, set.
// A watchdog ends the run if the stimulus loop does not finish.
module tb_onehot_gen;
  logic [3:0] s4;  logic [4:0] oh4;
  logic [2:0] s3;  logic [3:0] oh3;
  logic [6:0] s7;  logic [7:0] oh7;
  logic [7:0] s8;  logic [8:0] oh8;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  onehot_gen           dut4 (.s(s4), .oh(oh4));
  onehot_gen #(.N(3))  dut3 (.s(s3), .oh(oh3));
  onehot_gen #(.N(7))  dut7 (.s(s7), .oh(oh7));
  onehot_gen #(.N(8))  dut8 (.s(s8), .oh(oh8));

  // thermometer word of width n with k ones at the top
  function automatic logic [7:0] thermo(input int n, input int k);
    logic [7:0] t = '0;
    for (int b = 0; b < k; b++) t[n-1-b] = 1'b1;
    return t;
  endfunction

  task automatic check(input string name, input int k, input logic [8:0] got);
    logic [8:0] expect_oh = 9'(1) << k;
    checks++;
    if (got !== expect_oh) begin
      failures++;
      $display("FAIL %s k=%0d oh=%b expected %b", name, k, got, expect_oh);
    end
  endtask

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= 8; k++) begin
      @(negedge clk);
      s4 = 4'(thermo(4, (k > 4) ? 4 : k));
      s3 = 3'(thermo(3, (k > 3) ? 3 : k));
      s7 = 7'(thermo(7, (k > 7) ? 7 : k));
      s8 = thermo(8, k);
      @(posedge clk);
      if (k <= 4) check("N=4", k, 9'(oh4));
      if (k <= 3) check("N=3", k, 9'(oh3));
      if (k <= 7) check("N=7", k, 9'(oh7));
      check("N=8", k, oh8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
