// tb_sn3: exhaustive test of the 3-input sorting network.
// Every input word is applied; the output must be the thermometer code with
// as many ones, at the top, as the input holds (counted with $countones).
// A watchdog ends the run if the stimulus loop does not finish.
module tb_sn3;
  localparam int N = 3;
  logic [N-1:0] x, s, expect_s;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  sn3 dut (.x(x), .s(s));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      @(negedge clk);
      x = N'(v);
      @(posedge clk);
      expect_s = '0;
      for (int k = 0; k < $countones(x); k++) expect_s[N-1-k] = 1'b1;
      checks++;
      if (s !== expect_s) begin
        failures++;
        $display("FAIL x=%b s=%b expected %b", x, s, expect_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
