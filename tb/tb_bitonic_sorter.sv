// tb_bitonic_sorter: exhaustive test of the bitonic sorting network at the
// default size (8 inputs) and at 4 and 16 inputs.
// Every input word of each size is applied; each output must be the
// thermometer code with as many ones, at the top, as its input holds.
// A watchdog ends the run if the stimulus loop does not finish.
module tb_bitonic_sorter;
  logic [7:0]  x8,  s8,  e8;
  logic [3:0]  x4,  s4,  e4;
  logic [15:0] x16, s16, e16;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  bitonic_sorter              dut8  (.x(x8),  .s(s8));
  bitonic_sorter #(.LOGN(2))  dut4  (.x(x4),  .s(s4));
  bitonic_sorter #(.LOGN(4))  dut16 (.x(x16), .s(s16));

  function automatic logic [15:0] thermo(input int n, input int ones);
    logic [15:0] t = '0;
    for (int k = 0; k < ones; k++) t[n-1-k] = 1'b1;
    return t;
  endfunction

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 16); v++) begin
      @(negedge clk);
      x16 = 16'(v);
      x8  = 8'(v);
      x4  = 4'(v);
      @(posedge clk);
      e16 = thermo(16, $countones(x16));
      checks++;
      if (s16 !== e16) begin
        failures++;
        $display("FAIL N=16 x=%b s=%b", x16, s16);
      end
      if (v < 256) begin
        e8 = 8'(thermo(8, $countones(x8)));
        checks++;
        if (s8 !== e8) begin
          failures++;
          $display("FAIL N=8 x=%b s=%b expected %b", x8, s8, e8);
        end
      end
      if (v < 16) begin
        e4 = 4'(thermo(4, $countones(x4)));
        checks++;
        if (s4 !== e4) begin
          failures++;
          $display("FAIL N=4 x=%b s=%b expected %b", x4, s4, e4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
