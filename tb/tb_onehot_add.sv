// tb_onehot_add: tests the one-hot adder at its default size (P0..P8,
// Q0..Q7, 4-bit sum) and at the (7,3) size (P0..P4, Q0..Q3, 3-bit sum).
// Every pair of one-hot codes is applied; the output must be the integer
// sum of the two hot positions.
// A watchdog ends the run if the stimulus loop does not finish.
module tb_onehot_add;
  logic [8:0] p;  logic [7:0] q;  logic [3:0] y;
  logic [4:0] ps; logic [3:0] qs; logic [2:0] ys;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  onehot_add                          dut  (.p(p),  .q(q),  .y(y));
  onehot_add #(.NP(4), .NQ(3), .W(3)) dut7 (.p(ps), .q(qs), .y(ys));

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i <= 8; i++) begin
      for (int j = 0; j <= 7; j++) begin
        @(negedge clk);
        p  = 9'(1) << i;
        q  = 8'(1) << j;
        ps = 5'(1) << i;
        qs = 4'(1) << j;
        @(posedge clk);
        checks++;
        if (int'(y) != i + j) begin
          failures++;
          $display("FAIL default i=%0d j=%0d y=%0d", i, j, y);
        end
        if (i <= 4 && j <= 3) begin
          checks++;
          if (int'(ys) != i + j) begin
            failures++;
            $display("FAIL small i=%0d j=%0d y=%0d", i, j, ys);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
