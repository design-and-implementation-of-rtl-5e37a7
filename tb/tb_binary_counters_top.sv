// tb_binary_counters_top: end-to-end test of both counters at their full
// (and only) size.
//
// Every one of the 2**15 words is applied to the (15,4) counter and every
// one of the 2**7 words to the (7,3) counter (repeated), one word per clock
// of a testbench clock. Each output must equal the number of ones in its
// input ($countones). Because both counters are combinational the result is
// sampled in the cycle its input is applied: zero-cycle latency is checked.
//
// Besides the results, the test counts how often each mechanism of the
// design was exercised and fails if one never was:
//  * every output value (0..7 and 0..15) of each counter,
//  * every position of each of the four one-hot codes (P and Q of each
//    counter), including the two extreme positions where the 0/1 junction
//    falls on the fixed padding bit (all inputs 0, all inputs 1),
//  * a swap in a sorter of each sorting network (upper input 0, lower 1).
// A watchdog ends the run if the stimulus loop does not finish.
module tb_binary_counters_top;
  logic [6:0]  x7;
  logic [2:0]  y7;
  logic [14:0] x15;
  logic [3:0]  y15;
  int   checks = 0, failures = 0;
  int   seen_y7  [8];
  int   seen_y15 [16];
  int   seen_p73 [5],  seen_q73 [4];
  int   seen_p154[9],  seen_q154[8];
  int   swaps_sn4 = 0, swaps_sn3 = 0, swaps_sn8 = 0, swaps_sn7 = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  binary_counters_top dut (.x7(x7), .y7(y7), .x15(x15), .y15(y15));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic require(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    foreach (seen_y7[i])   seen_y7[i]   = 0;
    foreach (seen_y15[i])  seen_y15[i]  = 0;
    foreach (seen_p73[i])  seen_p73[i]  = 0;
    foreach (seen_q73[i])  seen_q73[i]  = 0;
    foreach (seen_p154[i]) seen_p154[i] = 0;
    foreach (seen_q154[i]) seen_q154[i] = 0;

    for (int v = 0; v < (1 << 15); v++) begin
      @(negedge clk);
      x15 = 15'(v);
      x7  = 7'(v);
      @(posedge clk);

      checks++;
      if (int'(y15) != $countones(x15)) begin
        failures++;
        if (failures < 20) $display("FAIL (15,4) x=%b y=%0d", x15, y15);
      end
      checks++;
      if (int'(y7) != $countones(x7)) begin
        failures++;
        if (failures < 20) $display("FAIL (7,3) x=%b y=%0d", x7, y7);
      end

      seen_y7[y7]++;
      seen_y15[y15]++;
      for (int k = 0; k < 5; k++) if (dut.u_c73.p[k])  seen_p73[k]++;
      for (int k = 0; k < 4; k++) if (dut.u_c73.q[k])  seen_q73[k]++;
      for (int k = 0; k < 9; k++) if (dut.u_c154.p[k]) seen_p154[k]++;
      for (int k = 0; k < 8; k++) if (dut.u_c154.q[k]) seen_q154[k]++;
      if (!dut.u_c73.u_sn4.u_l1a.in_hi && dut.u_c73.u_sn4.u_l1a.in_lo) swaps_sn4++;
      if (!dut.u_c73.u_sn3.u_l1.in_hi  && dut.u_c73.u_sn3.u_l1.in_lo)  swaps_sn3++;
      if (!dut.u_c154.u_sn8.g_stage[2].g_merge[0].g_elem[0].g_cmp.g_up.u_cmp.in_hi &&
           dut.u_c154.u_sn8.g_stage[2].g_merge[0].g_elem[0].g_cmp.g_up.u_cmp.in_lo)
        swaps_sn8++;
      if (!dut.u_c154.u_sn7.u_bitonic8.g_stage[1].g_merge[0].g_elem[2].g_cmp.g_down.u_cmp.in_hi &&
           dut.u_c154.u_sn7.u_bitonic8.g_stage[1].g_merge[0].g_elem[2].g_cmp.g_down.u_cmp.in_lo)
        swaps_sn7++;
    end

    for (int k = 0; k < 8; k++)  require($sformatf("(7,3) output %0d", k), seen_y7[k]);
    for (int k = 0; k < 16; k++) require($sformatf("(15,4) output %0d", k), seen_y15[k]);
    for (int k = 0; k < 5; k++)  require($sformatf("(7,3) P%0d", k), seen_p73[k]);
    for (int k = 0; k < 4; k++)  require($sformatf("(7,3) Q%0d", k), seen_q73[k]);
    for (int k = 0; k < 9; k++)  require($sformatf("(15,4) P%0d", k), seen_p154[k]);
    for (int k = 0; k < 8; k++)  require($sformatf("(15,4) Q%0d", k), seen_q154[k]);
    require("swap in 4-input network", swaps_sn4);
    require("swap in 3-input network", swaps_sn3);
    require("swap in 8-input bitonic network", swaps_sn8);
    require("swap in 7-input bitonic network", swaps_sn7);

    $display("mechanisms: P0 (all zero) %0d, P8 (all one) %0d, swaps sn4/sn3/sn8/sn7 %0d/%0d/%0d/%0d",
             seen_p154[0], seen_p154[8], swaps_sn4, swaps_sn3, swaps_sn8, swaps_sn7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
