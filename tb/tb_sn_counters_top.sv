// tb_sn_counters_top -- end-to-end test of both counters at full size.
//
// Sweeps all 128 inputs of the (7,3) counter and all 32768 inputs of the
// (15,4) counter and compares each result with a bit-by-bit count made in
// the testbench. It also counts how often each way of forming the most
// significant output occurred, and fails if one never did:
//   - the first (larger) sorted group alone reaches the threshold
//     (e.g. P4 & Q0 for the (7,3) counter),
//   - both groups together reach it though neither does alone,
//   - the threshold is not reached,
//   - saturation: every input is 1 (largest representable count).
// The top has no clock; results are checked in the same time step.
module tb_sn_counters_top;
  logic [6:0]  x7;
  logic [2:0]  cnt7;
  logic [14:0] x15;
  logic [3:0]  cnt15;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  // mechanism counters: [0] = (7,3), [1] = (15,4)
  int top_from_first [2];
  int top_from_both  [2];
  int top_not_reached[2];
  int saturated      [2];

  sn_counters_top dut (.x7(x7), .cnt7(cnt7), .x15(x15), .cnt15(cnt15));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Classify one input by its two group counts against threshold t.
  task automatic classify(int idx, int a, int b, int t, int total_inputs);
    if (a >= t)                 top_from_first[idx]++;
    else if (a + b >= t)        top_from_both[idx]++;
    else                        top_not_reached[idx]++;
    if (a + b == total_inputs)  saturated[idx]++;
  endtask

  task automatic check_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL never exercised: %s", what);
    end
  endtask

  initial begin
    for (int k = 0; k < 2; k++) begin
      top_from_first[k] = 0; top_from_both[k] = 0;
      top_not_reached[k] = 0; saturated[k] = 0;
    end
    x7  = '0;
    x15 = '0;

    // (7,3): x7[3:0] feed the 4-way network, x7[6:4] the 3-way network
    for (int v = 0; v < 128; v++) begin
      int a, b;
      x7 = v[6:0];
      a = 0; b = 0;
      for (int k = 0; k < 4; k++) a += int'(x7[k]);
      for (int k = 4; k < 7; k++) b += int'(x7[k]);
      classify(0, a, b, 4, 7);
      #1;
      checks++;
      if (int'(cnt7) != a + b) begin
        failures++;
        if (failures < 10) $display("FAIL (7,3) x=%b cnt=%0d expected %0d", x7, cnt7, a + b);
      end
    end

    // (15,4): x15[7:0] feed the 8-way network, x15[14:8] the 7-way network
    for (int v = 0; v < 32768; v++) begin
      int a, b;
      x15 = v[14:0];
      a = 0; b = 0;
      for (int k = 0; k < 8; k++)  a += int'(x15[k]);
      for (int k = 8; k < 15; k++) b += int'(x15[k]);
      classify(1, a, b, 8, 15);
      #1;
      checks++;
      if (int'(cnt15) != a + b) begin
        failures++;
        if (failures < 10) $display("FAIL (15,4) x=%b cnt=%0d expected %0d", x15, cnt15, a + b);
      end
    end

    for (int k = 0; k < 2; k++) begin
      $display("counter %s: top bit from first group %0d, from both groups %0d, not reached %0d, saturated %0d",
               k == 0 ? "(7,3)" : "(15,4)", top_from_first[k], top_from_both[k],
               top_not_reached[k], saturated[k]);
      check_seen("top bit from first group alone", top_from_first[k]);
      check_seen("top bit from both groups",        top_from_both[k]);
      check_seen("top bit not reached",             top_not_reached[k]);
      check_seen("saturation",                      saturated[k]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
