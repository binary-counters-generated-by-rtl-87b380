// tb_counter_15_4 -- exhaustive check of the saturated (15,4) counter.
// All 32768 input patterns are applied; the output must equal the
// number of 1s in the input, counted bit by bit in the testbench. The
// counter is combinational, so the result is checked in the same time step
// (zero clock cycles of latency).
module tb_counter_15_4;
  localparam int N = 15;
  logic [N-1:0] x;
  logic [4-1:0] cnt;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  counter_15_4 dut (.x(x), .cnt(cnt));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      int ones;
      x = v[N-1:0];
      ones = 0;
      for (int k = 0; k < N; k++) ones += int'(x[k]);
      #1;
      checks++;
      if (int'(cnt) != ones) begin
        failures++;
        if (failures < 10) $display("FAIL x=%b cnt=%0d expected %0d", x, cnt, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
