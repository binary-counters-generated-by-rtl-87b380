// tb_sn3 -- exhaustive check of the 3-way bit sorting network.
// Every one of the 8 input patterns is applied. The output must be a
// descending thermometer code whose k-th line (k = 1..3) is 1 exactly when
// at least k inputs are 1; the reference count is taken bit by bit from
// the input. The network is combinational, so the result is checked in the
// same time step as the input is applied.
module tb_sn3;
  localparam int N = 3;
  logic [N-1:0] x, s;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  sn3 dut (.x(x), .s(s));

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
      for (int k = 0; k < N; k++) begin
        checks++;
        if (s[k] !== (ones > k)) begin
          failures++;
          $display("FAIL x=%b s=%b line %0d", x, s, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
