// tb_count_encoder -- checks the output equations of both counter sizes.
// For every pair of partial counts (a, b) the testbench builds the sorted
// sequences and one-hot codes itself and expects cnt = a + b. It covers the
// (7,3) configuration (NH=4, NI=3, W=3, the defaults) and the (15,4) one
// (NH=8, NI=7, W=4).
module tb_count_encoder;
  logic [3:0] h3;  logic [2:0] i3;  logic [4:0] p3;  logic [3:0] q3;  logic [2:0] c3;
  logic [7:0] h4;  logic [6:0] i4;  logic [8:0] p4;  logic [7:0] q4;  logic [3:0] c4;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  count_encoder dut73 (.h(h3), .i(i3), .p(p3), .q(q3), .cnt(c3));
  count_encoder #(.NH(8), .NI(7), .W(4)) dut154 (.h(h4), .i(i4), .p(p4), .q(q4), .cnt(c4));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a <= 8; a++) begin
      for (int b = 0; b <= 7; b++) begin
        h4 = 8'((16'd1 << a) - 1);  p4 = 9'(1 << a);
        i4 = 7'((16'd1 << b) - 1);  q4 = 8'(1 << b);
        h3 = 4'((16'd1 << a) - 1);  p3 = 5'(1 << a);
        i3 = 3'((16'd1 << b) - 1);  q3 = 4'(1 << b);
        #1;
        checks++;
        if (int'(c4) != a + b) begin
          failures++;
          $display("FAIL (15,4) a=%0d b=%0d cnt=%0d", a, b, c4);
        end
        if (a <= 4 && b <= 3) begin
          checks++;
          if (int'(c3) != a + b) begin
            failures++;
            $display("FAIL (7,3) a=%0d b=%0d cnt=%0d", a, b, c3);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
