// tb_sorter2 -- exhaustive check of the two-input bit sorter.
// All four input pairs are applied; the upper output must be the larger
// bit and the lower output the smaller one, in the same time step.
module tb_sorter2;
  logic a, b, hi, lo;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  sorter2 dut (.a(a), .b(b), .hi(hi), .lo(lo));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      a = v[0];
      b = v[1];
      #1;
      checks++;
      if (hi !== (a > b ? a : b) || lo !== (a > b ? b : a)) begin
        failures++;
        $display("FAIL a=%b b=%b hi=%b lo=%b", a, b, hi, lo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
