// tb_onehot_code -- checks the thermometer-to-one-hot conversion.
// Two instances, N = 4 (the default, as for the 4-way network) and N = 8,
// are driven with every sorted sequence of their length; the output must
// have exactly bit k set when the sequence holds k ones.
module tb_onehot_code;
  logic [3:0] s4;
  logic [4:0] p4;
  logic [7:0] s8;
  logic [8:0] p8;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  onehot_code               dut4 (.s(s4), .p(p4));
  onehot_code #(.N(8))      dut8 (.s(s8), .p(p8));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= 8; k++) begin
      // k ones packed from the top line (index 0) down
      s8 = 8'((16'd1 << k) - 1);
      s4 = (k <= 4) ? 4'((8'd1 << k) - 1) : 4'd0;
      #1;
      checks++;
      if (p8 !== 9'(1 << k)) begin
        failures++;
        $display("FAIL N=8 k=%0d s=%b p=%b", k, s8, p8);
      end
      if (k <= 4) begin
        checks++;
        if (p4 !== 5'(1 << k)) begin
          failures++;
          $display("FAIL N=4 k=%0d s=%b p=%b", k, s4, p4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
