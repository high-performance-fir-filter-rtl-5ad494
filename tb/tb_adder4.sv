// tb_adder4: exhaustive self-check of the 4-bit ripple-carry adder; all 256
// operand pairs are compared with the 5-bit integer sum a + b.
module tb_adder4;
  logic [3:0] a, b, sum;
  logic       cout;
  int checks = 0, failures = 0;

  adder4 dut (.a, .b, .sum, .cout);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (int'({cout, sum}) != i + j) begin
          failures++;
          $display("FAIL %0d + %0d -> cout=%0b sum=%0d", i, j, cout, sum);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
