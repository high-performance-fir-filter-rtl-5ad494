// tb_urdhva_4x4: self-check of the 4x4 Urdhva multiplier. First the worked
// example 1101 x 1011 = 1000_1111 (13 x 11 = 143), then all 256 operand
// pairs against the integer product a * b.
module tb_urdhva_4x4;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  urdhva_4x4 dut (.a, .b, .p);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 4'b1101;
    b = 4'b1011;
    #1;
    checks++;
    if (p != 8'b1000_1111) begin
      failures++;
      $display("FAIL worked example 13 x 11 -> %0d", p);
    end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          $display("FAIL %0d x %0d -> %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
