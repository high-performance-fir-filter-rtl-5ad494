// tb_urdhva_nxn: self-check of the recursive N x N Urdhva multiplier at
// N = 2, 4 and 8 over every operand pair, and at N = 16 and 32 over random
// pairs plus the corner cases (all ones, zero, one). Products are compared
// with integer multiplication in 64-bit arithmetic.
module tb_urdhva_nxn;
  logic [1:0]  a2, b2;   logic [3:0]  p2;
  logic [3:0]  a4, b4;   logic [7:0]  p4;
  logic [7:0]  a8, b8;   logic [15:0] p8;
  logic [15:0] a16, b16; logic [31:0] p16;
  logic [31:0] a32, b32; logic [63:0] p32;
  int checks = 0, failures = 0;

  urdhva_nxn #(.N(2))  u2  (.a(a2),  .b(b2),  .p(p2));
  urdhva_nxn #(.N(4))  u4  (.a(a4),  .b(b4),  .p(p4));
  urdhva_nxn #(.N(8))  u8  (.a(a8),  .b(b8),  .p(p8));
  urdhva_nxn #(.N(16)) u16 (.a(a16), .b(b16), .p(p16));
  urdhva_nxn #(.N(32)) u32 (.a(a32), .b(b32), .p(p32));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint unsigned got, input longint unsigned want, input int n);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL N=%0d got %0d expected %0d", n, got, want);
    end
  endtask

  task automatic wide(input longint unsigned x, input longint unsigned y);
    a16 = 16'(x); b16 = 16'(y); a32 = 32'(x); b32 = 32'(y);
    #1;
    check(64'(p16), longint'(a16) * longint'(b16), 16);
    check(64'(p32), longint'(a32) * longint'(b32), 32);
  endtask

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a2 = 2'(i); b2 = 2'(j); a4 = 4'(i); b4 = 4'(j); a8 = 8'(i); b8 = 8'(j);
        #1;
        if (i < 4 && j < 4)   check(64'(p2), 64'(i * j), 2);
        if (i < 16 && j < 16) check(64'(p4), 64'(i * j), 4);
        check(64'(p8), 64'(i * j), 8);
      end
    wide(64'hFFFF_FFFF, 64'hFFFF_FFFF);
    wide(0, 64'hFFFF_FFFF);
    wide(1, 64'h8765_4321);
    for (int i = 0; i < 20000; i++) wide(64'($urandom), 64'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
