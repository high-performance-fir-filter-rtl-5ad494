// tb_mac_unit: self-check of the Urdhva MAC unit. Random operands, enables
// and clears are applied for a few thousand clocks; after each clock the
// accumulator is compared with a reference accumulator kept in the
// testbench with integer arithmetic (modulo 2**ACC_W). A directed part runs
// a dot product of known value and checks the one-clock update latency.
// ACC_W is reduced to 10 so that wrap-around happens and is counted.
module tb_mac_unit;
  import vedic_pkg::*;
  localparam int unsigned ACC_W = 10;

  logic             clk, rst_n = 1'b0;
  logic             en = 1'b0, clr = 1'b0;
  logic [3:0]       a = '0, b = '0;
  logic [ACC_W-1:0] acc;
  int               checks = 0, failures = 0;
  longint           model = 0;
  int               wraps = 0, loads = 0, clears = 0;

  mac_unit #(.ACC_W(ACC_W)) dut (.clk, .rst_n, .en, .clr, .a, .b, .acc);

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic ien, input logic iclr, input int ia, input int ib);
    longint nxt;
    en  = ien;
    clr = iclr;
    a   = 4'(ia);
    b   = 4'(ib);
    nxt = (iclr ? 0 : model) + (ien ? ia * ib : 0);
    if (ien && !iclr && nxt >= (longint'(1) << ACC_W)) wraps++;
    if (ien && iclr) loads++;
    if (!ien && iclr) clears++;
    if (ien || iclr) model = nxt % (longint'(1) << ACC_W);
    @(posedge clk);
    #1;
    checks++;
    if (longint'(acc) != model) begin
      failures++;
      $display("FAIL en=%0b clr=%0b a=%0d b=%0d acc=%0d expected %0d", ien, iclr, ia, ib, acc, model);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (acc != '0) begin failures++; $display("FAIL acc not cleared by reset"); end
    rst_n = 1'b1;
    // directed dot product: 13*11 + 1*2 + 15*15 = 370
    step(1'b1, 1'b1, 13, 11);
    step(1'b1, 1'b0, 1, 2);
    step(1'b1, 1'b0, 15, 15);
    checks++;
    if (acc != ACC_W'(370)) begin failures++; $display("FAIL dot product %0d", acc); end
    step(1'b0, 1'b0, 7, 7);  // idle: holds
    for (int i = 0; i < 4000; i++)
      step(($urandom % 4) != 0, ($urandom % 16) == 0, int'($urandom % 16), int'($urandom % 16));
    checks++;
    if (wraps == 0 || loads == 0 || clears == 0) begin
      failures++;
      $display("FAIL coverage wraps=%0d loads=%0d clears=%0d", wraps, loads, clears);
    end
    $display("coverage: wraps=%0d loads=%0d clears=%0d", wraps, loads, clears);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
