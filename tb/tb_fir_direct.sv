// tb_fir_direct: self-check of the direct-form FIR filter, once at its
// default size (4 taps, 4-bit data) and once at 5 taps of 8-bit data, which
// exercises the recursive 8x8 Urdhva multiplier. Each instance is driven and
// checked by fir_stream_check (impulse response, random streams with gaps,
// one-clock latency); this module adds up the counts.
module tb_fir_direct;
  logic done_a, done_b;
  int   checks_a, failures_a, gaps_a, checks_b, failures_b, gaps_b;
  int   checks = 0, failures = 0;

  fir_stream_check #(.TAPS(4), .DATA_W(4), .TRANSPOSED(1'b0)) u_default (
    .done(done_a), .checks(checks_a), .failures(failures_a), .gaps(gaps_a));
  fir_stream_check #(.TAPS(5), .DATA_W(8), .TRANSPOSED(1'b0), .SETS(10)) u_wide (
    .done(done_b), .checks(checks_b), .failures(failures_b), .gaps(gaps_b));

  initial begin : watchdog
    #1000000;
    failures = failures_a + failures_b + 1;
    checks   = checks_a + checks_b;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done_a && done_b);
    checks   = checks_a + checks_b + 1;
    failures = failures_a + failures_b;
    if (gaps_a == 0 || gaps_b == 0) begin
      failures++;
      $display("FAIL no gaps in x_valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
