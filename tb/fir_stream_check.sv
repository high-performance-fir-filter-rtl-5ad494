// fir_stream_check: reusable checker for one FIR filter instance, used by
// tb_fir_direct and tb_fir_transposed. TRANSPOSED selects fir_transposed (1)
// or fir_direct (0) at the given TAPS and DATA_W.
// Phase 1 feeds a unit impulse: the response must be h[0..TAPS-1] followed
// by zeros. Phase 2 streams random samples with random gaps in x_valid under
// SETS coefficient sets (a reset between sets; the first set uses all-ones
// coefficients and samples, the largest possible sums) and compares each
// output with sum h[k] x[n-k] computed from a history of accepted samples.
// Every clock it checks that y_valid follows x_valid by exactly one clock.
// It runs its own clock and raises done with its counts when finished.
module fir_stream_check #(
  parameter int unsigned TAPS       = 4,
  parameter int unsigned DATA_W     = 4,
  parameter bit          TRANSPOSED = 1'b0,
  parameter int unsigned SETS       = 20,
  parameter int unsigned LEN        = 300
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   gaps
);
  import vedic_pkg::*;
  localparam int unsigned Y_W = sum_width(DATA_W, TAPS);
  localparam longint      MAXV = (longint'(1) << DATA_W) - 1;

  logic              clk, rst_n;
  logic [DATA_W-1:0] h [TAPS];
  logic              x_valid;
  logic [DATA_W-1:0] x;
  logic              y_valid;
  logic [Y_W-1:0]    y;
  longint            hist [TAPS];   // hist[k] = x[n-k] of the last accepted sample

  if (TRANSPOSED) begin : g_tr
    fir_transposed #(.TAPS(TAPS), .DATA_W(DATA_W)) dut (.clk, .rst_n, .h, .x_valid, .x, .y_valid, .y);
  end else begin : g_dir
    fir_direct #(.TAPS(TAPS), .DATA_W(DATA_W)) dut (.clk, .rst_n, .h, .x_valid, .x, .y_valid, .y);
  end

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  function automatic longint expected();
    longint s = 0;
    for (int k = 0; k < TAPS; k++) s += longint'(h[k]) * hist[k];
    return s;
  endfunction

  function automatic longint rnd();
    return longint'({$urandom, $urandom}) & MAXV;
  endfunction

  task automatic do_reset();
    rst_n   = 1'b0;
    x_valid = 1'b0;
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  task automatic step(input logic v, input longint xs);
    x_valid = v;
    x       = DATA_W'(xs);
    if (v) begin
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = xs;
    end else gaps++;
    @(posedge clk);
    #1;
    checks++;
    if (y_valid !== v) begin
      failures++;
      $display("FAIL latency: y_valid=%0b one clock after x_valid=%0b", y_valid, v);
    end
    if (v) begin
      checks++;
      if (longint'(y) != expected()) begin
        failures++;
        $display("FAIL taps=%0d w=%0d y=%0d expected %0d", TAPS, DATA_W, y, expected());
      end
    end
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0; gaps = 0;
    x = '0;
    for (int k = 0; k < TAPS; k++) h[k] = DATA_W'(rnd());
    do_reset();
    step(1'b1, 1);
    for (int k = 1; k < TAPS + 3; k++) step(1'b1, 0);
    for (int s = 0; s < SETS; s++) begin
      for (int k = 0; k < TAPS; k++) h[k] = (s == 0) ? DATA_W'(MAXV) : DATA_W'(rnd());
      do_reset();
      for (int i = 0; i < LEN; i++)
        step(($urandom % 4) != 0, (s == 0) ? MAXV : rnd());
    end
    done = 1'b1;
  end
endmodule
