// tb_vedic_fir: end-to-end self-check of the top level with every parameter
// at its default (TAPS = 4, ACC_W = 16).
// FIR part: several random coefficient sets; for each, a stream of random
// samples with random gaps in x_valid while form_sel switches at random
// between the direct and the transposed structure. Every output is compared
// with the convolution sum h[k] x[n-k] computed here, y_valid must follow
// x_valid by exactly one clock, and forms_agree must be high.
// MAC part, driven at the same time: random accumulations, clears and
// clear-with-load, compared with a reference accumulator modulo 2**16,
// plus a long run of 15 x 15 products that makes the accumulator wrap.
// Each mechanism (form switch, sample gap, both forms used, MAC clear, MAC
// load, MAC wrap) is counted, and one that never happened is a failure.
module tb_vedic_fir;
  import vedic_pkg::*;
  localparam int unsigned TAPS  = 4;
  localparam int unsigned DATA_W = 4;
  localparam int unsigned ACC_W = 16;
  localparam int unsigned Y_W   = sum_width(DATA_W, TAPS);

  logic             clk, rst_n = 1'b0;
  logic [3:0]       h [TAPS];
  logic             form_sel = 1'b0, x_valid = 1'b0;
  logic [3:0]       x = '0;
  logic             y_valid, forms_agree;
  logic [Y_W-1:0]   y;
  logic             mac_en = 1'b0, mac_clr = 1'b0;
  logic [3:0]       mac_a = '0, mac_b = '0;
  logic [ACC_W-1:0] mac_acc;

  int     checks = 0, failures = 0;
  int     hist [TAPS];
  longint model = 0;
  int     n_switch = 0, n_gap = 0, n_direct = 0, n_transposed = 0;
  int     n_clear = 0, n_load = 0, n_wrap = 0;

  vedic_fir dut (
    .clk, .rst_n, .h, .form_sel, .x_valid, .x, .y_valid, .y, .forms_agree,
    .mac_en, .mac_clr, .mac_a, .mac_b, .mac_acc
  );

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected();
    int s = 0;
    for (int k = 0; k < TAPS; k++) s += int'(h[k]) * hist[k];
    return s;
  endfunction

  task automatic do_reset();
    rst_n   = 1'b0;
    x_valid = 1'b0;
    mac_en  = 1'b0;
    mac_clr = 1'b0;
    model   = 0;
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  // one clock with both the filter and the MAC driven
  task automatic step(input logic v, input int xs, input logic fs,
                      input logic men, input logic mclr, input int ma, input int mb);
    longint nxt;
    if (fs != form_sel) n_switch++;
    form_sel = fs;
    x_valid  = v;
    x        = 4'(xs);
    if (v) begin
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = xs;
      if (fs) n_transposed++; else n_direct++;
    end else n_gap++;
    mac_en  = men;
    mac_clr = mclr;
    mac_a   = 4'(ma);
    mac_b   = 4'(mb);
    nxt = (mclr ? 0 : model) + (men ? ma * mb : 0);
    if (men && mclr) n_load++;
    if (!men && mclr) n_clear++;
    if (nxt >= (longint'(1) << ACC_W)) n_wrap++;
    if (men || mclr) model = nxt % (longint'(1) << ACC_W);
    @(posedge clk);
    #1;
    checks++;
    if (y_valid !== v) begin
      failures++;
      $display("FAIL latency: y_valid=%0b one clock after x_valid=%0b", y_valid, v);
    end
    checks++;
    if (!forms_agree) begin
      failures++;
      $display("FAIL direct and transposed forms disagree");
    end
    if (v) begin
      checks++;
      if (int'(y) != expected()) begin
        failures++;
        $display("FAIL form=%0b y=%0d expected %0d", fs, y, expected());
      end
    end
    checks++;
    if (longint'(mac_acc) != model) begin
      failures++;
      $display("FAIL mac_acc=%0d expected %0d", mac_acc, model);
    end
  endtask

  initial begin
    for (int s = 0; s < 12; s++) begin
      for (int k = 0; k < TAPS; k++) h[k] = 4'($urandom);
      if (s == 0) for (int k = 0; k < TAPS; k++) h[k] = 4'd15;
      do_reset();
      for (int i = 0; i < 500; i++)
        step(($urandom % 4) != 0, (s == 0) ? 15 : int'($urandom % 16),
             ($urandom % 8 == 0) ? ~form_sel : form_sel,
             ($urandom % 3) != 0, ($urandom % 32) == 0,
             int'($urandom % 16), int'($urandom % 16));
    end
    // accumulator wrap: 300 x 225 exceeds 2**16
    step(1'b0, 0, form_sel, 1'b1, 1'b1, 15, 15);
    for (int i = 0; i < 300; i++) step(1'b0, 0, form_sel, 1'b1, 1'b0, 15, 15);

    $display("coverage: switches=%0d gaps=%0d direct=%0d transposed=%0d mac_clear=%0d mac_load=%0d mac_wrap=%0d",
             n_switch, n_gap, n_direct, n_transposed, n_clear, n_load, n_wrap);
    checks++;
    if (n_switch == 0 || n_gap == 0 || n_direct == 0 || n_transposed == 0 ||
        n_clear == 0 || n_load == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
