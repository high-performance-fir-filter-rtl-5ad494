// fir_direct: direct-form FIR filter, y[n] = sum_{k=0}^{TAPS-1} h[k] x[n-k],
// on unsigned DATA_W-bit samples and coefficients (4 bits by default). A tapped delay line holds the
// TAPS-1 previous samples; the present sample and the delayed ones each feed
// one Urdhva multiplier, and the products are summed.
// Interface: x is taken when x_valid is high and the delay line then shifts
// by one sample; h is the coefficient set and is expected to stay constant
// while samples stream. Timing: y and y_valid are registered and appear one
// clock after the sample that produced them. rst_n (active low, asynchronous)
// fills the delay line with zeros, so the first outputs are those of a filter
// that has seen zeros before the first sample.
// The delay line plus one multiplier per tap is the direct-form structure;
// the valid strobe, the output register and the reset are this design's.
module fir_direct
  import vedic_pkg::*;
#(
  parameter int unsigned TAPS   = 4,
  parameter int unsigned DATA_W = DEFAULT_DATA_W,
  localparam int unsigned P_W   = prod_width(DATA_W),
  localparam int unsigned Y_W   = sum_width(DATA_W, TAPS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [DATA_W-1:0] h [TAPS],
  input  logic           x_valid,
  input  logic [DATA_W-1:0] x,
  output logic           y_valid,
  output logic [Y_W-1:0] y
);
  logic [DATA_W-1:0] taps [TAPS];    // taps[0] = x[n], taps[k] = x[n-k]
  logic [DATA_W-1:0] dline [1:TAPS-1];
  logic [P_W-1:0] prod [TAPS];
  logic [Y_W-1:0] sum;

  always_comb begin
    taps[0] = x;
    for (int k = 1; k < TAPS; k++) taps[k] = dline[k];
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_mult
    urdhva_nxn #(.N(DATA_W)) u_mult (.a(h[k]), .b(taps[k]), .p(prod[k]));
  end

  always_comb begin
    sum = '0;
    for (int k = 0; k < TAPS; k++) sum += Y_W'(prod[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < TAPS; k++) dline[k] <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= x_valid;
      if (x_valid) begin
        for (int k = 1; k < TAPS; k++) dline[k] <= taps[k-1];
        y <= sum;
      end
    end
  end

  initial assert (TAPS >= 2) else $error("fir_direct: TAPS must be at least 2");
endmodule
