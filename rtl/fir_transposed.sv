// fir_transposed: transposed-form FIR filter, y[n] = sum_{k=0}^{TAPS-1}
// h[k] x[n-k], on unsigned DATA_W-bit samples and coefficients (4 bits by default). The present
// sample feeds all TAPS Urdhva multipliers at once, and the delay registers
// sit between the adders: z[TAPS-1] <= h[TAPS-1]*x, z[k] <= h[k]*x + z[k+1],
// and the output is h[0]*x + z[1]. z[1] therefore holds the contribution of
// all past samples, and no sample delay line is needed.
// Interface and timing are those of fir_direct: x is taken when x_valid is
// high, h stays constant while samples stream, and y/y_valid are registered
// one clock after their sample. rst_n (active low, asynchronous) clears the
// partial sums, which matches a filter that has seen only zeros.
// The transposed structure follows the usual transposed-form FIR; the valid
// strobe, the output register and the reset are this design's choices.
module fir_transposed
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
  logic [P_W-1:0] prod [TAPS];
  logic [Y_W-1:0] z    [1:TAPS-1]; // delay registers between the adders
  logic [Y_W-1:0] nxt  [TAPS];     // adder outputs, nxt[k] = h[k]*x + z[k+1]

  for (genvar k = 0; k < TAPS; k++) begin : g_mult
    urdhva_nxn #(.N(DATA_W)) u_mult (.a(h[k]), .b(x), .p(prod[k]));
  end

  always_comb begin
    nxt[TAPS-1] = Y_W'(prod[TAPS-1]);
    for (int k = 0; k < TAPS - 1; k++) nxt[k] = Y_W'(prod[k]) + z[k+1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < TAPS; k++) z[k] <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= x_valid;
      if (x_valid) begin
        for (int k = 1; k < TAPS; k++) z[k] <= nxt[k];
        y <= nxt[0];
      end
    end
  end

  initial assert (TAPS >= 2) else $error("fir_transposed: TAPS must be at least 2");
endmodule
