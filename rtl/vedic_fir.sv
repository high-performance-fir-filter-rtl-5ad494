// vedic_fir: top level. A TAPS-tap FIR filter on unsigned DATA_W-bit samples
// and coefficients (4 taps of 4 bits by default) whose multipliers are all
// Urdhva (vertically and crosswise) multipliers, plus a stand-alone Urdhva
// multiply-accumulate unit.
//
// The filter is built in both of its textbook structures, running side by
// side on the same samples and coefficients: the direct form (sample delay
// line in front of the multipliers) and the transposed form (all multipliers
// fed the present sample, delay registers between the adders). form_sel
// chooses which one drives y: 0 = direct, 1 = transposed. Both have the same
// one-clock latency and give the same results, so form_sel may change at any
// time without a glitch in the output stream; forms_agree reports, for every
// output, whether the two structures agree (a built-in self check).
//
// Interface: x is taken when x_valid is high; h holds the coefficients
// h[0..TAPS-1] and should stay constant while samples stream; y/y_valid
// follow one clock after their sample. The MAC unit has its own ports
// (mac_en, mac_clr, mac_a, mac_b, mac_acc), see mac_unit. rst_n is active low
// and asynchronous.
//
// The four-tap filter and the Urdhva multiplier inside it follow the Vedic
// FIR design; having both forms present at once with a run-time select, and
// the agreement flag, are this design's choices.
module vedic_fir
  import vedic_pkg::*;
#(
  parameter int unsigned TAPS   = 4,
  parameter int unsigned DATA_W = DEFAULT_DATA_W,
  parameter int unsigned ACC_W  = 16,
  localparam int unsigned Y_W   = sum_width(DATA_W, TAPS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // FIR filter
  input  logic [DATA_W-1:0] h [TAPS],
  input  logic              form_sel,
  input  logic              x_valid,
  input  logic [DATA_W-1:0] x,
  output logic              y_valid,
  output logic [Y_W-1:0]    y,
  output logic              forms_agree,
  // multiply-accumulate unit
  input  logic              mac_en,
  input  logic              mac_clr,
  input  logic [DATA_W-1:0] mac_a,
  input  logic [DATA_W-1:0] mac_b,
  output logic [ACC_W-1:0]  mac_acc
);
  logic           yv_dir, yv_tr;
  logic [Y_W-1:0] y_dir, y_tr;

  fir_direct #(.TAPS(TAPS), .DATA_W(DATA_W)) u_direct (
    .clk, .rst_n, .h, .x_valid, .x, .y_valid(yv_dir), .y(y_dir)
  );

  fir_transposed #(.TAPS(TAPS), .DATA_W(DATA_W)) u_transposed (
    .clk, .rst_n, .h, .x_valid, .x, .y_valid(yv_tr), .y(y_tr)
  );

  always_comb begin
    y_valid     = form_sel ? yv_tr : yv_dir;
    y           = form_sel ? y_tr  : y_dir;
    forms_agree = (y_dir == y_tr) && (yv_dir == yv_tr);
  end

  mac_unit #(.DATA_W(DATA_W), .ACC_W(ACC_W)) u_mac (
    .clk, .rst_n, .en(mac_en), .clr(mac_clr), .a(mac_a), .b(mac_b), .acc(mac_acc)
  );
endmodule
