// mac_unit: multiply-accumulate unit whose multiplier is a DATA_W x DATA_W
// Urdhva multiplier (4x4 by default). Each enabled clock adds the product a*b to the accumulator
// register: acc <= acc + a*b.
// Interface: en accepts an operand pair; clr starts a new accumulation. With
// clr and en in the same cycle the accumulator is loaded with a*b, with clr
// alone it is cleared. Active-low rst_n clears it asynchronously.
// Timing: the accumulator holds the sum including a pair one clock after the
// pair is presented with en high. The accumulator wraps modulo 2**ACC_W.
// Multiplier, adder and accumulator register in a feedback loop is the
// general MAC structure; the clear/enable handshake, the asynchronous reset
// and the 16-bit accumulator width are this design's choices.
module mac_unit
  import vedic_pkg::*;
#(
  parameter int unsigned DATA_W = DEFAULT_DATA_W,
  parameter int unsigned ACC_W  = 16,
  localparam int unsigned P_W   = prod_width(DATA_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             clr,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [ACC_W-1:0] acc
);
  logic [P_W-1:0]   prod;
  logic [ACC_W-1:0] base, addend;

  urdhva_nxn #(.N(DATA_W)) u_mult (.a(a), .b(b), .p(prod));

  always_comb begin
    base   = clr ? '0 : acc;
    addend = en ? ACC_W'(prod) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          acc <= '0;
    else if (en || clr)  acc <= base + addend;
  end

  initial assert (ACC_W >= P_W) else $error("mac_unit: ACC_W must hold a product");
endmodule
