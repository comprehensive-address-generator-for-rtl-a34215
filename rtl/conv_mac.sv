// conv_mac: multiply-accumulate datapath of the convolution kernel.
//
// One multiplier, one adder and an accumulator register with guard bits:
// at each clock with en high, acc <= (clr_acc ? 0 : acc) + x * h.  clr_acc
// is raised with the first product of every output sample, so no separate
// clear cycle is spent.  x and h are signed DATA_W-bit samples; the
// accumulator is ACC_W bits (2*DATA_W product bits plus guard bits) and
// wraps on overflow.  The document builds this MAC out of one of its
// reconfigurable datapath units; the widths and the clear-on-first-product
// timing are this design's choices.  acc is registered and reset to 0.
module conv_mac #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ACC_W  = 20
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic                     clr_acc,
  input  logic signed [DATA_W-1:0] x,
  input  logic signed [DATA_W-1:0] h,
  output logic signed [ACC_W-1:0]  acc
);

  logic signed [ACC_W-1:0] prod;

  assign prod = ACC_W'(x) * ACC_W'(h);

  always_ff @(posedge clk) begin
    if (rst)     acc <= '0;
    else if (en) acc <= (clr_acc ? '0 : acc) + prod;
  end

endmodule
