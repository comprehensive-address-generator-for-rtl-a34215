// fft_butterfly: radix-2 decimation-in-frequency butterfly.
//
//   x = a + b
//   y = (a - b) * w
//
// on complex two's-complement samples packed {re, im}.  The twiddle factor w
// is a fixed-point number with TW_FRAC fraction bits (1.0 = 2**TW_FRAC).
// The structure is the four-datapath arrangement of the DIF FFT figure: one
// unit forms the two sums, one the two differences, one the real part of the
// product (two multipliers and a subtractor) and one the imaginary part (two
// multipliers and an adder).  The product is shifted right by TW_FRAC bits
// (arithmetic, rounding towards minus infinity); all results wrap to DATA_W
// bits per part, there is no saturation or block scaling.  Combinational;
// the kernel registers the operands and results.  The sample width of 8 + 8
// bits follows the document's simulation; the twiddle format (Q4, so
// 1.0 = 16) is read from the coefficient values shown there.
module fft_butterfly #(
  parameter int unsigned DATA_W  = 8,
  parameter int unsigned TW_FRAC = 4
) (
  input  logic [2*DATA_W-1:0] a,
  input  logic [2*DATA_W-1:0] b,
  input  logic [2*DATA_W-1:0] w,
  output logic [2*DATA_W-1:0] x,
  output logic [2*DATA_W-1:0] y
);

  localparam int unsigned PW = 2 * DATA_W + 2;

  logic signed [DATA_W-1:0] a_re, a_im, b_re, b_im, w_re, w_im;
  logic signed [DATA_W:0]   d_re, d_im;
  logic signed [DATA_W-1:0] s_re, s_im;
  logic signed [PW-1:0]     p_re, p_im;
  logic signed [PW-1:0]     q_re, q_im;

  assign {a_re, a_im} = a;
  assign {b_re, b_im} = b;
  assign {w_re, w_im} = w;

  // Sum and difference units
  assign s_re = a_re + b_re;
  assign s_im = a_im + b_im;
  assign d_re = (DATA_W+1)'(a_re) - (DATA_W+1)'(b_re);
  assign d_im = (DATA_W+1)'(a_im) - (DATA_W+1)'(b_im);

  // Complex multiplier: real part (mul, mul, sub) and imaginary part (mul, mul, add)
  assign p_re = PW'(d_re) * PW'(w_re) - PW'(d_im) * PW'(w_im);
  assign p_im = PW'(d_re) * PW'(w_im) + PW'(d_im) * PW'(w_re);
  assign q_re = p_re >>> TW_FRAC;
  assign q_im = p_im >>> TW_FRAC;

  assign x = {s_re, s_im};
  assign y = {q_re[DATA_W-1:0], q_im[DATA_W-1:0]};

endmodule
