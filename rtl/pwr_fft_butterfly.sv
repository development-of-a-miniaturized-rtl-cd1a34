// Radix-2 decimation-in-time butterfly, purely combinational.
//
// Given the two inputs a and b of one butterfly and the twiddle factor
// W = c - j*s (c = cos, s = sin of 2*pi*k/N, as fixed-point numbers with
// TW_FRAC fraction bits), it returns
//   x = a + b*W
//   y = a - b*W
// The product b*W is rounded to the nearest integer before the sums. The
// word width W_W has to hold the full growth of the transform; this block
// does no scaling or saturation. It is part of the FFT module, whose
// internal structure is this design's own.
module pwr_fft_butterfly #(
  parameter int unsigned W_W     = 24,   // data word width
  parameter int unsigned TW_W    = 18,   // twiddle word width
  parameter int unsigned TW_FRAC = 16    // twiddle fraction bits
) (
  input  logic signed [W_W-1:0]  a_re,
  input  logic signed [W_W-1:0]  a_im,
  input  logic signed [W_W-1:0]  b_re,
  input  logic signed [W_W-1:0]  b_im,
  input  logic signed [TW_W-1:0] tw_c,
  input  logic signed [TW_W-1:0] tw_s,
  output logic signed [W_W-1:0]  x_re,
  output logic signed [W_W-1:0]  x_im,
  output logic signed [W_W-1:0]  y_re,
  output logic signed [W_W-1:0]  y_im
);

  localparam int unsigned P_W = W_W + TW_W + 1;

  logic signed [P_W-1:0] pr, pi;     // b*W before rounding
  logic signed [P_W-1:0] rr, ri;     // after rounding and shifting
  logic signed [W_W-1:0] t_re, t_im;

  always_comb begin
    // (br + j bi)(c - j s) = (br c + bi s) + j (bi c - br s)
    pr = P_W'(b_re) * P_W'(tw_c) + P_W'(b_im) * P_W'(tw_s);
    pi = P_W'(b_im) * P_W'(tw_c) - P_W'(b_re) * P_W'(tw_s);
    rr = (pr + (P_W'(1) <<< (TW_FRAC - 1))) >>> TW_FRAC;
    ri = (pi + (P_W'(1) <<< (TW_FRAC - 1))) >>> TW_FRAC;
    t_re = W_W'(rr);
    t_im = W_W'(ri);
    x_re = a_re + t_re;
    x_im = a_im + t_im;
    y_re = a_re - t_re;
    y_im = a_im - t_im;
  end

endmodule
