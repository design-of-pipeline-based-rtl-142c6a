// twiddle_mul: multiplies a complex sample by the constant twiddle factor
// W8^K = exp(-j*2*pi*K/8), K = 0..3, of the 8-point FFT.
//
// K = 0 passes the sample through and K = 2 (-j) only swaps the real and
// imaginary parts and negates one, as in the trivial-multiplication
// butterfly. K = 1 and K = 3 need a scale by 1/sqrt(2): the sum and the
// difference of the two parts are multiplied by the constant 181/256 with a
// shift-and-add network (181 = 128 + 32 + 16 + 4 + 1), then rounded to the
// nearest integer (half rounds up). That twiddle factors are applied between
// the butterfly stages follows the radix-2 algorithm of the published design;
// it names a "flexible" multiplier for them without describing its inside, so
// the fixed constant multiplier here is this design's choice.
//
// Interface: purely combinational, a_re/a_im in, y_re/y_im out, W bits each.
// The caller must leave one bit of headroom for K = 1 or 3 (|y| <= |a|*1.415).
module twiddle_mul #(
  parameter int unsigned W = 15,
  parameter int unsigned K = 1
) (
  input  logic signed [W-1:0] a_re,
  input  logic signed [W-1:0] a_im,
  output logic signed [W-1:0] y_re,
  output logic signed [W-1:0] y_im
);

  localparam int unsigned XW = W + 10;

  // round(s * 181 / 256) with shifts and adds only.
  function automatic logic signed [W-1:0] mul_inv_sqrt2(logic signed [W:0] s);
    logic signed [XW-1:0] xs, p;
    xs = XW'(s);
    p = (xs <<< 7) + (xs <<< 5) + (xs <<< 4) + (xs <<< 2) + xs + XW'(128);
    return W'(p >>> 8);
  endfunction

  logic signed [W:0] sum, dif;   // a_re + a_im, a_im - a_re

  always_comb begin
    sum = (W+1)'(a_re) + (W+1)'(a_im);
    dif = (W+1)'(a_im) - (W+1)'(a_re);
    unique case (K % 4)
      0: begin y_re = a_re;                  y_im = a_im;               end
      1: begin y_re = mul_inv_sqrt2(sum);    y_im = mul_inv_sqrt2(dif); end
      2: begin y_re = a_im;                  y_im = -a_re;              end
      default: begin
               y_re = mul_inv_sqrt2(dif);    y_im = mul_inv_sqrt2(-sum); end
    endcase
  end

endmodule
