// fft_pkg: widths and sample types shared by the 8-point FFT and the
// two-stream FFT stage around it.
//
// The FFT takes eight 8-bit samples and returns eight 15-bit results, the
// port widths of the published FFT block (in1..in8 [7:0], stage3_1..stage3_8
// [14:0]). Samples are complex here (a real and an imaginary part of that
// width each); the published block shows one word per port, so carrying the
// imaginary part alongside is this design's choice, needed for an OFDM FFT.
// Every adder and subtractor of the butterfly network works at the output
// width, so no stage can overflow: eight 8-bit samples sum to at most 11 bits.
package fft_pkg;

  localparam int unsigned N_POINTS = 8;   // FFT size
  localparam int unsigned N_STAGES = 3;   // log2(N_POINTS)
  localparam int unsigned IN_W     = 8;   // input sample width (per part)
  localparam int unsigned OUT_W    = 15;  // output and internal width (per part)

  typedef struct packed {
    logic signed [IN_W-1:0] re;
    logic signed [IN_W-1:0] im;
  } cin_t;

  typedef struct packed {
    logic signed [OUT_W-1:0] re;
    logic signed [OUT_W-1:0] im;
  } cout_t;

  // Widen an input sample to the internal width by sign extension.
  function automatic cout_t widen(cin_t x);
    cout_t y;
    y.re = OUT_W'(x.re);
    y.im = OUT_W'(x.im);
    return y;
  endfunction

endpackage
