// fft8: 8-point radix-2 FFT built from three pipelined butterfly stages.
//
// Eight complex samples enter in parallel (x[0] .. x[7], the published
// block's in1 .. in8) and the eight DFT bins leave in parallel, in natural
// order (X[k] = sum_n x[n] * exp(-j*2*pi*n*k/8), the published stage3_1 ..
// stage3_8), three clock cycles later. A new set of eight samples can be
// accepted every cycle.
//
// Decimation in frequency. Stage 1 pairs x[n] with x[n+4] in four adders
// (A1..A4) and four subtractors (S1..S4); the differences are rotated by
// W8^n. Stage 2 pairs the samples two apart inside each half (adders A5..A8,
// subtractors S5..S8) and rotates the odd differences by -j. Stage 3 pairs
// neighbours (A9..A12, S9..S12). The network leaves the bins in bit-reversed
// order (position j holds bin bitrev(j)); since all eight are present at
// once, the reordering is only wiring. Unit names, the three stages of four
// adders and four subtractors, and the 8-bit-in/15-bit-out widths follow the
// published design; the twiddle multipliers between stages, the natural
// output order, the complex ports and the valid signal are this design's.
// Rounding: twiddles W8^1 and W8^3 are rounded to integers in twiddle_mul, so
// odd bins can differ from the exact DFT by a few units; all other
// arithmetic is exact.
//
// Interface: in_valid/x in, out_valid/X out, out_valid = in_valid delayed
// by three cycles. Synchronous active-low reset.
module fft8
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cin_t  x [N_POINTS],
  output logic  out_valid,
  output cout_t X [N_POINTS]
);

  localparam int unsigned W = OUT_W;

  // Stage inputs/outputs, all at the internal width.
  cout_t xi [N_POINTS];   // widened inputs
  cout_t s1 [N_POINTS];   // stage 1 registers: [0..3] sums, [4..7] differences
  cout_t h2 [N_POINTS];   // stage 2 inputs (differences rotated by W8^n)
  cout_t s2 [N_POINTS];   // stage 2 registers
  cout_t h3 [N_POINTS];   // stage 3 inputs (odd differences rotated by -j)
  cout_t s3 [N_POINTS];   // stage 3 registers, bit-reversed order

  always_comb
    for (int i = 0; i < int'(N_POINTS); i++) xi[i] = widen(x[i]);

  // ---- Stage 1: A1..A4, S1..S4, then W8^n -------------------------------
  for (genvar n = 0; n < 4; n++) begin : g_st1
    bf_adder #(.W(W)) u_a (
      .clk, .rst_n,
      .a_re(xi[n].re), .a_im(xi[n].im), .b_re(xi[n+4].re), .b_im(xi[n+4].im),
      .y_re(s1[n].re), .y_im(s1[n].im));
    bf_subtractor #(.W(W)) u_s (
      .clk, .rst_n,
      .a_re(xi[n].re), .a_im(xi[n].im), .b_re(xi[n+4].re), .b_im(xi[n+4].im),
      .y_re(s1[n+4].re), .y_im(s1[n+4].im));
    assign h2[n] = s1[n];
    twiddle_mul #(.W(W), .K(n)) u_tw (
      .a_re(s1[n+4].re), .a_im(s1[n+4].im),
      .y_re(h2[n+4].re), .y_im(h2[n+4].im));
  end

  // ---- Stage 2: A5..A8, S5..S8, then -j on the odd differences ----------
  for (genvar g = 0; g < 2; g++) begin : g_st2
    for (genvar m = 0; m < 2; m++) begin : g_bf
      localparam int P = 4*g + m;   // upper input; lower is P+2
      bf_adder #(.W(W)) u_a (
        .clk, .rst_n,
        .a_re(h2[P].re), .a_im(h2[P].im), .b_re(h2[P+2].re), .b_im(h2[P+2].im),
        .y_re(s2[P].re), .y_im(s2[P].im));
      bf_subtractor #(.W(W)) u_s (
        .clk, .rst_n,
        .a_re(h2[P].re), .a_im(h2[P].im), .b_re(h2[P+2].re), .b_im(h2[P+2].im),
        .y_re(s2[P+2].re), .y_im(s2[P+2].im));
      assign h3[P] = s2[P];
      twiddle_mul #(.W(W), .K(2*m)) u_tw (
        .a_re(s2[P+2].re), .a_im(s2[P+2].im),
        .y_re(h3[P+2].re), .y_im(h3[P+2].im));
    end
  end

  // ---- Stage 3: A9..A12, S9..S12 -----------------------------------------
  for (genvar p = 0; p < 4; p++) begin : g_st3
    bf_adder #(.W(W)) u_a (
      .clk, .rst_n,
      .a_re(h3[2*p].re), .a_im(h3[2*p].im), .b_re(h3[2*p+1].re), .b_im(h3[2*p+1].im),
      .y_re(s3[2*p].re), .y_im(s3[2*p].im));
    bf_subtractor #(.W(W)) u_s (
      .clk, .rst_n,
      .a_re(h3[2*p].re), .a_im(h3[2*p].im), .b_re(h3[2*p+1].re), .b_im(h3[2*p+1].im),
      .y_re(s3[2*p+1].re), .y_im(s3[2*p+1].im));
  end

  // ---- Bit-reversed to natural order: position j holds bin bitrev(j) ----
  for (genvar j = 0; j < int'(N_POINTS); j++) begin : g_out
    localparam int K = ((j & 1) << 2) | (j & 2) | ((j >> 2) & 1);
    assign X[K] = s3[j];
  end

  // ---- Valid pipeline, one bit per stage ----------------------------------
  logic [N_STAGES-1:0] vpipe;
  always_ff @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[N_STAGES-2:0], in_valid};
  end
  assign out_valid = vpipe[N_STAGES-1];

endmodule
