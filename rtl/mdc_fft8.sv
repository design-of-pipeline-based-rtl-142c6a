// mdc_fft8: 8-point radix-2 FFT as a two-path delay-commutator pipeline.
//
// This is the streaming form of the same decimation-in-frequency dataflow as
// fft8: samples enter one per cycle and the bins leave two per cycle.
//   Butterfly I   : the first four samples of a symbol wait in a 4-deep delay
//                   line (4D) on the upper path; as samples 4..7 arrive on the
//                   lower path, x[n] meets x[n+4]. The difference is rotated
//                   by W8^n.
//   Commutator 2  : the lower path is delayed by 2 (2D), a switch exchanges the
//                   paths for the 2nd pair of each group of four, and the
//                   upper path is delayed by 2 (2D) after the switch, so that
//                   Butterfly II sees (u0,u2), (u1,u3), (v0,v2), (v1,v3). Odd
//                   differences are rotated by -j.
//   Commutator 3  : the same with single delays (D), so Butterfly III sees
//                   neighbours.
// Each butterfly registers its outputs. Delay lines shift every cycle; a
// valid token and a pair index travel with the data and drive the switches
// and the twiddle selection, so idle cycles between symbols are allowed.
// The 4D/2D/D delays, the switches, the rotation after the first two
// butterflies and the X(k)/X(k+4) output pairs follow the published
// delay-commutator figure; the registered butterflies, the control by tokens,
// the rounding of W8^1 and W8^3 (see twiddle_mul) and the interface are this
// design's choices.
//
// Interface: in_valid/x: the eight samples of a symbol on eight consecutive
// cycles, x[0] first (a symbol must not be interrupted). out_valid: the pair
// y_up = X[out_k], y_lo = X[out_k + 4] is valid; out_k runs 0, 2, 1, 3 over
// four consecutive cycles and out_last marks the fourth. The first pair comes
// 3 cycles after the last sample, the last pair 6 cycles after it.
module mdc_fft8
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  cin_t       x,
  output logic       out_valid,
  output logic [1:0] out_k,
  output logic       out_last,
  output cout_t      y_up,
  output cout_t      y_lo
);

  localparam int unsigned W = OUT_W;

  // complex add / subtract at the internal width
  function automatic cout_t cadd(cout_t a, cout_t b);
    return '{re: a.re + b.re, im: a.im + b.im};
  endfunction
  function automatic cout_t csub(cout_t a, cout_t b);
    return '{re: a.re - b.re, im: a.im - b.im};
  endfunction
  // multiply by -j
  function automatic cout_t mul_mj(cout_t a);
    return '{re: a.im, im: -a.re};
  endfunction

  // ---- input commutator and 4D ---------------------------------------------
  logic [2:0] in_cnt;                 // sample index inside the symbol
  cout_t      d4 [4];                 // upper-path delay line, d4[3] oldest
  cout_t      xi;

  assign xi = widen(x);

  always_ff @(posedge clk) begin
    d4[0] <= xi;
    for (int i = 1; i < 4; i++) d4[i] <= d4[i-1];
    if (!rst_n)        in_cnt <= '0;
    else if (in_valid) in_cnt <= in_cnt + 1'b1;
  end

  // ---- Butterfly I (registered) ---------------------------------------------
  cout_t      s1_u, s1_l;
  logic       v1;
  logic [1:0] i1;

  always_ff @(posedge clk) begin
    s1_u <= cadd(d4[3], xi);
    s1_l <= csub(d4[3], xi);
    i1   <= in_cnt[1:0];
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid && in_cnt[2];
  end

  // rotation by W8^i1: four constant rotators, selected by the pair index
  cout_t rot1 [4];
  for (genvar k = 0; k < 4; k++) begin : g_tw1
    twiddle_mul #(.W(W), .K(k)) u_tw (
      .a_re(s1_l.re), .a_im(s1_l.im), .y_re(rot1[k].re), .y_im(rot1[k].im));
  end
  cout_t l1;
  assign l1 = rot1[i1];

  // ---- Commutator 2 (2D, switch, 2D) ------------------------------------------
  cout_t      ld2 [2], ud2 [2];
  logic       tok2 [2];               // "u2/u3 passed" token, delayed
  logic [1:0] ti2 [2];
  logic       cross2;
  cout_t      up2, lo2;

  assign cross2 = v1 && i1[1];
  always_comb begin
    up2 = cross2 ? ld2[1] : s1_u;
    lo2 = cross2 ? s1_u   : ld2[1];
  end

  always_ff @(posedge clk) begin
    ld2[0] <= l1;   ld2[1] <= ld2[0];
    ud2[0] <= up2;  ud2[1] <= ud2[0];
    ti2[0] <= i1;   ti2[1] <= ti2[0];
    if (!rst_n) begin
      tok2[0] <= 1'b0; tok2[1] <= 1'b0;
    end else begin
      tok2[0] <= cross2; tok2[1] <= tok2[0];
    end
  end

  // Butterfly II pairs: the upper-half pairs while u2/u3 pass (index 0, 1),
  // the lower-half pairs two cycles later (index 2, 3).
  logic       v2_in;
  logic [1:0] i2_in;
  always_comb begin
    v2_in = cross2 || tok2[1];
    i2_in = cross2 ? {1'b0, i1[0]} : {1'b1, ti2[1][0]};
  end

  // ---- Butterfly II (registered) --------------------------------------------
  cout_t      s2_u, s2_l;
  logic       v2;
  logic [1:0] i2;

  always_ff @(posedge clk) begin
    s2_u <= cadd(ud2[1], lo2);
    s2_l <= csub(ud2[1], lo2);
    i2   <= i2_in;
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v2_in;
  end

  cout_t l2;
  assign l2 = i2[0] ? mul_mj(s2_l) : s2_l;

  // ---- Commutator 3 (D, switch, D) ------------------------------------------
  cout_t      ld1, ud1;
  logic       v2_d;
  logic [1:0] i2_d;
  logic       cross3;
  cout_t      up3, lo3;

  assign cross3 = v2 && i2[0];
  always_comb begin
    up3 = cross3 ? ld1  : s2_u;
    lo3 = cross3 ? s2_u : ld1;
  end

  always_ff @(posedge clk) begin
    ld1  <= l2;
    ud1  <= up3;
    i2_d <= i2;
    if (!rst_n) v2_d <= 1'b0;
    else        v2_d <= v2;
  end

  // Butterfly III pairs: one cycle after each stage-2 output, the first one
  // excepted, plus one more after the last.
  logic       v3_in;
  logic [1:0] i3_in;
  always_comb begin
    v3_in = (v2 && i2 != 2'd0) || (v2_d && i2_d == 2'd3);
    i3_in = (v2 && i2 != 2'd0) ? i2 - 2'd1 : 2'd3;
  end

  // ---- Butterfly III (registered) -------------------------------------------
  logic [1:0] i3;
  always_ff @(posedge clk) begin
    y_up <= cadd(ud1, lo3);
    y_lo <= csub(ud1, lo3);
    i3   <= i3_in;
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v3_in;
  end

  assign out_k    = {i3[0], i3[1]};   // pair index 0,1,2,3 -> bins 0,2,1,3
  assign out_last = (i3 == 2'd3);

  // A symbol arrives as eight uninterrupted samples.
  assert property (@(posedge clk) disable iff (!rst_n) (in_cnt != 3'd0) |-> in_valid);

endmodule
