// tb_mimo_ofdm_fft_tx_mdc: end-to-end test of the 2x2 MIMO-OFDM transform
// path built with the delay-commutator FFT core (FFT_ARCH = 1).
// Random bytes enter with random gaps; the two antenna outputs are read with
// random, sometimes long, back-pressure. The testbench keeps its own model:
// each accepted byte becomes a 256-QAM point (Gray-coded PAM-16 on each axis,
// level 2*i - 15 for nibble i ^ (i >> 1)), points go to antenna 0, 1, 0, 1,
// ..., and every eight points of an antenna form one symbol whose unscaled
// inverse DFT (transmit mode) or DFT (forward mode) is expected, bin by bin,
// on that antenna's output: exactly for bins that need no irrational twiddle,
// to within 1.5 units otherwise. It also checks that, with the path empty, antenna
// b's first sample comes 25 cycles after its last byte: 18 cycles of latency
// plus 7 spent waiting while antenna a's symbol streams through the core;
// then it frees both output buffers at once so that both antennas compete. It
// counts how often each mechanism happened (inverse and forward symbols on
// both antennas, input back-pressure, a stall of the FFT stage, and both
// antennas competing for the FFT) and fails if one never did.
module tb_mimo_ofdm_fft_tx_mdc;
  import fft_pkg::*;
  logic  clk = 0, rst_n = 0, inverse = 1;
  logic  bits_valid = 0, bits_ready;
  logic [7:0] bits = '0;
  logic  a_valid, a_ready = 0, a_last, b_valid, b_ready = 0, b_last, stall;
  cout_t a_data, b_data;
  int checks = 0, failures = 0, cycle = 0;
  int n_stall = 0, n_tie = 0, n_bp = 0, n_sym [2][2];   // [mode][antenna]
  int ref_level [16];
  int n_bytes = 0;

  mimo_ofdm_fft_tx #(.FFT_ARCH(1)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { real re[8]; real im[8]; } bins_t;
  bins_t exp_q [2][$];
  cin_t  acc [2][$];
  int    bin_idx [2] = '{0, 0};

  function automatic bins_t dft(cin_t v [$], bit inv);
    bins_t e;
    real sg;
    sg = inv ? 1.0 : -1.0;
    for (int k = 0; k < 8; k++) begin
      e.re[k] = 0.0; e.im[k] = 0.0;
      for (int n = 0; n < 8; n++) begin
        real c, s;
        c = $cos(sg * 2.0 * 3.14159265358979 * n * k / 8.0);
        s = $sin(sg * 2.0 * 3.14159265358979 * n * k / 8.0);
        e.re[k] += v[n].re * c - v[n].im * s;
        e.im[k] += v[n].re * s + v[n].im * c;
      end
    end
    return e;
  endfunction

  always @(negedge clk) if (rst_n) begin
    if (stall) n_stall++;
    if (dut.u_fft_stage.can_go == 2'b11) n_tie++;
    if (bits_valid && !bits_ready) n_bp++;
    if (bits_valid && bits_ready) begin
      int ant;
      cin_t p;
      ant = n_bytes % 2;
      n_bytes++;
      p = '{re: 8'(ref_level[bits[7:4]]), im: 8'(ref_level[bits[3:0]])};
      acc[ant].push_back(p);
      if (acc[ant].size() == 8) begin
        exp_q[ant].push_back(dft(acc[ant], inverse));
        acc[ant].delete();
        n_sym[inverse][ant]++;
      end
    end
    check_out(0, a_valid && a_ready, a_data, a_last);
    check_out(1, b_valid && b_ready, b_data, b_last);
  end

  task automatic check_out(int st, bit fire, cout_t d, bit last);
    real tol;
    int gr, gi, k;
    if (!fire) return;
    checks++;
    if (exp_q[st].size() == 0) begin
      failures++; $display("antenna %0d: unexpected output", st); return;
    end
    k  = bin_idx[st];
    gr = int'(d.re);
    gi = int'(d.im);
    tol = (k % 2 == 0) ? 0.01 : 1.5;
    if ((gr - exp_q[st][0].re[k]) > tol || (exp_q[st][0].re[k] - gr) > tol ||
        (gi - exp_q[st][0].im[k]) > tol || (exp_q[st][0].im[k] - gi) > tol ||
        last != (k == 7)) begin
      failures++;
      $display("antenna %0d sample %0d: got %0d,%0d last %0d exp %f,%f", st, k, gr, gi, last,
               exp_q[st][0].re[k], exp_q[st][0].im[k]);
    end
    if (k == 7) begin
      void'(exp_q[st].pop_front());
      bin_idx[st] = 0;
    end else bin_idx[st] = k + 1;
  endtask

  // random traffic, driven at posedge+2, sampled at negedge
  bit traffic = 0;
  int ready_mode = 0;
  always @(posedge clk) #2 if (traffic) begin
    if (!(bits_valid && !bits_ready)) begin
      bits_valid = ($urandom_range(0, 4) != 0);
      bits       = 8'($urandom);
    end
    if ($urandom_range(0, 99) == 0) ready_mode = $urandom_range(0, 3);
    a_ready = (ready_mode == 1 || ready_mode == 3) ? 1'b0 : ($urandom_range(0, 3) != 0);
    b_ready = (ready_mode == 2 || ready_mode == 3) ? 1'b0 : ($urandom_range(0, 3) != 0);
  end

  task automatic send_byte(logic [7:0] v);
    @(posedge clk) #2;
    bits_valid = 1; bits = v;
    @(negedge clk); #1;
    while (!bits_ready) begin @(negedge clk); #1; end
  endtask

  // one symbol per antenna into an empty path, then a tie for the FFT
  task automatic directed_latency();
    int t_last;
    @(posedge clk) #2;
    a_ready = 0; b_ready = 0;
    for (int i = 0; i < 15; i++) send_byte(8'($urandom));
    send_byte(8'h3C);
    t_last = cycle;                      // last byte accepted at the next edge
    @(posedge clk) #2 bits_valid = 0;
    while (!b_valid) @(negedge clk);
    checks++;
    if (cycle - t_last != 25) begin
      failures++; $display("latency %0d, expected 25", cycle - t_last);
    end
    // a second symbol per antenna waits in the input buffers behind the
    // full output buffers; reading both outputs together frees both output
    // buffers in the same cycle, so both antennas compete for the FFT
    for (int i = 0; i < 16; i++) send_byte(8'($urandom));
    @(posedge clk) #2;
    bits_valid = 0; a_ready = 1; b_ready = 1;
    wait (exp_q[0].size() == 0 && exp_q[1].size() == 0);
  endtask

  task automatic drain();
    traffic = 0;
    @(posedge clk) #2;
    bits_valid = 0; a_ready = 1; b_ready = 1;
    while (acc[0].size() != 0 || acc[1].size() != 0) send_byte(8'($urandom));
    @(posedge clk) #2 bits_valid = 0;
    repeat (40) @(posedge clk);
  endtask

  initial begin
    n_sym = '{default: 0};
    for (int i = 0; i < 16; i++) ref_level[i ^ (i >> 1)] = 2 * i - 15;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    directed_latency();
    traffic = 1;
    repeat (8000) @(posedge clk);
    drain();
    inverse = 0;
    traffic = 1;
    repeat (8000) @(posedge clk);
    drain();
    checks++;
    if (exp_q[0].size() != 0 || exp_q[1].size() != 0) begin
      failures++; $display("symbols never came out");
    end
    $display("symbols inverse a/b %0d/%0d forward a/b %0d/%0d", n_sym[1][0], n_sym[1][1],
             n_sym[0][0], n_sym[0][1]);
    $display("input back-pressure cycles %0d, stall cycles %0d, competing cycles %0d",
             n_bp, n_stall, n_tie);
    checks++;
    if (n_sym[1][0] == 0 || n_sym[1][1] == 0 || n_sym[0][0] == 0 || n_sym[0][1] == 0 ||
        n_stall == 0 || n_tie == 0 || n_bp == 0) begin
      failures++; $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
