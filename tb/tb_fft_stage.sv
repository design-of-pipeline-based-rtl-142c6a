// tb_fft_stage: self-checking test of the two-stream shared FFT stage.
// Samples for streams a and b arrive in random order with random gaps; the
// two outputs are read with random, sometimes long, back-pressure so that full
// input buffers must wait (stall). Every output bin is compared, in order,
// with a floating-point DFT (forward mode) or unscaled inverse DFT (inverse
// mode) of that stream's last eight samples: bins that need no irrational
// twiddle exactly, the others to within 1.5 units; *_last must mark bin 7.
// A directed start checks the 5-cycle latency from the last sample of a
// symbol to its first bin. The test runs in inverse mode, drains, and runs
// again in forward mode; it fails if either mode, a stall, or a cycle in which
// both streams compete for the FFT never happened.
module tb_fft_stage;
  import fft_pkg::*;
  logic  clk = 0, rst_n = 0, inverse = 1;
  logic  s_valid = 0, s_ready, s_ant = 0;
  cin_t  s_data = '0;
  logic  a_valid, a_ready = 0, a_last, b_valid, b_ready = 0, b_last, stall;
  cout_t a_data, b_data;
  int checks = 0, failures = 0, cycle = 0;
  int n_stall = 0, n_tie = 0, n_sym [2][2];   // [mode][stream]

  fft_stage dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (40000) @(posedge clk);
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

  // input accounting and output checking, at negedge (inputs stable)
  always @(negedge clk) if (rst_n) begin
    if (stall) n_stall++;
    if (dut.can_go == 2'b11) n_tie++;
    if (s_valid && s_ready) begin
      acc[s_ant].push_back(s_data);
      if (acc[s_ant].size() == 8) begin
        exp_q[s_ant].push_back(dft(acc[s_ant], inverse));
        acc[s_ant].delete();
        n_sym[inverse][s_ant]++;
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
      failures++; $display("stream %0d: unexpected output", st); return;
    end
    k  = bin_idx[st];
    gr = int'(d.re);
    gi = int'(d.im);
    tol = (k % 2 == 0) ? 0.01 : 1.5;
    if ((gr - exp_q[st][0].re[k]) > tol || (exp_q[st][0].re[k] - gr) > tol ||
        (gi - exp_q[st][0].im[k]) > tol || (exp_q[st][0].im[k] - gi) > tol ||
        last != (k == 7)) begin
      failures++;
      $display("stream %0d bin %0d: got %0d,%0d last %0d exp %f,%f", st, k, gr, gi, last,
               exp_q[st][0].re[k], exp_q[st][0].im[k]);
    end
    if (k == 7) begin
      void'(exp_q[st].pop_front());
      bin_idx[st] = 0;
    end else bin_idx[st] = k + 1;
  endtask

  // random traffic, driven at posedge+2
  bit traffic = 0;
  int ready_mode = 0;
  always @(posedge clk) #2 if (traffic) begin
    if (!(s_valid && !s_ready)) begin
      s_valid = ($urandom_range(0, 4) != 0);
      s_ant   = 1'($urandom);
      s_data  = '{re: 8'($urandom), im: 8'($urandom)};
    end
    if ($urandom_range(0, 99) == 0) ready_mode = $urandom_range(0, 2);
    a_ready = (ready_mode == 1) ? 1'b0 : ($urandom_range(0, 3) != 0);
    b_ready = (ready_mode == 2) ? 1'b0 : ($urandom_range(0, 3) != 0);
  end

  task automatic directed_latency();
    int t_last;
    @(posedge clk) #2;
    a_ready = 0;
    for (int i = 0; i < 8; i++) begin
      @(posedge clk) #2;
      s_valid = 1; s_ant = 0; s_data = '{re: 8'(i * 9 - 30), im: 8'(5 - i)};
    end
    @(negedge clk) t_last = cycle;       // 8th sample accepted at the next edge
    @(posedge clk) #2 s_valid = 0;
    while (!a_valid) @(negedge clk);
    checks++;
    if (cycle - t_last != 5) begin
      failures++; $display("latency %0d, expected 5", cycle - t_last);
    end
    @(posedge clk) #2 a_ready = 1;
    wait (exp_q[0].size() == 0);
  endtask

  // both streams blocked, then released together: they compete for the FFT
  task automatic directed_tie();
    @(posedge clk) #2;
    a_ready = 0; b_ready = 0;
    for (int i = 0; i < 32; i++) begin
      @(posedge clk) #2;
      s_valid = 1; s_ant = 1'(i % 2); s_data = '{re: 8'($urandom), im: 8'($urandom)};
      @(negedge clk); #1;
      while (!s_ready) begin @(negedge clk); #1; end
    end
    @(posedge clk) #2 s_valid = 0;
    repeat (40) @(posedge clk);
    #2 a_ready = 1; b_ready = 1;
    wait (exp_q[0].size() == 0 && exp_q[1].size() == 0);
  endtask

  task automatic drain();
    traffic = 0;
    @(posedge clk) #2;
    s_valid = 0; a_ready = 1; b_ready = 1;
    // complete partial symbols so that everything leaves
    for (int st = 0; st < 2; st++)
      while (acc[st].size() != 0) begin
        @(posedge clk) #2;
        s_valid = 1; s_ant = 1'(st); s_data = '{re: 8'($urandom), im: 8'($urandom)};
        @(negedge clk); #1;
        while (!s_ready) begin @(negedge clk); #1; end
      end
    @(posedge clk) #2 s_valid = 0;
    repeat (40) @(posedge clk);
  endtask

  initial begin
    n_sym = '{default: 0};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    directed_latency();
    directed_tie();
    traffic = 1;
    repeat (6000) @(posedge clk);
    drain();
    inverse = 0;
    traffic = 1;
    repeat (6000) @(posedge clk);
    drain();
    checks++;
    if (exp_q[0].size() != 0 || exp_q[1].size() != 0) begin
      failures++; $display("symbols never came out");
    end
    $display("symbols inv a/b %0d/%0d fwd a/b %0d/%0d, stall cycles %0d, ties %0d",
             n_sym[1][0], n_sym[1][1], n_sym[0][0], n_sym[0][1], n_stall, n_tie);
    checks++;
    if (n_sym[1][0] == 0 || n_sym[1][1] == 0 || n_sym[0][0] == 0 || n_sym[0][1] == 0 ||
        n_stall == 0 || n_tie == 0) begin
      failures++; $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
