// tb_mdc_fft8: self-checking test of the delay-commutator 8-point FFT.
// Streams symbols of eight samples (random values plus corner vectors),
// back-to-back or with random idle gaps, and checks every output pair
// y_up = X[k], y_lo = X[k+4] against a floating-point DFT (bins without an
// irrational twiddle exactly, others within 1.5), the pair order 0, 2, 1, 3
// with out_last on the fourth, and that the first pair comes 3 cycles and the
// last pair 6 cycles after the symbol's last sample.
module tb_mdc_fft8;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  cin_t x = '0;
  logic out_valid, out_last;
  logic [1:0] out_k;
  cout_t y_up, y_lo;
  int checks = 0, failures = 0, cycle = 0;

  mdc_fft8 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { real re[8]; real im[8]; int t_last; } exp_t;
  exp_t q[$];
  int pair = 0, n_sym_out = 0;
  const int korder [4] = '{0, 2, 1, 3};

  function automatic exp_t dft(cin_t v [8], int t);
    exp_t e;
    for (int k = 0; k < 8; k++) begin
      e.re[k] = 0.0; e.im[k] = 0.0;
      for (int n = 0; n < 8; n++) begin
        real c, s;
        c = $cos(-2.0 * 3.14159265358979 * n * k / 8.0);
        s = $sin(-2.0 * 3.14159265358979 * n * k / 8.0);
        e.re[k] += v[n].re * c - v[n].im * s;
        e.im[k] += v[n].re * s + v[n].im * c;
      end
    end
    e.t_last = t;
    return e;
  endfunction

  function automatic bit near(int gr, int gi, real er, real ei, int k);
    real tol, dr, di;
    tol = (k % 2 == 0) ? 0.01 : 1.5;
    dr = gr - er;
    di = gi - ei;
    return (dr <= tol) && (-dr <= tol) && (di <= tol) && (-di <= tol);
  endfunction

  always @(negedge clk) if (rst_n && out_valid) begin
    int k;
    checks++;
    if (q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      k = korder[pair];
      if (out_k != 2'(k) || out_last != (pair == 3)) begin
        failures++; $display("pair %0d: out_k %0d last %0d", pair, out_k, out_last);
      end
      if (!near(int'(y_up.re), int'(y_up.im), q[0].re[k], q[0].im[k], k) ||
          !near(int'(y_lo.re), int'(y_lo.im), q[0].re[k+4], q[0].im[k+4], k+4)) begin
        failures++;
        $display("bins %0d/%0d: got %0d,%0d / %0d,%0d exp %f,%f / %f,%f", k, k+4,
                 y_up.re, y_up.im, y_lo.re, y_lo.im, q[0].re[k], q[0].im[k], q[0].re[k+4], q[0].im[k+4]);
      end
      if ((pair == 0 && cycle - q[0].t_last != 3) || (pair == 3 && cycle - q[0].t_last != 6)) begin
        failures++; $display("pair %0d at %0d cycles after the last sample", pair, cycle - q[0].t_last);
      end
      if (pair == 3) begin void'(q.pop_front()); pair = 0; n_sym_out++; end
      else pair++;
    end
  end

  task automatic send(cin_t v [8]);
    for (int n = 0; n < 8; n++) begin
      @(posedge clk) #2;
      in_valid = 1; x = v[n];
    end
    @(negedge clk) q.push_back(dft(v, cycle));
  endtask

  initial begin
    cin_t v [8];
    static int n_sent = 0;
    static byte fig [8] = '{8'h24, 8'h82, 8'h0B, 8'h66, 8'h11, 8'h92, 8'h6B, 8'h19};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    foreach (v[i]) v[i] = '{re: fig[i], im: 8'sd0};       send(v); n_sent++;
    foreach (v[i]) v[i] = '{re: -8'sd128, im: 8'sd127};   send(v); n_sent++;
    foreach (v[i]) v[i] = (i == 5) ? '{re: 8'sd1, im: -8'sd1} : '0; send(v); n_sent++;
    for (int r = 0; r < 400; r++) begin
      foreach (v[i]) v[i] = '{re: 8'($urandom), im: 8'($urandom)};
      send(v); n_sent++;
      if ($urandom_range(0, 2) == 0) begin
        @(posedge clk) #2 in_valid = 0;
        repeat ($urandom_range(0, 9)) @(posedge clk);
      end
    end
    @(posedge clk) #2 in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (n_sym_out != n_sent || q.size() != 0) begin
      failures++; $display("sent %0d symbols, received %0d", n_sent, n_sym_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
