// tb_fft8: self-checking test of the 8-point pipelined FFT.
// Feeds random complex 8-bit symbols (plus corner vectors and the real
// vector 0x24,0x82,0x0B,0x66,0x11,0x92,0x6B,0x19 read as signed bytes) with
// random gaps, and compares each output set with a floating-point DFT: the
// even bins, which need no irrational twiddle, exactly; the odd bins to within
// 1.5 units. Also checks that every result appears exactly three cycles after
// its inputs and that the number of results equals the number of inputs.
module tb_fft8;
  import fft_pkg::*;
  localparam int LAT = 3;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  cin_t  x [N_POINTS];
  cout_t X [N_POINTS];
  int checks = 0, failures = 0;
  int cycle = 0;

  fft8 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  typedef struct { real re[8]; real im[8]; int t; } exp_t;
  exp_t q[$];
  int n_in = 0, n_out = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic exp_t dft(cin_t v [N_POINTS], int t);
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
    e.t = t;
    return e;
  endfunction

  // checker
  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    real tol;
    int gr, gi;
    n_out++;
    if (q.size() == 0) begin
      failures++; $display("unexpected output");
    end else begin
      e = q.pop_front();
      checks++;
      if (cycle - e.t != LAT) begin
        failures++; $display("latency %0d, expected %0d", cycle - e.t, LAT);
      end
      for (int k = 0; k < 8; k++) begin
        tol = (k % 2 == 0) ? 0.01 : 1.5;
        gr = int'(X[k].re);
        gi = int'(X[k].im);
        checks++;
        if ((gr - e.re[k]) > tol || (e.re[k] - gr) > tol ||
            (gi - e.im[k]) > tol || (e.im[k] - gi) > tol) begin
          failures++;
          $display("bin %0d: got %0d,%0d exp %f,%f", k, gr, gi, e.re[k], e.im[k]);
        end
      end
    end
  end

  task automatic send(cin_t v [N_POINTS]);
    @(negedge clk);
    x = v; in_valid = 1;
    q.push_back(dft(v, cycle));
    n_in++;
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    cin_t v [N_POINTS];
    byte fig [8] = '{8'h24, 8'h82, 8'h0B, 8'h66, 8'h11, 8'h92, 8'h6B, 8'h19};
    foreach (x[i]) x[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    foreach (v[i]) v[i] = '{re: fig[i], im: 8'sd0};                 send(v);
    foreach (v[i]) v[i] = '{re: 8'sd127, im: 8'sd127};              send(v);
    foreach (v[i]) v[i] = '{re: -8'sd128, im: -8'sd128};            send(v);
    foreach (v[i]) v[i] = (i == 0) ? '{re: 8'sd1, im: 8'sd0} : '0;  send(v);
    foreach (v[i]) v[i] = '{re: (i % 2) ? -8'sd128 : 8'sd127, im: (i % 2) ? 8'sd127 : -8'sd128}; send(v);
    // random, back-to-back or with gaps
    for (int r = 0; r < 300; r++) begin
      foreach (v[i]) v[i] = '{re: 8'($urandom), im: 8'($urandom)};
      @(negedge clk);
      x = v; in_valid = 1;
      q.push_back(dft(v, cycle));
      n_in++;
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk) in_valid = 0;
        repeat ($urandom_range(0, 4)) @(negedge clk);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (n_in != n_out || q.size() != 0) begin
      failures++; $display("inputs %0d outputs %0d", n_in, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
