// tb_twiddle_mul: self-checking test of the constant twiddle multiplier.
// Four instances (K = 0..3) see the same random operand. Each result is
// compared with round((a * W8^K) * 181/256 * sqrt(2)) worked out with integer
// division, and with the exact complex product to within one unit.
module tb_twiddle_mul;
  localparam int W = 15;
  logic signed [W-1:0] a_re, a_im;
  logic signed [W-1:0] y_re [4], y_im [4];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < 4; k++) begin : g_k
    twiddle_mul #(.W(W), .K(k)) dut (.a_re, .a_im, .y_re(y_re[k]), .y_im(y_im[k]));
  end

  // floor((v*181 + 128) / 256) on plain integers
  function automatic int rnd(int v);
    int p;
    p = v * 181 + 128;
    return (p >= 0) ? p / 256 : -((-p + 255) / 256);
  endfunction

  task automatic check_one();
    int er [4], ei [4];
    real xr, xi, c, s;
    er[0] = a_re;              ei[0] = a_im;
    er[1] = rnd(a_re + a_im);  ei[1] = rnd(a_im - a_re);
    er[2] = a_im;              ei[2] = -a_re;
    er[3] = rnd(a_im - a_re);  ei[3] = rnd(-a_re - a_im);
    for (int k = 0; k < 4; k++) begin
      c = $cos(-2.0 * 3.14159265358979 * k / 8.0);
      s = $sin(-2.0 * 3.14159265358979 * k / 8.0);
      xr = a_re * c - a_im * s;
      xi = a_re * s + a_im * c;
      checks++;
      if (y_re[k] != W'(er[k]) || y_im[k] != W'(ei[k])) begin
        failures++;
        $display("K=%0d a=%0d,%0d got %0d,%0d exp %0d,%0d", k, a_re, a_im, y_re[k], y_im[k], er[k], ei[k]);
      end
      checks++;
      if ((y_re[k] - xr) > 1.0 || (xr - y_re[k]) > 1.0 || (y_im[k] - xi) > 1.0 || (xi - y_im[k]) > 1.0) begin
        failures++;
        $display("K=%0d a=%0d,%0d got %0d,%0d exact %f,%f", k, a_re, a_im, y_re[k], y_im[k], xr, xi);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int corner [6] = '{0, 1, -1, 255, -256, 511};
    foreach (corner[i]) foreach (corner[j]) begin
      a_re = W'(corner[i]); a_im = W'(corner[j]); #1; check_one();
    end
    for (int i = 0; i < 1000; i++) begin
      a_re = W'($signed($urandom_range(0, 2047)) - 1024);
      a_im = W'($signed($urandom_range(0, 2047)) - 1024);
      #1; check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
