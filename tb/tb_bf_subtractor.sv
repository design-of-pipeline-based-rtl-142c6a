// tb_bf_subtractor: self-checking test of the pipelined butterfly subtractor.
// Drives random and corner-case complex operands every cycle and checks that
// each difference appears exactly one cycle later, wrapped to W bits.
module tb_bf_subtractor;
  localparam int W = 15;
  logic clk = 0, rst_n = 0;
  logic signed [W-1:0] a_re, a_im, b_re, b_im, y_re, y_im;
  int checks = 0, failures = 0;

  bf_subtractor #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] er, ei;
    a_re = 0; a_im = 0; b_re = 0; b_im = 0;
    repeat (2) @(posedge clk);
    #1 checks++; if (y_re !== 0 || y_im !== 0) failures++;   // reset value
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      a_re = W'($urandom); a_im = W'($urandom);
      b_re = (i % 7 == 0) ? W'(-1) : W'($urandom);
      b_im = (i % 11 == 0) ? W'(16383) : W'($urandom);
      er = W'(int'(a_re) - int'(b_re));
      ei = W'(int'(a_im) - int'(b_im));
      @(posedge clk); #1;
      checks++;
      if (y_re !== er || y_im !== ei) begin
        failures++;
        $display("mismatch %0d: got %0d,%0d exp %0d,%0d", i, y_re, y_im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
