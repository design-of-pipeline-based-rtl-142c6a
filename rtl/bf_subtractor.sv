// bf_subtractor: one "butterfly subtractor" of the FFT (units S1..S12).
//
// Subtracts two complex samples, real part from real part and imaginary
// from imaginary, and registers the difference, so each unit is one pipeline stage and a
// three-stage FFT built from them has a latency of three clock cycles. The
// FFT groups these units stage by stage; the grouping and the registered,
// pipelined style follow the published design. The single register stage,
// and the width W are this design's choices.
//
// Interface: a, b in; y = a - b, registered, so it appears one clock after a and b.
// Synchronous active-low reset clears the register.
module bf_subtractor #(
  parameter int unsigned W = 15
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] a_re,
  input  logic signed [W-1:0] a_im,
  input  logic signed [W-1:0] b_re,
  input  logic signed [W-1:0] b_im,
  output logic signed [W-1:0] y_re,
  output logic signed [W-1:0] y_im
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_re <= '0;
      y_im <= '0;
    end else begin
      y_re <= a_re - b_re;
      y_im <= a_im - b_im;
    end
  end

endmodule
