// bf_adder: one "butterfly adder" of the FFT (units A1..A12).
//
// Adds two complex samples, real part to real part and imaginary to
// imaginary, and registers the sum, so each unit is one pipeline stage and a
// three-stage FFT built from them has a latency of three clock cycles. The
// FFT groups these units stage by stage; the grouping and the registered,
// pipelined style follow the published design. The single register stage,
// and the width W are this design's choices.
//
// Interface: a, b in; y = a + b, registered, so it appears one clock after a and b.
// Synchronous active-low reset clears the register.
module bf_adder #(
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
      y_re <= a_re + b_re;
      y_im <= a_im + b_im;
    end
  end

endmodule
