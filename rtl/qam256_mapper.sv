// qam256_mapper: maps eight coded bits to one 256-QAM constellation point.
//
// The upper nibble in_bits[7:4] selects the in-phase level and the lower
// nibble in_bits[3:0] the quadrature level. Each nibble is read as a Gray
// code (bit 3 first): its binary index i = 0..15 gives the level 2*i - 15,
// so the points are the odd integers -15..15 on each axis and neighbouring
// points differ in one bit. The levels fit the 8-bit FFT input samples
// without scaling. That the modulation is 256-QAM follows the published
// design; the bit order, the Gray labelling (the usual one of IEEE 802.11)
// and the unnormalised integer levels are this design's choices.
//
// Interface: valid/ready on both sides, one output register, so a symbol
// appears one cycle after its bits are accepted and one symbol can pass per
// cycle. Synchronous active-low reset.
module qam256_mapper
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_bits,
  output logic       out_valid,
  input  logic       out_ready,
  output cin_t       out_sym
);

  // Gray nibble to PAM-16 level.
  function automatic logic signed [IN_W-1:0] level(logic [3:0] g);
    logic [3:0] b;
    b[3] = g[3];
    for (int i = 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return IN_W'(2 * int'(b)) - IN_W'(15);
  endfunction

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_sym <= '{re: level(in_bits[7:4]), im: level(in_bits[3:0])};
    end
  end

endmodule
