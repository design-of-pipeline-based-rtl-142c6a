// stream_parser: splits one stream of modulated symbols into the two spatial
// streams of a 2x2 MIMO transmitter.
//
// Symbols are dealt out in turn, one to stream 0, the next to stream 1, and
// so on; the output carries the stream number in out_ant. When the receiving
// stream cannot take a symbol, the parser waits on it rather than skipping
// ahead, so the two streams stay in step and symbol 2m always lands on stream
// 0 at the same position as symbol 2m+1 on stream 1. The published design
// places a parser between the modulator and the two input buffers of the FFT
// stage but does not say how it splits; the alternating rule is this design's
// choice. NUM_STREAMS is 2, the two antennas of the published 2x2 system.
//
// Interface: valid/ready in and out. The output is a single register stage
// that still takes one symbol per cycle: a symbol and its stream number are
// captured when accepted and shown on out_* from the next cycle until taken
// (in_ready = output register empty or being read). Latency 1 cycle.
// Synchronous active-low reset empties the register and starts at stream 0.
module stream_parser
  import fft_pkg::*;
#(
  parameter int unsigned NUM_STREAMS = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  cin_t in_sym,
  output logic out_valid,
  input  logic out_ready,
  output logic [$clog2(NUM_STREAMS)-1:0] out_ant,
  output cin_t out_sym
);

  localparam int unsigned SW = $clog2(NUM_STREAMS);

  logic [SW-1:0] turn;
  logic          take;

  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      turn      <= '0;
      out_valid <= 1'b0;
      out_ant   <= '0;
      out_sym   <= '0;
    end else begin
      if (take) begin
        out_sym <= in_sym;
        out_ant <= turn;
        turn    <= (turn == SW'(NUM_STREAMS-1)) ? '0 : turn + 1'b1;
      end
      if (in_ready)
        out_valid <= in_valid;
    end
  end

endmodule
