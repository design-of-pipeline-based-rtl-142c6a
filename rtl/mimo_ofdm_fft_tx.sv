// mimo_ofdm_fft_tx: the modulation and transform path of a 2x2 MIMO-OFDM
// transmitter built around one shared 8-point FFT.
//
// Coded bits enter one byte per 256-QAM symbol (the channel coder in front of
// this path is outside the design). The mapper turns each byte into a
// constellation point, the parser deals the points alternately to the two
// antenna streams, and the FFT stage collects eight points per stream into a
// symbol, transforms the two streams' symbols one after the other on a single
// FFT core (inverse transform when `inverse` is high, as a transmitter uses)
// and returns each stream's eight time-domain samples from its own output
// buffer. The outputs feed the stage after the transform (cyclic extension
// and output rate conversion), which is outside the design.
//
// The chain (modulator, parser, two input buffers, MUX, FFT, DEMUX, two output
// buffers) follows the published design; its single clock and valid/ready
// handshakes are this design's choices.
//
// Interface: bits_valid/bits_ready/bits in; a_*/b_* out, one 15-bit complex
// sample per handshake with *_last on the eighth; stall is high while a full
// input buffer waits for its output buffer to be read. Throughput: one
// input byte per cycle while the outputs are read as fast as they fill.
// FFT_ARCH picks the FFT core inside the FFT stage (see fft_stage): 0, the
// default, the eight-input parallel pipeline; 1, the two-path
// delay-commutator pipeline.
// Latency: from the last byte of a symbol to that antenna's first output
// sample, with the path empty, 7 cycles for FFT_ARCH = 0 (1 mapper, 1 parser,
// 1 buffer write, 3 FFT, 1 output buffer write) and 18 cycles for
// FFT_ARCH = 1. With
// FFT_ARCH = 1 the core streams one symbol at a time, so when both antennas'
// symbols complete together the second one waits 7 more cycles.
module mimo_ofdm_fft_tx
  import fft_pkg::*;
#(
  parameter int unsigned FFT_ARCH = 0   // 0: parallel fft8, 1: delay-commutator mdc_fft8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       inverse,
  input  logic       bits_valid,
  output logic       bits_ready,
  input  logic [7:0] bits,
  output logic       a_valid,
  input  logic       a_ready,
  output cout_t      a_data,
  output logic       a_last,
  output logic       b_valid,
  input  logic       b_ready,
  output cout_t      b_data,
  output logic       b_last,
  output logic       stall
);

  logic q_valid, q_ready;
  cin_t q_sym;
  logic p_valid, p_ready, p_ant;
  cin_t p_sym;

  qam256_mapper u_qam (
    .clk, .rst_n,
    .in_valid (bits_valid), .in_ready(bits_ready), .in_bits(bits),
    .out_valid(q_valid),    .out_ready(q_ready),   .out_sym(q_sym)
  );

  stream_parser #(.NUM_STREAMS(2)) u_parser (
    .clk, .rst_n,
    .in_valid (q_valid), .in_ready (q_ready), .in_sym (q_sym),
    .out_valid(p_valid), .out_ready(p_ready), .out_ant(p_ant), .out_sym(p_sym)
  );

  fft_stage #(.FFT_ARCH(FFT_ARCH)) u_fft_stage (
    .clk, .rst_n, .inverse,
    .s_valid(p_valid), .s_ready(p_ready), .s_ant(p_ant), .s_data(p_sym),
    .a_valid, .a_ready, .a_data, .a_last,
    .b_valid, .b_ready, .b_data, .b_last,
    .stall
  );

endmodule
