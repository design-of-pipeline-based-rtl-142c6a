// tb_sustained_rate: sustained-rate test of the transmitter path at the rates of
// its reference block diagram: a 100 MHz clock, 20 M symbols/s into each of
// the two antenna streams (two input bytes every 5 cycles) and 20 M
// samples/s read from each antenna output (one sample every 5 cycles).
// Both FFT cores run side by side (FFT_ARCH = 0 and 1) on the same 2 x 200
// OFDM symbols. A byte that meets back-pressure is delayed and the lag behind
// the schedule is tracked. The default parallel core must keep up: its lag
// may never exceed one symbol time (40 cycles). The delay-commutator core,
// whose one-symbol output buffer refills more slowly than the output is read,
// is expected to fall behind; the testbench reports the symbol period it
// achieves and checks that it stays within 64 cycles. Every symbol must come
// out with *_last on its eighth sample, and both cores must produce the same
// samples, in the same order, on each antenna.
module tb_sustained_rate;
  import fft_pkg::*;
  localparam int NSYM   = 200;        // symbols per antenna
  localparam int PERIOD = 5;          // cycles per output sample per antenna
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  logic       bits_valid [2], bits_ready [2];
  logic [7:0] bits [2];
  logic       a_valid [2], a_ready [2], a_last [2];
  logic       b_valid [2], b_ready [2], b_last [2];
  logic       stall [2];
  cout_t      a_data [2], b_data [2];
  int         max_lag [2], n_out [2][2], n_last [2][2], t_done [2];
  cout_t      outs [2][2][$];           // [core][antenna]
  logic [7:0] stream [$];

  for (genvar c = 0; c < 2; c++) begin : g_core
    mimo_ofdm_fft_tx #(.FFT_ARCH(c)) dut (
      .clk, .rst_n, .inverse(1'b1),
      .bits_valid(bits_valid[c]), .bits_ready(bits_ready[c]), .bits(bits[c]),
      .a_valid(a_valid[c]), .a_ready(a_ready[c]), .a_data(a_data[c]), .a_last(a_last[c]),
      .b_valid(b_valid[c]), .b_ready(b_ready[c]), .b_data(b_data[c]), .b_last(b_last[c]),
      .stall(stall[c]));

    // input: byte i is due at cycle t0 + (i / 2) * PERIOD + (i % 2)
    initial begin
      int lag;
      bits_valid[c] = 0; bits[c] = '0; max_lag[c] = 0;
      wait (rst_n);
      for (int i = 0; i < 2 * 8 * NSYM; i++) begin
        while (cycle < 20 + (i / 2) * PERIOD + (i % 2)) @(negedge clk);
        lag = cycle - (20 + (i / 2) * PERIOD + (i % 2));
        if (lag > max_lag[c]) max_lag[c] = lag;
        @(posedge clk) #2;
        bits_valid[c] = 1; bits[c] = stream[i];
        @(negedge clk); #1;
        while (!bits_ready[c]) begin @(negedge clk); #1; end
        @(posedge clk) #2 bits_valid[c] = 0;
      end
    end

    // outputs: each antenna read at most once every PERIOD cycles
    always @(posedge clk) #2 begin
      a_ready[c] = rst_n && (cycle % PERIOD == 0);
      b_ready[c] = rst_n && (cycle % PERIOD == 0);
    end
    always @(negedge clk) if (rst_n) begin
      if (a_valid[c] && a_ready[c]) begin
        outs[c][0].push_back(a_data[c]); n_out[c][0]++; if (a_last[c]) n_last[c][0]++;
      end
      if (b_valid[c] && b_ready[c]) begin
        outs[c][1].push_back(b_data[c]); n_out[c][1]++; if (b_last[c]) n_last[c][1]++;
        if (n_out[c][1] == 8 * NSYM) t_done[c] = cycle;
      end
    end
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_out = '{default: 0};
    n_last = '{default: 0};
    for (int i = 0; i < 2 * 8 * NSYM; i++) stream.push_back(8'($urandom));
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (n_out[0][0] == 8 * NSYM && n_out[0][1] == 8 * NSYM &&
          n_out[1][0] == 8 * NSYM && n_out[1][1] == 8 * NSYM);
    for (int c = 0; c < 2; c++) begin
      $display("core %0d: largest lag behind the input schedule %0d cycles, %0d cycles per symbol",
               c, max_lag[c], (t_done[c] - 20) / NSYM);
      checks++;
      if (c == 0 && max_lag[c] > 8 * PERIOD) begin
        failures++; $display("core 0 does not keep up with the input rate");
      end
      if (c == 1 && (t_done[c] - 20) / NSYM > 64) begin
        failures++; $display("core 1 slower than expected");
      end
      for (int ant = 0; ant < 2; ant++) begin
        checks++;
        if (n_last[c][ant] != NSYM) begin
          failures++; $display("core %0d antenna %0d: %0d symbols marked", c, ant, n_last[c][ant]);
        end
      end
    end
    for (int ant = 0; ant < 2; ant++)
      for (int i = 0; i < 8 * NSYM; i++) begin
        checks++;
        if (outs[0][ant][i] != outs[1][ant][i]) begin
          failures++;
          $display("antenna %0d sample %0d: cores differ", ant, i);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
