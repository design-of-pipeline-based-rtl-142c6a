// fft_stage: one 8-point FFT shared by two antenna streams.
//
// Each stream owns an input buffer (RAM1a, RAM1b) and an output buffer
// (RAM2a, RAM2b). Samples arrive one at a time, tagged with their stream,
// and fill that stream's input buffer. When an input buffer holds a whole
// 8-sample symbol and the same stream's output buffer is free, the input
// multiplexer hands the eight samples to the FFT in one cycle; the stream tag
// travels beside the FFT pipeline and the output demultiplexer writes the
// eight bins into that stream's output buffer three cycles later. Each output
// buffer is read out one bin per handshake, in bin order 0..7. The two
// streams thus take turns on one FFT core instead of one core each.
//
// The buffer/MUX/FFT/DEMUX/buffer arrangement for two streams and the time
// sharing of a single transform follow the published design. The single
// clock, the valid/ready handshakes, the round-robin choice when both streams
// are ready, one symbol per buffer, and the inverse mode are this design's
// choices. With `inverse` high the stage computes the unscaled inverse
// transform, x[n] = sum_k X[k] exp(+j*2*pi*n*k/8), by swapping the real and
// imaginary parts on the way into and out of the forward FFT; the transmitter
// uses this mode, a receiver the forward one. `inverse` should only change
// while the stage is empty.
//
// Interface:
//   s_valid/s_ready/s_ant/s_data  input samples; s_ant selects RAM1a (0) or
//                                 RAM1b (1); s_ready reflects that buffer.
//   a_* / b_*                     output bins of stream a and b, with *_last
//                                 on bin 7.
//   stall                         high while a full input buffer waits for its
//                                 output buffer to drain.
//
// FFT_ARCH selects the transform core. 0 (default): fft8, the eight-input
// parallel pipeline; a symbol is handed over in one cycle and the next
// symbol may follow in the next cycle. 1: mdc_fft8, the two-path
// delay-commutator pipeline; the MUX streams the eight samples of a symbol
// over eight cycles and the DEMUX writes the bins two at a time (X[k] and
// X[k+4]) as they emerge; the input buffer is freed once its last sample has
// been read. The published design presents both forms of its 8-point FFT.
//
// Latency, last input sample of a symbol accepted to the first output bin
// valid, when the stream's output buffer is free: 5 cycles with FFT_ARCH = 0
// (1 to issue, 3 in the FFT, 1 to write the output buffer), 16 cycles with
// FFT_ARCH = 1 (1 to issue, 8 to stream, 6 until the fourth bin pair leaves
// the FFT, 1 to write it).
//
// Throughput: because each output buffer holds one symbol, an output stream
// that is read continuously waits out this latency once per symbol. With
// FFT_ARCH = 0 that wait fits into the gap before the next read when bins
// are read no faster than one every 5 cycles; with FFT_ARCH = 1 it does not,
// and a stream read at one bin every 5 cycles gets a symbol every 55 cycles
// instead of every 40.
module fft_stage
  import fft_pkg::*;
#(
  parameter int unsigned FFT_ARCH = 0   // 0: parallel fft8, 1: delay-commutator mdc_fft8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  inverse,
  // input samples
  input  logic  s_valid,
  output logic  s_ready,
  input  logic  s_ant,
  input  cin_t  s_data,
  // stream a output (RAM2a)
  output logic  a_valid,
  input  logic  a_ready,
  output cout_t a_data,
  output logic  a_last,
  // stream b output (RAM2b)
  output logic  b_valid,
  input  logic  b_ready,
  output cout_t b_data,
  output logic  b_last,
  // status
  output logic  stall
);

  localparam int unsigned AW = $clog2(N_POINTS);

  // swap real and imaginary parts (inverse transform through the forward core)
  function automatic cin_t swap_in(cin_t v, logic sw);
    return sw ? '{re: v.im, im: v.re} : v;
  endfunction
  function automatic cout_t swap_out(cout_t v, logic sw);
    return sw ? '{re: v.im, im: v.re} : v;
  endfunction

  // ---- RAM1a / RAM1b: input buffers --------------------------------------
  cin_t            ram1 [2][N_POINTS];
  logic [AW:0]     wcnt [2];           // samples held, 0..N_POINTS
  logic [1:0]      full1;

  always_comb
    for (int s = 0; s < 2; s++) full1[s] = (wcnt[s] == (AW+1)'(N_POINTS));

  assign s_ready = !full1[s_ant];

  // ---- issue: pick a stream whose input is full and whose output is free --
  logic [1:0] busy2;                    // output buffer reserved or holding data
  logic [1:0] can_go;
  logic       prio;                     // stream that wins a tie
  logic       core_free;                // the core can take a new symbol
  logic       go;
  logic       go_ant;

  assign can_go = full1 & ~busy2;
  always_comb begin
    go     = core_free && |can_go;
    go_ant = can_go[prio] ? prio : can_go[1];
  end
  assign stall = |(full1 & busy2);

  // ---- core-specific MUX, FFT and DEMUX -----------------------------------
  // Each core reports: which input buffer to free, and the bins to write into
  // an output buffer (mask of bin positions), and when that buffer is complete.
  logic                free_en;
  logic                free_ant;
  logic                res_valid;
  logic                res_ant;
  logic [N_POINTS-1:0] res_mask;
  cout_t               res_data [N_POINTS];
  logic                res_done;

  if (FFT_ARCH == 0) begin : g_parallel
    cin_t  fft_x [N_POINTS];
    cout_t fft_X [N_POINTS];
    logic  fft_ov;
    logic [N_STAGES-1:0] tag_pipe;      // stream tag beside the FFT pipeline

    always_comb
      for (int i = 0; i < int'(N_POINTS); i++) fft_x[i] = swap_in(ram1[go_ant][i], inverse);

    fft8 u_fft (
      .clk, .rst_n,
      .in_valid (go),
      .x        (fft_x),
      .out_valid(fft_ov),
      .X        (fft_X)
    );

    always_ff @(posedge clk) tag_pipe <= {tag_pipe[N_STAGES-2:0], go_ant};

    assign core_free = 1'b1;
    assign free_en   = go;
    assign free_ant  = go_ant;
    assign res_valid = fft_ov;
    assign res_ant   = tag_pipe[N_STAGES-1];
    assign res_mask  = '1;
    assign res_done  = 1'b1;
    always_comb
      for (int i = 0; i < int'(N_POINTS); i++) res_data[i] = swap_out(fft_X[i], inverse);

  end else begin : g_mdc
    logic          str_act;             // a symbol is being streamed
    logic          str_ant;
    logic [AW-1:0] str_cnt;
    logic          str_end;
    logic          mdc_ov, mdc_last;
    logic [1:0]    mdc_k;
    cout_t         y_up, y_lo;
    logic          tag_q [2];           // streams of the symbols in the core, oldest first
    logic [1:0]    tag_n;               // entries in tag_q, 0..2
    logic          tag_pop;

    assign str_end   = str_act && str_cnt == AW'(N_POINTS-1);
    assign tag_pop   = mdc_ov && mdc_last;
    assign core_free = !str_act || str_end;

    mdc_fft8 u_fft (
      .clk, .rst_n,
      .in_valid (str_act),
      .x        (swap_in(ram1[str_ant][str_cnt], inverse)),
      .out_valid(mdc_ov),
      .out_k    (mdc_k),
      .out_last (mdc_last),
      .y_up, .y_lo
    );

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        str_act <= 1'b0;
        str_cnt <= '0;
        str_ant <= 1'b0;
        tag_n   <= 2'd0;
      end else begin
        if (go) begin
          str_act <= 1'b1;
          str_ant <= go_ant;
          str_cnt <= '0;
        end else if (str_end) begin
          str_act <= 1'b0;
        end else if (str_act) begin
          str_cnt <= str_cnt + 1'b1;
        end
        // tag FIFO: push at issue, pop after the last bin pair
        unique case ({go, tag_pop})
          2'b10: begin
            if (tag_n == 2'd0) tag_q[0] <= go_ant;
            else               tag_q[1] <= go_ant;
            tag_n <= tag_n + 1'b1;
          end
          2'b01: begin
            tag_q[0] <= tag_q[1];
            tag_n    <= tag_n - 1'b1;
          end
          2'b11: begin
            if (tag_n == 2'd1) tag_q[0] <= go_ant;
            else begin
              tag_q[0] <= tag_q[1];
              tag_q[1] <= go_ant;
            end
          end
          default: ;
        endcase
      end
    end

    assign free_en   = str_end;
    assign free_ant  = str_ant;
    assign res_valid = mdc_ov;
    assign res_ant   = tag_q[0];
    assign res_done  = mdc_last;
    always_comb begin
      res_mask = '0;
      res_mask[{1'b0, mdc_k}] = 1'b1;     // X[k]
      res_mask[{1'b1, mdc_k}] = 1'b1;     // X[k+4]
      for (int i = 0; i < int'(N_POINTS); i++) res_data[i] = swap_out(y_up, inverse);
      for (int i = 4; i < int'(N_POINTS); i++) res_data[i] = swap_out(y_lo, inverse);
    end

    // At most two symbols are inside the core; results never outrun issues.
    assert property (@(posedge clk) disable iff (!rst_n) !(go && !tag_pop && tag_n == 2'd2));
    assert property (@(posedge clk) disable iff (!rst_n) !(tag_pop && tag_n == 2'd0));
  end

  // ---- RAM2a / RAM2b: output buffers --------------------------------------
  cout_t       ram2 [2][N_POINTS];
  logic [1:0]  full2;
  logic [AW-1:0] rptr [2];
  logic [1:0]  rd_fire;

  assign rd_fire = {b_valid & b_ready, a_valid & a_ready};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wcnt  <= '{default: '0};
      rptr  <= '{default: '0};
      full2 <= '0;
      busy2 <= '0;
      prio  <= 1'b0;
    end else begin
      // input buffer writes
      if (s_valid && s_ready) begin
        ram1[s_ant][wcnt[s_ant][AW-1:0]] <= s_data;
        wcnt[s_ant] <= wcnt[s_ant] + 1'b1;
      end
      // the core has read the whole symbol: free the input buffer
      if (free_en) wcnt[free_ant] <= '0;
      // issue reserves the output buffer
      if (go) begin
        busy2[go_ant] <= 1'b1;
        prio          <= !go_ant;
      end
      // output DEMUX
      if (res_valid) begin
        for (int i = 0; i < int'(N_POINTS); i++)
          if (res_mask[i]) ram2[res_ant][i] <= res_data[i];
        if (res_done) begin
          full2[res_ant] <= 1'b1;
          rptr[res_ant]  <= '0;
        end
      end
      // serial read-out
      for (int s = 0; s < 2; s++)
        if (rd_fire[s]) begin
          rptr[s] <= rptr[s] + 1'b1;
          if (rptr[s] == AW'(N_POINTS-1)) begin
            full2[s] <= 1'b0;
            busy2[s] <= 1'b0;
          end
        end
    end
  end

  assign a_valid = full2[0];
  assign a_data  = ram2[0][rptr[0]];
  assign a_last  = (rptr[0] == AW'(N_POINTS-1));
  assign b_valid = full2[1];
  assign b_data  = ram2[1][rptr[1]];
  assign b_last  = (rptr[1] == AW'(N_POINTS-1));

  // A sample is never written into a buffer that is being read by the core.
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(s_valid && s_ready && go && s_ant == go_ant));

endmodule
