// tb_stream_parser: self-checking test of the two-stream symbol parser.
// Random input valid and output ready. Every accepted symbol must come out
// unchanged and in order, tagged with stream 0, 1, 0, 1, ... counted over
// accepted symbols only, so a stalled symbol keeps its stream. Also checked:
// a held output does not change until taken, in_ready is high whenever the
// output register is empty or being read (one symbol per cycle), and a
// symbol accepted into an empty parser is shown one cycle later.
module tb_stream_parser;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [0:0] out_ant;
  cin_t in_sym = '0, out_sym;
  int checks = 0, failures = 0;
  int n_acc = 0, n_out = 0, n_stalled = 0, n_held = 0;
  cin_t exp_q[$];
  logic prev_hold = 0, directed = 0;
  cin_t prev_sym;
  logic prev_ant;

  stream_parser #(.NUM_STREAMS(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive at posedge+2, check at negedge, handshake at the next posedge
  always @(posedge clk) #2 if (!directed) begin
    out_ready = ($urandom_range(0, 2) != 0);
    if (!(in_valid && !in_ready)) begin     // hold a stalled symbol
      in_valid = ($urandom_range(0, 3) != 0);
      in_sym   = '{re: 8'($urandom), im: 8'($urandom)};
    end
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (in_ready != (!out_valid || out_ready)) begin
      failures++; $display("in_ready %0b with out_valid %0b out_ready %0b", in_ready, out_valid, out_ready);
    end
    if (prev_hold) begin
      checks++; n_held++;
      if (!out_valid || out_sym != prev_sym || out_ant != prev_ant) begin
        failures++; $display("held output changed");
      end
    end
    prev_hold = out_valid && !out_ready;
    prev_sym  = out_sym;
    prev_ant  = out_ant;
    if (in_valid && !in_ready) n_stalled++;
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("output with nothing accepted");
      end else begin
        if (out_sym != exp_q.pop_front() || int'(out_ant) != n_out % 2) begin
          failures++; $display("symbol %0d wrong or sent to stream %0d", n_out, out_ant);
        end
      end
      n_out++;
    end
    if (in_valid && in_ready) begin
      exp_q.push_back(in_sym);
      n_acc++;
    end
  end

  task automatic directed_latency();
    // drain, then offer one symbol and see it one cycle after acceptance
    directed = 1;
    @(posedge clk) #2 begin in_valid = 0; out_ready = 1; end
    repeat (3) @(posedge clk);
    #2 begin in_valid = 1; in_sym.re = 8'sd17; in_sym.im = -8'sd3; end
    @(posedge clk) #2 in_valid = 0;
    @(negedge clk);
    checks++;
    if (!out_valid || out_sym.re != 8'sd17 || out_sym.im != -8'sd3) begin
      failures++; $display("latency is not 1 cycle");
    end
    @(posedge clk) #2 directed = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (1000) @(posedge clk);
    directed_latency();
    repeat (200) @(posedge clk);
    checks++;
    if (n_stalled == 0 || n_held == 0 || n_acc < 100 || n_acc - n_out > 1) begin
      failures++; $display("stimulus too weak or symbols lost (%0d in, %0d out)", n_acc, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
