// tb_qam256_mapper: self-checking test of the 256-QAM mapper.
// Sends all 256 byte values (twice, in random order the second time) under
// random output back-pressure and checks every symbol, in order, against a
// reference built by Gray-coding the level index: level 2*i - 15 carries the
// nibble i ^ (i >> 1). Also checks the one-cycle latency of the first symbol
// and that neighbouring levels differ in exactly one bit.
module tb_qam256_mapper;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [7:0] in_bits = '0;
  cin_t out_sym;
  int checks = 0, failures = 0;
  int ref_level [16];
  logic [7:0] sent [$];

  qam256_mapper dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker, sampled mid-cycle
  always @(negedge clk) if (rst_n && out_valid && out_ready) begin
    logic [7:0] b;
    checks++;
    if (sent.size() == 0) begin failures++; $display("extra symbol"); end
    else begin
      b = sent.pop_front();
      if (int'(out_sym.re) != ref_level[b[7:4]] || int'(out_sym.im) != ref_level[b[3:0]]) begin
        failures++;
        $display("bits %h: got %0d,%0d exp %0d,%0d", b, out_sym.re, out_sym.im,
                 ref_level[b[7:4]], ref_level[b[3:0]]);
      end
    end
  end
  always @(posedge clk) #2 out_ready = ($urandom_range(0, 3) != 0);

  initial begin
    logic [7:0] order [512];
    for (int i = 0; i < 16; i++) ref_level[i ^ (i >> 1)] = 2 * i - 15;
    for (int i = 0; i < 15; i++) begin
      logic [3:0] g0, g1;
      g0 = 4'(i ^ (i >> 1)); g1 = 4'((i + 1) ^ ((i + 1) >> 1));
      checks++;
      if ($countones(g0 ^ g1) != 1) failures++;
    end
    for (int i = 0; i < 256; i++) order[i] = 8'(i);
    for (int i = 256; i < 512; i++) order[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // latency: first symbol one cycle after it is accepted
    @(negedge clk);
    in_valid = 1; in_bits = 8'h5A; sent.push_back(8'h5A);
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid) begin failures++; $display("latency is not one cycle"); end
    wait (sent.size() == 0);
    foreach (order[i]) begin
      @(negedge clk);
      in_valid = 1; in_bits = order[i];
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      sent.push_back(order[i]);
    end
    @(negedge clk) in_valid = 0;
    repeat (50) @(posedge clk);
    checks++;
    if (sent.size() != 0) begin failures++; $display("%0d symbols missing", sent.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
