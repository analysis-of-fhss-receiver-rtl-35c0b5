// tb_bpsk_mux_demod: builds a BPSK signal from a real-valued cosine model,
// one bit per 180-sample period, and checks that the demodulator reports each
// sample's bit one clock later (holding at the zero crossings, where both
// references are equal); then checks that unmatched samples hold the bit.
module tb_bpsk_mux_demod;
  import fh_pkg::*;

  logic clk = 0, rst_n = 0;
  sample_t bpsk = '0, carrier = '0, carrier_inv;
  logic data, match;
  int checks = 0, failures = 0;
  int holds = 0, flips = 0;
  int bits [11] = '{1, 1, 1, 1, 0, 0, 1, 0, 0, 1, 1};
  int expected = 0, prev_bit = 0;

  always #5 clk = ~clk;

  bpsk_mux_demod dut (.clk, .rst_n, .bpsk, .carrier, .carrier_inv, .data, .match);

  function automatic int cosq(int n);
    return int'(64.0 * $cos(2.0 * 3.14159265358979 * (n % 180) / 180.0));
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 11 * 180; n++) begin
      int c, b;
      c = cosq(n);
      b = bits[n / 180];
      carrier = 8'(c);
      bpsk    = 8'((b != 0) ? c : -c);
      #1 check("carrier_inv", int'(carrier_inv), -c);
      if (c != 0) expected = b;
      else        holds++;
      if (b != prev_bit) flips++;
      prev_bit = b;
      @(negedge clk);
      check("data", int'(data), expected);
      check("match", int'(match), int'(c != 0));
    end
    // samples that match neither phase hold the bit
    for (int n = 0; n < 50; n++) begin
      int c;
      c = cosq(n + 10);
      carrier = 8'(c);
      bpsk    = 8'(c + 3);
      @(negedge clk);
      check("hold on mismatch", int'(data), expected);
      check("no match", int'(match), 0);
    end
    checks++;
    if (holds == 0 || flips < 2) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
