// tb_fhbpsk_receiver: end-to-end test of the FH/BPSK receiver at its default
// parameters.
//
// The testbench is its own transmitter. It keeps an independent model of the
// spread code (x^7+x^6+1 LFSR, seed 0x5b, code = state mod 5, one hop per 180
// samples) and of the carriers (round(64*cos(2*pi*step*n/180)) in real
// arithmetic, steps 1, 5, 10, 15, 20). An FH/BPSK sample is
//   rx(n) = (+1 or -1 for the bit) * carrier(n) * spread(n) + noise,
// and an FHSS-only sample is (+1 or -1) * spread(n) + noise. Three frames run
// back to back: FH/BPSK, FHSS-only (mode switch), FH/BPSK again (restart of
// the oscillators and the code in mid-stream). Bit k of a frame must be
// reported with rx_bit_valid exactly in cycle t0 + 183 + 180*k and nowhere
// else. Alongside, a plain BPSK stream goes through the comparison
// demodulator, whose bit must follow each sample two cycles later.
// Counted mechanisms: each of the five hop frequencies, both bit values on
// each path, the FHSS-only mode, a frame restart, bit reversals on the BPSK
// path; a mechanism that never occurs is a failure.
module tb_fhbpsk_receiver;
  import fh_pkg::*;

  localparam int STEPS [5] = '{1, 5, 10, 15, 20};
  localparam int NB_A = 24, NB_B = 10, NB_C = 12;
  localparam int NOISE = 600;  // peak of the uniform noise added to rx

  logic    clk = 0, rst_n = 0;
  logic    rx_start = 0, rx_valid = 0, fhss_only = 0;
  rx_t     rx_sample = '0;
  logic    rx_bit, rx_bit_valid;
  logic signed [DEMOD_W+8:0] rx_metric;
  code_t   hop_code;
  logic    hop_start;
  sample_t spread_freq;
  logic    bpsk_start = 0, bpsk_valid = 0;
  sample_t bpsk_sample = '0;
  logic    bpsk_bit, bpsk_match;

  int checks = 0, failures = 0;
  int freq_used [5];
  int fh_ones = 0, fh_zeros = 0, fhss_only_bits = 0, restarts = 0;
  int bp_ones = 0, bp_zeros = 0, bp_reversals = 0;

  always #5 clk = ~clk;

  fhbpsk_receiver dut (.*);

  function automatic int cosq(int n, int step);
    return int'(64.0 * $cos(2.0 * 3.14159265358979 * ((n * step) % 180) / 180.0));
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Stimulus tables, one entry per clock.
  int  s_rx [$];
  bit  s_start [$];
  bit  s_valid [$];
  bit  s_mode [$];
  int  e_bit [int];   // expected rx_bit after this clock; absent: no decision
  int  s_code [$];    // hop code the transmitter used
  int  bp_rx [$];
  int  bp_exp [$];    // expected bpsk_bit after this clock, -1: not checked

  task automatic add_frame(int nbits, bit fhss);
    int base, bit_sign;
    logic [6:0] m;
    m = 7'h5b;
    base = s_rx.size();
    bit_sign = 1;
    for (int n = 0; n < nbits * 180; n++) begin
      int code, c, s, noise;
      if (n % 180 == 0) begin
        if (n > 0) m = {m[5:0], m[6] ^ m[5]};
        bit_sign = ($urandom % 2 != 0) ? 1 : -1;
      end
      code  = int'(m) % 5;
      c     = cosq(n, 1);
      s     = cosq(n, STEPS[code]);
      noise = int'($urandom % (2 * NOISE + 1)) - NOISE;
      if (n % 180 == 0) freq_used[code]++;
      s_rx.push_back(fhss ? bit_sign * s + noise / 16 : bit_sign * c * s + noise);
      s_start.push_back(n == 0);
      s_valid.push_back(1);
      s_mode.push_back(fhss);
      s_code.push_back(code);
      // the decision on a bit is seen three clocks after its last sample
      if (n % 180 == 179) begin
        e_bit[base + n + 3] = (bit_sign > 0) ? 1 : 0;
        if (fhss) fhss_only_bits++;
        else if (bit_sign > 0) fh_ones++;
        else fh_zeros++;
      end
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total, pb;
    add_frame(NB_A, 0);
    add_frame(NB_B, 1);
    restarts++;
    add_frame(NB_C, 0);
    restarts++;
    // pad so the last decision is seen
    repeat (8) begin
      s_rx.push_back(0); s_start.push_back(0); s_valid.push_back(0); s_mode.push_back(0);
      s_code.push_back(-1);
    end
    // plain BPSK stream on the side path
    pb = 1;
    for (int n = 0; n < s_rx.size(); n++) begin
      int c;
      if (n % 180 == 0) begin
        int nb;
        nb = ($urandom % 2 != 0) ? 1 : 0;
        if (n > 0 && nb != pb) bp_reversals++;
        pb = nb;
        if (pb != 0) bp_ones++; else bp_zeros++;
      end
      c = cosq(n, 1);
      bp_rx.push_back((pb != 0) ? c : -c);
      bp_exp.push_back(pb);
    end
    total = s_rx.size();

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (20) @(negedge clk);
    for (int i = 0; i < total; i++) begin
      rx_sample   = 16'(s_rx[i]);
      rx_start    = s_start[i];
      rx_valid    = s_valid[i];
      fhss_only   = s_mode[i];
      bpsk_sample = 8'(bp_rx[i]);
      bpsk_start  = (i == 0);
      bpsk_valid  = 1;
      @(negedge clk);
      // FH/BPSK decisions: e_bit[i] set at index (last sample) + 3, i.e. the
      // decision is visible after the clock edge that took sample i
      if (e_bit.exists(i)) begin
        check("rx_bit_valid", int'(rx_bit_valid), 1);
        check("rx_bit", int'(rx_bit), e_bit[i]);
      end else begin
        check("no decision", int'(rx_bit_valid), 0);
      end
      // the hop code applied to registered sample i is the transmitter's
      if (s_code[i] >= 0) check("hop_code", int'(hop_code), s_code[i]);
      // BPSK side path: bit of sample i-1 visible now
      if (i >= 1) check("bpsk_bit", int'(bpsk_bit), bp_exp[i - 1]);
    end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (freq_used[i] == 0) begin failures++; $display("FAIL hop frequency F%0d never used", i + 1); end
    end
    checks++;
    if (fh_ones == 0 || fh_zeros == 0 || fhss_only_bits == 0 || restarts == 0 ||
        bp_ones == 0 || bp_zeros == 0 || bp_reversals == 0) begin
      failures++;
      $display("FAIL mechanism not exercised");
    end
    $display("hops per frequency: F1=%0d F2=%0d F3=%0d F4=%0d F5=%0d", freq_used[0],
             freq_used[1], freq_used[2], freq_used[3], freq_used[4]);
    $display("FH/BPSK bits: %0d ones, %0d zeros; FHSS-only bits: %0d; restarts: %0d",
             fh_ones, fh_zeros, fhss_only_bits, restarts);
    $display("BPSK path: %0d ones, %0d zeros, %0d reversals", bp_ones, bp_zeros, bp_reversals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
