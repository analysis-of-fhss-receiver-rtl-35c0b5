// tb_reference_runs: the three reference runs of the receiver, noise-free, at
// the default parameters, all with the data pattern 1 1 1 1 0 0 1 0 0 1 1
// (one bit per 180-sample carrier period):
//   1. plain BPSK through the comparison demodulator: the bit follows each
//      sample two clocks later, so the output switches 1->0 when sample 720
//      (the first sample of bit 4) has passed, and so on;
//   2. FHSS only (signal b * s(n), hopping over F1..F5);
//   3. FH/BPSK (signal b * c(n) * s(n)).
// For runs 2 and 3 the integrate-and-dump detector reports bit k one bit
// period late, in cycle t0 + 183 + 180*k, so the recovered sequence is the
// data delayed by one bit. Expected values come from a real-valued cosine
// model and an independent model of the spread code.
module tb_reference_runs;
  import fh_pkg::*;

  localparam int STEPS [5] = '{1, 5, 10, 15, 20};
  localparam int NBITS = 11;
  localparam int PATTERN [NBITS] = '{1, 1, 1, 1, 0, 0, 1, 0, 0, 1, 1};

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

  task automatic run_bpsk();
    for (int n = 0; n <= NBITS * 180; n++) begin
      int c, b;
      c = cosq(n, 1);
      b = PATTERN[(n < NBITS * 180) ? n / 180 : NBITS - 1];
      bpsk_sample = 8'((b != 0) ? c : -c);
      bpsk_start  = (n == 0);
      bpsk_valid  = 1;
      @(negedge clk);
      if (n >= 1) check("bpsk_bit", int'(bpsk_bit), PATTERN[(n - 1) / 180]);
    end
    bpsk_valid = 0;
  endtask

  task automatic run_fh(bit fhss);
    logic [6:0] m;
    int got [$];
    m = 7'h5b;
    for (int n = 0; n < NBITS * 180 + 8; n++) begin
      int c, s, b;
      if (n % 180 == 0 && n > 0) m = {m[5:0], m[6] ^ m[5]};
      c = cosq(n, 1);
      s = cosq(n, STEPS[int'(m) % 5]);
      b = (n < NBITS * 180) ? ((PATTERN[n / 180] != 0) ? 1 : -1) : 0;
      rx_sample = 16'(fhss ? b * s : b * c * s);
      rx_valid  = (n < NBITS * 180);
      rx_start  = (n == 0);
      fhss_only = fhss;
      @(negedge clk);
      if (n >= 182 && (n - 182) % 180 == 0 && (n - 182) / 180 < NBITS) begin
        check("decision impulse", int'(rx_bit_valid), 1);
        check("recovered bit", int'(rx_bit), PATTERN[(n - 182) / 180]);
        got.push_back(int'(rx_bit));
      end else begin
        check("no decision", int'(rx_bit_valid), 0);
      end
    end
    rx_valid = 0;
    rx_start = 0;
    check("bits recovered", got.size(), NBITS);
    $write("%s recovered:", fhss ? "FHSS-only" : "FH/BPSK  ");
    foreach (got[i]) $write(" %0d", got[i]);
    $write("\n");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (5) @(negedge clk);
    run_bpsk();
    run_fh(1);
    repeat (50) @(negedge clk);
    run_fh(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
