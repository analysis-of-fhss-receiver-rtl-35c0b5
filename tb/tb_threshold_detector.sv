// tb_threshold_detector: feeds frames of bits, each bit 180 random samples
// whose mean sign carries the bit (plus sums near zero), and compares the
// decision, the matched-filter peak and the impulse timing with a sum kept by
// the testbench. Also checks that nothing is decided before the first frame
// marker and that a new marker in the middle of a bit restarts the count.
module tb_threshold_detector;
  import fh_pkg::*;

  logic clk = 0, rst_n = 0, first = 0;
  demod_t din = '0;
  logic bit_out, bit_valid;
  logic signed [DEMOD_W+8:0] metric;
  int checks = 0, failures = 0;
  int ones = 0, zeros = 0;

  always #5 clk = ~clk;

  threshold_detector dut (.clk, .rst_n, .din, .first, .bit_out, .bit_valid, .metric);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Drive one frame of nbits bits; bit b is decided one clock after its last
  // sample.
  task automatic frame(int nbits);
    for (int b = 0; b < nbits; b++) begin
      longint sum = 0;
      int sgn = ($urandom % 2 != 0) ? 1 : -1;
      // bits 3 and 4 end on a sample that moves the sum across the threshold
      if (b == 3) sgn = 1;
      if (b == 4) sgn = -1;
      for (int s = 0; s < 180; s++) begin
        int unsigned r = $urandom % 30000000;
        longint v = longint'(sgn) * longint'(r) - 15000000 * longint'(sgn) / 2;
        if (b == 3 && s == 179) v = -sum;         // sum exactly zero: decided 0
        if (b == 4 && s == 179) v = -sum + 1;     // sum +1: decided 1
        din = 32'(v);
        first = (b == 0 && s == 0);
        sum += v;
        @(negedge clk);
        if (s == 179) begin
          check("bit_valid at end of bit", longint'(bit_valid), 1);
          check("bit", longint'(bit_out), longint'(sum > 0));
          check("metric", longint'(metric), sum);
          if (sum > 0) ones++; else zeros++;
        end else begin
          check("no impulse inside bit", longint'(bit_valid), 0);
        end
      end
    end
    first = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // no frame marker yet: no decisions
    repeat (400) begin
      din = 32'($urandom);
      @(negedge clk);
      check("idle before first frame", longint'(bit_valid), 0);
    end
    frame(12);
    // restart in the middle of a bit
    repeat (77) begin din = 32'($urandom); @(negedge clk); end
    frame(8);
    checks++;
    if (ones == 0 || zeros == 0) begin failures++; $display("FAIL both bit values not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
