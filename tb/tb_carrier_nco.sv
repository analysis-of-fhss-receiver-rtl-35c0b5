// tb_carrier_nco: runs the oscillator at steps 1 (0.556 MHz carrier) and 20
// (11.1 MHz) and compares phase and sample every clock with a real-valued
// cosine model; checks that `clear` restarts both at phase 0 and that the
// periods are 180 and 9 clocks.
module tb_carrier_nco;
  import fh_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0;
  phase_t  ph1, ph20;
  sample_t s1, s20;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  carrier_nco #(.STEP(1))  dut1  (.clk, .rst_n, .clear, .phase(ph1),  .sample(s1));
  carrier_nco #(.STEP(20)) dut20 (.clk, .rst_n, .clear, .phase(ph20), .sample(s20));

  function automatic int cosq(int n, int step);
    return int'(64.0 * $cos(2.0 * 3.14159265358979 * ((n * step) % 180) / 180.0));
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, last_peak1, last_peak20, period1, period20;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // free run from reset: n counts clocks since phase 0
    n = 0; last_peak1 = -1; last_peak20 = -1; period1 = 0; period20 = 0;
    repeat (400) begin
      check("ph1",  int'(ph1),  n % 180);
      check("ph20", int'(ph20), (n * 20) % 180);
      check("s1",   int'(s1),   cosq(n, 1));
      check("s20",  int'(s20),  cosq(n, 20));
      if (ph1 == 0)  begin if (last_peak1  >= 0) period1  = n - last_peak1;  last_peak1  = n; end
      if (ph20 == 0) begin if (last_peak20 >= 0) period20 = n - last_peak20; last_peak20 = n; end
      @(negedge clk); n++;
    end
    check("period step 1",  period1, 180);
    check("period step 20", period20, 9);
    // clear in the middle of a period
    repeat (37) @(negedge clk);
    clear = 1;
    @(negedge clk) clear = 0;
    n = 0;
    repeat (200) begin
      check("ph1 after clear", int'(ph1), n % 180);
      check("s20 after clear", int'(s20), cosq(n, 20));
      @(negedge clk); n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
