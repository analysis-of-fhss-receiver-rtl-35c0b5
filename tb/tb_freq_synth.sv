// tb_freq_synth: compares all five synthesizer outputs every clock with
// round(64*cos(2*pi*step*n/180)) for steps 1, 5, 10, 15 and 20, across two
// clears, and checks each output's period (180, 36, 18, 12 and 9 clocks).
module tb_freq_synth;
  import fh_pkg::*;

  localparam int STEPS [5] = '{1, 5, 10, 15, 20};
  localparam int PERIOD [5] = '{180, 36, 18, 12, 9};

  logic clk = 0, rst_n = 0, clear = 0;
  sample_t freq [NUM_FREQ];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  freq_synth dut (.clk, .rst_n, .clear, .freq(freq));

  function automatic int cosq(int n, int step);
    return int'(64.0 * $cos(2.0 * 3.14159265358979 * ((n * step) % 180) / 180.0));
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first_peak [5];
    int per [5];
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (55) @(negedge clk);
    for (int pass = 0; pass < 2; pass++) begin
      clear = 1;
      @(negedge clk) clear = 0;
      foreach (first_peak[i]) begin first_peak[i] = -1; per[i] = 0; end
      for (int n = 0; n < 400; n++) begin
        for (int i = 0; i < 5; i++) begin
          checks++;
          if (int'(freq[i]) != cosq(n, STEPS[i])) begin
            failures++;
            $display("FAIL F%0d n=%0d: got %0d expected %0d", i + 1, n, freq[i], cosq(n, STEPS[i]));
          end
          if (n > 0 && per[i] == 0 && int'(freq[i]) == 64 && ((n * STEPS[i]) % 180) == 0)
            per[i] = n;
        end
        @(negedge clk);
      end
      for (int i = 0; i < 5; i++) begin
        checks++;
        if (per[i] != PERIOD[i]) begin
          failures++;
          $display("FAIL F%0d period %0d expected %0d", i + 1, per[i], PERIOD[i]);
        end
      end
      repeat (23) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
