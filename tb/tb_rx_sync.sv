// tb_rx_sync: random samples, valid and start strobes; checks the one-cycle
// delay, zeroing of invalid samples and the registered start marker.
module tb_rx_sync;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] sample_in, sample;
  logic in_valid = 0, start = 0, first;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rx_sync #(.W(16)) dut (.clk, .rst_n, .sample_in, .in_valid, .start, .sample, .first);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [15:0] prev_s;
    logic prev_v, prev_st;
    sample_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks++;
    if (sample != 0 || first != 0) begin failures++; $display("FAIL reset values"); end
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      sample_in = 16'($urandom);
      in_valid  = ($urandom % 4) != 0;
      start     = ($urandom % 16) == 0;
      prev_s = sample_in; prev_v = in_valid; prev_st = start;
      @(negedge clk);
      checks += 2;
      if (sample != (prev_v ? prev_s : 16'sd0)) begin
        failures++; $display("FAIL sample %0d expected %0d", sample, prev_v ? prev_s : 16'sd0);
      end
      if (first != prev_st) begin failures++; $display("FAIL first"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
