// tb_fhss_despreader: random received samples, synthesizer outputs and codes;
// checks that the multiplexer picks F[code] in the same cycle, that codes of
// 5 and above pick F1, and that the registered product equals rx * F[code]
// one cycle later, along with the frame marker.
module tb_fhss_despreader;
  import fh_pkg::*;

  logic clk = 0, rst_n = 0, first_in = 0, first_out;
  rx_t rx = '0;
  sample_t freq [NUM_FREQ];
  code_t code = '0;
  sample_t spread;
  desp_t despread;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fhss_despreader dut (.clk, .rst_n, .rx, .first_in, .freq, .code, .spread, .despread, .first_out);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_prod;
    int exp_sel;
    logic exp_first;
    foreach (freq[i]) freq[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      rx = 16'($urandom);
      foreach (freq[j]) freq[j] = 8'($urandom);
      code = 3'($urandom);
      first_in = ($urandom % 8) == 0;
      #1;
      exp_sel = (int'(code) < 5) ? int'(freq[code]) : int'(freq[0]);
      checks++;
      if (int'(spread) != exp_sel) begin
        failures++; $display("FAIL mux code %0d: %0d expected %0d", code, spread, exp_sel);
      end
      exp_prod = longint'(rx) * longint'(exp_sel);
      exp_first = first_in;
      @(negedge clk);
      checks += 2;
      if (longint'(despread) != exp_prod) begin
        failures++; $display("FAIL product %0d expected %0d", despread, exp_prod);
      end
      if (first_out != exp_first) begin failures++; $display("FAIL first"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
