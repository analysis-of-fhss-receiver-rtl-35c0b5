// tb_spread_code_gen: models the x^7+x^6+1 LFSR independently and checks the
// hop code (state mod 5), the hop_start marker and the hop length of 180
// clocks over many hops; checks that every one of the five codes occurs and
// that `clear` restarts the sequence.
module tb_spread_code_gen;
  import fh_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0;
  code_t code;
  logic hop_start;
  logic [6:0] lfsr;
  int checks = 0, failures = 0;
  int seen [5];

  always #5 clk = ~clk;

  spread_code_gen dut (.clk, .rst_n, .clear, .code, .hop_start, .lfsr);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] m;
    int first_codes [4];
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (10) @(negedge clk);
    for (int pass = 0; pass < 2; pass++) begin
      clear = 1;
      @(negedge clk) clear = 0;
      m = 7'h5b;
      for (int hop = 0; hop < 90; hop++) begin
        for (int s = 0; s < 180; s++) begin
          check("code", int'(code), int'(m) % 5);
          check("hop_start", int'(hop_start), (s == 0) ? 1 : 0);
          @(negedge clk);
        end
        seen[int'(m) % 5]++;
        if (hop < 4) begin
          if (pass == 0) first_codes[hop] = int'(m) % 5;
          else           check("repeat after clear", int'(m) % 5, first_codes[hop]);
        end
        m = {m[5:0], m[6] ^ m[5]};
        if (pass == 0 && hop == 50) break;
      end
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL code %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
