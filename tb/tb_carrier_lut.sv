// tb_carrier_lut: checks every entry of the cosine table against
// round(64*cos(2*pi*k/180)) computed with real arithmetic, and that phases
// beyond the table read as zero.
module tb_carrier_lut;
  import fh_pkg::*;

  logic [PHASE_W-1:0] phase;
  logic signed [7:0]  sample;
  int checks = 0, failures = 0;

  carrier_lut dut (.phase(phase), .sample(sample));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 256; k++) begin
      int expected;
      phase = 8'(k);
      #1;
      if (k < 180) expected = int'(64.0 * $cos(2.0 * 3.14159265358979 * k / 180.0));
      else         expected = 0;
      checks++;
      if (int'(sample) != expected) begin
        failures++;
        $display("FAIL phase %0d: got %0d expected %0d", k, sample, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
