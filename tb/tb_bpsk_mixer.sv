// tb_bpsk_mixer: random de-spread samples and carrier values, including the
// extremes; checks the registered signed product and frame marker one cycle
// later.
module tb_bpsk_mixer;
  import fh_pkg::*;

  logic clk = 0, rst_n = 0, first_in = 0, first_out;
  desp_t despread = '0;
  sample_t carrier = '0;
  demod_t demod;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bpsk_mixer dut (.clk, .rst_n, .despread, .carrier, .first_in, .demod, .first_out);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_prod;
    logic exp_first;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      case (i)
        0: begin despread = 24'sh800000; carrier = 8'sh80; end
        1: begin despread = 24'sh7fffff; carrier = 8'sh80; end
        2: begin despread = 24'sh800000; carrier = 8'sh7f; end
        default: begin despread = 24'($urandom); carrier = 8'($urandom); end
      endcase
      first_in = ($urandom % 8) == 0;
      exp_prod = longint'(despread) * longint'(carrier);
      exp_first = first_in;
      @(negedge clk);
      checks += 2;
      if (longint'(demod) != exp_prod) begin
        failures++; $display("FAIL %0d expected %0d", demod, exp_prod);
      end
      if (first_out != exp_first) begin failures++; $display("FAIL first"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
