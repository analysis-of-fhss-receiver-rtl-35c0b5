// bpsk_mixer: coherent BPSK demodulation by multiplication.
//
// The de-spread signal is multiplied by the local carrier (24 x 8 -> 32 bits,
// signed, exact). With the carrier in phase with the received one, the product
// carries the data bit as the sign of its average over a bit period.
//
// Timing: `demod` and `first_out` are registered, one cycle after `despread`,
// `carrier` and `first_in`. The multiplier follows the original design; the
// output register is this design's choice.
module bpsk_mixer
  import fh_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  desp_t   despread,
  input  sample_t carrier,
  input  logic    first_in,
  output demod_t  demod,
  output logic    first_out
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      demod     <= '0;
      first_out <= 1'b0;
    end else begin
      demod     <= DEMOD_W'(despread) * DEMOD_W'(carrier);
      first_out <= first_in;
    end
  end

endmodule
