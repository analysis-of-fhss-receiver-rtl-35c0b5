// fhss_despreader: FHSS de-spreading, multiplexer plus multiplier.
//
// The spread code drives a NUM_FREQ-to-1 multiplexer over the synthesizer
// outputs F1..F5; the selected sample is the spreading signal, the same
// frequency the transmitter hopped to. The received sample is multiplied by it
// (16 x 8 -> 24 bits, signed, exact). For a received sample b*c*s, with s the
// spreading carrier, the product b*c*s^2 holds the data-carrying term b*c/2
// plus a component at twice the hop frequency that the detector's integral
// removes.
//
// Timing: the multiplexer output `spread` is combinational; the product
// `despread` and the frame marker `first_out` are registered, one cycle after
// `rx` and `first_in`. A code of NUM_FREQ or more selects F1.
// The multiplexer and multiplier follow the original design; the output
// register is this design's choice.
module fhss_despreader
  import fh_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  rx_t     rx,
  input  logic    first_in,
  input  sample_t freq [NUM_FREQ],
  input  code_t   code,
  output sample_t spread,
  output desp_t   despread,
  output logic    first_out
);

  always_comb begin
    spread = freq[0];
    for (int i = 1; i < NUM_FREQ; i++)
      if (code == CODE_W'(i)) spread = freq[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      despread  <= '0;
      first_out <= 1'b0;
    end else begin
      despread  <= DESP_W'(rx) * DESP_W'(spread);
      first_out <= first_in;
    end
  end

endmodule
