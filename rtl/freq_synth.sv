// freq_synth: frequency synthesizer for the hop frequencies F1..F5.
//
// One carrier_nco per hop frequency runs continuously; F(i) advances
// HOP_STEP[i] table entries per clock (1, 5, 10, 15 and 20, i.e. 0.556, 2.78,
// 5.56, 8.33 and 11.1 MHz at a 100 MHz clock). All five are cleared together
// by `clear`, so they share phase 0 at the first sample of a frame and again
// every 180 clocks. The output is the array of the five current samples; the
// multiplexer in fhss_despreader picks one of them.
//
// The five parallel frequencies and the 0.55..11.1 MHz range follow the
// original design; the three inner frequencies are this design's choice.
module freq_synth
  import fh_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  output sample_t freq [NUM_FREQ]
);

  for (genvar i = 0; i < NUM_FREQ; i++) begin : g_nco
    phase_t phase_unused;
    carrier_nco #(.STEP(HOP_STEP[i])) u_nco (
      .clk   (clk),
      .rst_n (rst_n),
      .clear (clear),
      .phase (phase_unused),
      .sample(freq[i])
    );
  end

endmodule
