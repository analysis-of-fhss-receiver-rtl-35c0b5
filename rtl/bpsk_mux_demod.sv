// bpsk_mux_demod: BPSK demodulator built as a two-way comparison.
//
// The received BPSK sample is held against the two reference phases of the
// local carrier, cos(wt) (`carrier`) and cos(wt + pi) (`carrier_inv`, its
// negation). When the sample equals the in-phase reference the bit is 1, when
// it equals the inverted reference the bit is 0; this is the multiplexer view
// of BPSK, where the transmitter switched between the two phases and the
// receiver tells which one it sees. Where the two references are equal (zero
// crossings) or the sample matches neither (noise), the previous bit is held.
// The detector needs the received signal to be an exact, noise-free replica of
// one of the two phases, as in the original design's simulation.
//
// Timing: `data` and `match` are registered, one cycle after the inputs.
// `match` is high when that cycle's comparison decided the bit.
// The comparison against both phases and the 1 for the in-phase case follow
// the original design; holding the bit on no match is this design's choice.
module bpsk_mux_demod
  import fh_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t bpsk,
  input  sample_t carrier,
  output sample_t carrier_inv,
  output logic    data,
  output logic    match
);

  logic eq_pos, eq_neg;

  assign carrier_inv = -carrier;
  assign eq_pos      = (bpsk == carrier);
  assign eq_neg      = (bpsk == carrier_inv);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      data  <= 1'b0;
      match <= 1'b0;
    end else begin
      match <= eq_pos ^ eq_neg;
      if (eq_pos && !eq_neg)      data <= 1'b1;
      else if (eq_neg && !eq_pos) data <= 1'b0;
    end
  end

endmodule
