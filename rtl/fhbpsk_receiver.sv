// fhbpsk_receiver: frequency-hopping BPSK receiver (top level).
//
// The transmitter BPSK-modulates a 0.556 MHz carrier with the data bits (one
// bit per 180-sample carrier period) and multiplies the result by a spreading
// carrier that hops pseudo-randomly among five frequencies (0.556 to 11.1 MHz)
// every 180 samples. This receiver undoes both steps in four stages:
//   1. rx_sync            registers the received sample on the master clock;
//   2. fhss_despreader    multiplies it by the same hopped spreading signal,
//                         chosen from freq_synth's F1..F5 by spread_code_gen;
//   3. bpsk_mixer         multiplies the de-spread signal by the local
//                         carrier (carrier_nco, step 1);
//   4. threshold_detector integrates each bit period and decides the bit by
//                         the sign of the matched-filter peak.
// With `fhss_only` high at `rx_start` the local carrier is replaced, for that
// frame, by its constant peak value, so the chain becomes a plain FHSS
// de-spreader and detector for a signal that carries the data as b * s(t)
// without a BPSK carrier.
//
// Side by side, a second input carries a plain (not hopped) BPSK signal
// through bpsk_mux_demod, the comparison demodulator that decides each sample
// against cos(wt) and cos(wt + pi) of its own local carrier.
//
// Timing (100 MHz master clock): assert `rx_start` together with sample 0 of
// a frame. Local oscillators and the spread code restart at that sample, so
// transmitter and receiver must share the frame start, the spread-code seed
// and the carrier phase. Bit k is decided on `rx_bit_valid` in cycle
// t0 + 183 + 180*k, where t0 is the cycle of `rx_start`: 180 samples of
// integration plus four pipeline registers. On the BPSK input, `bpsk_start`
// marks sample 0 and `bpsk_bit` follows the phase of sample n in cycle n + 2.
// The stage structure, the multiplier chain and the widths 16/24/32 follow
// the original design; the pipeline registers, the start strobes and the
// FHSS-only switch are this design's choices.
module fhbpsk_receiver
  import fh_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // FH/BPSK receive path
  input  logic    rx_start,
  input  logic    rx_valid,
  input  rx_t     rx_sample,
  input  logic    fhss_only,
  output logic    rx_bit,
  output logic    rx_bit_valid,
  output logic signed [DEMOD_W+8:0] rx_metric,
  output code_t   hop_code,
  output logic    hop_start,
  output sample_t spread_freq,
  // plain BPSK path (comparison demodulator)
  input  logic    bpsk_start,
  input  logic    bpsk_valid,
  input  sample_t bpsk_sample,
  output logic    bpsk_bit,
  output logic    bpsk_match
);

  // ---------------- FH/BPSK path ----------------
  rx_t     rx_q;
  logic    first_q, first_d, first_m;
  sample_t freq [NUM_FREQ];
  sample_t carrier, carrier_eff;
  desp_t   despread;
  demod_t  demod;
  phase_t  carrier_phase;
  logic [6:0] lfsr;

  rx_sync #(.W(RX_W)) u_sync (
    .clk      (clk),
    .rst_n    (rst_n),
    .sample_in(rx_sample),
    .in_valid (rx_valid),
    .start    (rx_start),
    .sample   (rx_q),
    .first    (first_q)
  );

  freq_synth u_synth (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(rx_start),
    .freq (freq)
  );

  spread_code_gen u_code (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (rx_start),
    .code     (hop_code),
    .hop_start(hop_start),
    .lfsr     (lfsr)
  );

  fhss_despreader u_desp (
    .clk      (clk),
    .rst_n    (rst_n),
    .rx       (rx_q),
    .first_in (first_q),
    .freq     (freq),
    .code     (hop_code),
    .spread   (spread_freq),
    .despread (despread),
    .first_out(first_d)
  );

  // The de-spread sample is one register later than the received one, so the
  // local carrier restarts one cycle after the synthesizer.
  carrier_nco #(.STEP(1)) u_carrier (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (first_q),
    .phase (carrier_phase),
    .sample(carrier)
  );

  // The mode is taken with rx_start and follows the frame down the pipeline,
  // so back-to-back frames may use different modes.
  logic mode_s, mode_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode_s <= 1'b0;
      mode_d <= 1'b0;
    end else begin
      if (rx_start) mode_s <= fhss_only;
      mode_d <= mode_s;
    end
  end

  assign carrier_eff = mode_d ? PEAK : carrier;

  bpsk_mixer u_mix (
    .clk      (clk),
    .rst_n    (rst_n),
    .despread (despread),
    .carrier  (carrier_eff),
    .first_in (first_d),
    .demod    (demod),
    .first_out(first_m)
  );

  threshold_detector u_det (
    .clk      (clk),
    .rst_n    (rst_n),
    .din      (demod),
    .first    (first_m),
    .bit_out  (rx_bit),
    .bit_valid(rx_bit_valid),
    .metric   (rx_metric)
  );

  // ---------------- plain BPSK path ----------------
  sample_t bpsk_q, bpsk_carrier, bpsk_carrier_inv;
  logic    bpsk_first;
  phase_t  bpsk_phase;

  rx_sync #(.W(SAMPLE_W)) u_bsync (
    .clk      (clk),
    .rst_n    (rst_n),
    .sample_in(bpsk_sample),
    .in_valid (bpsk_valid),
    .start    (bpsk_start),
    .sample   (bpsk_q),
    .first    (bpsk_first)
  );

  carrier_nco #(.STEP(1)) u_bcarrier (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (bpsk_start),
    .phase (bpsk_phase),
    .sample(bpsk_carrier)
  );

  bpsk_mux_demod u_bdemod (
    .clk        (clk),
    .rst_n      (rst_n),
    .bpsk       (bpsk_q),
    .carrier    (bpsk_carrier),
    .carrier_inv(bpsk_carrier_inv),
    .data       (bpsk_bit),
    .match      (bpsk_match)
  );

endmodule
