// carrier_nco: numerically controlled oscillator over the cosine table.
//
// A phase counter advances by STEP table entries per clock, modulo the 180
// entries of one period, and addresses a carrier_lut. STEP = 1 gives the local
// BPSK carrier, 100 MHz / 180 = 0.556 MHz; STEP = 20 gives 11.1 MHz. Because
// STEP divides into a whole number of periods every 180 clocks, every NCO
// returns to phase 0 together on each multiple of 180 clocks.
//
// Timing: `clear` (synchronous, as reset) forces the phase to 0 at the next
// clock edge, so the cycle after `clear` outputs cos(0); `sample` is
// combinational from the phase register. The table oscillator follows the
// original design; the clear input used to align the local oscillator with
// the received signal is this design's choice.
module carrier_nco
  import fh_pkg::*;
#(
  parameter int unsigned STEP = 1,
  parameter int unsigned N    = N_SAMPLES
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  output phase_t  phase,
  output sample_t sample
);

  logic [PHASE_W:0] sum;
  assign sum = {1'b0, phase} + (PHASE_W+1)'(STEP);

  always_ff @(posedge clk) begin
    if (!rst_n || clear)             phase <= '0;
    else if (sum >= (PHASE_W+1)'(N)) phase <= PHASE_W'(sum - (PHASE_W+1)'(N));
    else                             phase <= sum[PHASE_W-1:0];
  end

  carrier_lut u_lut (
    .phase (phase),
    .sample(sample)
  );

  initial assert (STEP > 0 && STEP < N) else $error("carrier_nco: STEP out of range");

endmodule
