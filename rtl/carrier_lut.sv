// carrier_lut: cosine look-up table, one carrier period.
//
// Entry k holds round(AMP * cos(2*pi*k/DEPTH)) as a W-bit two's complement
// value (AMP = 64, DEPTH = 180, W = 8). The entries are constants computed at
// elaboration by cos_entry(): the angle is folded into the first quadrant and
// its cosine evaluated as a Taylor series to x^16 in 64-bit fixed point with
// 30 fraction bits, then scaled and rounded; for the default sizes this gives
// exactly the rounded real-valued cosine. The read is combinational: `sample`
// follows `phase` in the same cycle, so the phase register in front of it (in
// carrier_nco) sets the timing. A phase at or above DEPTH reads as zero.
//
// Storing one carrier period as N sampled values of M bits follows the
// original design (N = 180, M = 8); the amplitude of 64 is this design's
// choice, matching the peak code 0x40 of the original simulation traces.
module carrier_lut
  import fh_pkg::*;
#(
  parameter int unsigned DEPTH = N_SAMPLES,
  parameter int unsigned W     = SAMPLE_W,
  parameter int unsigned AMP   = 64
) (
  input  logic [PHASE_W-1:0]  phase,
  output logic signed [W-1:0] sample
);

  localparam longint ONE    = 64'sd1 << 30;   // 1.0 in Q30
  localparam longint PI_Q30 = 64'sd3373259426; // round(pi * 2^30)

  // round(AMP * cos(2*pi*k/DEPTH)) for 0 <= k < DEPTH; DEPTH a multiple of 4.
  function automatic longint cos_entry(longint k);
    longint quarter, kq, x, x2, term, sum, mag;
    bit     neg;
    quarter = longint'(DEPTH) / 4;
    if (k <= quarter)          begin neg = 1'b0; kq = k;                    end
    else if (k <= 2 * quarter) begin neg = 1'b1; kq = 2 * quarter - k;      end
    else if (k <= 3 * quarter) begin neg = 1'b1; kq = k - 2 * quarter;      end
    else                       begin neg = 1'b0; kq = longint'(DEPTH) - k; end
    x    = (kq * 2 * PI_Q30) / longint'(DEPTH);  // angle in radians, Q30
    x2   = (x * x) >>> 30;
    term = ONE;
    sum  = ONE;
    for (longint n = 1; n <= 8; n++) begin
      term = ((term * x2) >>> 30) / ((2 * n - 1) * (2 * n));
      if (n % 2 == 1) sum = sum - term;
      else            sum = sum + term;
    end
    mag = (sum * longint'(AMP) + (ONE >>> 1)) >>> 30;
    return neg ? -mag : mag;
  endfunction

  logic signed [W-1:0] rom [DEPTH];

  for (genvar k = 0; k < DEPTH; k++) begin : g_rom
    assign rom[k] = W'(cos_entry(k));
  end

  always_comb begin
    if (phase < PHASE_W'(DEPTH)) sample = rom[phase];
    else                         sample = '0;
  end

  initial assert (DEPTH % 4 == 0) else $error("carrier_lut: DEPTH must be a multiple of 4");

endmodule
