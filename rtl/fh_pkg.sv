// fh_pkg: constants and sample types shared by the FH/BPSK receiver.
//
// All carriers in the receiver are read from one cosine table that holds a
// single period as N_SAMPLES = 180 signed SAMPLE_W = 8 bit values (peak 64).
// With the 100 MHz master clock a table step of 1 sample per clock gives the
// 0.556 MHz BPSK carrier, a step of 20 gives 11.1 MHz, the highest hop
// frequency. The receiver hops among NUM_FREQ = 5 frequencies. The 180-sample
// table, the 8-bit samples, the 0.55 MHz carrier, the 0.55..11.1 MHz hop range
// and the five hop frequencies follow the original receiver description; the
// three inner hop steps (5, 10, 15), the peak value of 64 and the hop and bit
// periods of 180 samples are this design's choices.
//
// The widths of the pipeline signals grow by the width of each multiplier
// operand: received 16 bits, de-spread 24 bits, mixed 32 bits.
package fh_pkg;

  localparam int unsigned N_SAMPLES = 180;  // samples per carrier period
  localparam int unsigned SAMPLE_W  = 8;    // bits per carrier sample
  localparam int unsigned PHASE_W   = 8;    // enough for 0..N_SAMPLES-1
  localparam int unsigned NUM_FREQ  = 5;    // hop frequencies F1..F5
  localparam int unsigned CODE_W    = 3;    // enough for 0..NUM_FREQ-1
  localparam int unsigned RX_W      = 16;   // received FH/BPSK sample
  localparam int unsigned DESP_W    = RX_W + SAMPLE_W;    // 24
  localparam int unsigned DEMOD_W   = DESP_W + SAMPLE_W;  // 32
  localparam int unsigned BIT_LEN   = 180;  // samples per data bit
  localparam int unsigned HOP_LEN   = 180;  // samples per frequency hop
  localparam logic signed [SAMPLE_W-1:0] PEAK = 8'sd64;  // carrier amplitude

  // Table steps per clock of F1..F5: f = 100 MHz * step / 180.
  localparam int unsigned HOP_STEP [NUM_FREQ] = '{1, 5, 10, 15, 20};

  typedef logic [PHASE_W-1:0]         phase_t;
  typedef logic [CODE_W-1:0]          code_t;
  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [RX_W-1:0]     rx_t;
  typedef logic signed [DESP_W-1:0]   desp_t;
  typedef logic signed [DEMOD_W-1:0]  demod_t;

endpackage
