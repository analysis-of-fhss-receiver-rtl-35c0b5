// spread_code_gen: pseudo-random spread code that picks the hop frequency.
//
// A 7-bit Fibonacci LFSR (x^7 + x^6 + 1, period 127) advances once per hop of
// HOP_LEN samples. The hop code is the LFSR state modulo NUM_FREQ, a value
// 0..4 that selects F1..F5. A hop counter counts the samples of the current
// hop; `hop_start` is high on the first sample of every hop.
//
// Timing: `clear` (synchronous) loads SEED and zeroes the hop counter, so the
// cycle after `clear` is sample 0 of hop 0 and shows its code. The code then
// holds for HOP_LEN cycles. Transmitter and receiver must use the same SEED.
// That a pseudo-random code selects the hop frequency follows the original
// design; the LFSR, its polynomial, the seed, the modulo mapping and the hop
// length of one bit period are this design's choices.
module spread_code_gen
  import fh_pkg::*;
#(
  parameter int unsigned  HOP_CYCLES = HOP_LEN,
  parameter logic [6:0]   SEED       = 7'h5b
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  output code_t code,
  output logic  hop_start,
  output logic [6:0] lfsr
);

  logic [$clog2(HOP_CYCLES+1)-1:0] cnt;
  logic last;

  assign last = (cnt == $bits(cnt)'(HOP_CYCLES - 1));

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      lfsr <= SEED;
      cnt  <= '0;
    end else if (last) begin
      lfsr <= {lfsr[5:0], lfsr[6] ^ lfsr[5]};
      cnt  <= '0;
    end else begin
      cnt  <= cnt + 1'b1;
    end
  end

  assign code      = CODE_W'(lfsr % 7'(NUM_FREQ));
  assign hop_start = (cnt == '0);

  initial assert (SEED != '0) else $error("spread_code_gen: SEED must be non-zero");

endmodule
