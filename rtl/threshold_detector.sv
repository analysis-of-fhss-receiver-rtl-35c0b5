// threshold_detector: matched filter and threshold decision for each bit.
//
// Integrate-and-dump: the demodulated samples of one bit period (BIT_CYCLES
// samples) are summed; on the last sample of the bit the sum is compared with
// THRESHOLD (0), the bit is decided as 1 when the sum is above it and 0
// otherwise, and a one-cycle impulse `bit_valid` marks the decision. The sum
// at that instant is the matched-filter peak, brought out as `metric`. The
// accumulator then restarts for the next bit. ACC_W leaves room for
// BIT_CYCLES full-scale inputs.
//
// Timing: `first` marks the first sample of a frame and (re)starts bit
// counting; samples before the first `first` after reset are ignored. The
// decision for the bit whose last sample arrives in cycle t is visible in
// cycle t+1, together with `bit_valid`, and holds until the next decision.
// A threshold decision at the matched-filter peak follows the original
// design; integrate-and-dump as the matched filter and the zero threshold are
// this design's choices.
module threshold_detector
  import fh_pkg::*;
#(
  parameter int unsigned BIT_CYCLES = BIT_LEN,
  parameter int unsigned IN_W       = DEMOD_W,
  parameter int unsigned ACC_W      = IN_W + $clog2(BIT_CYCLES) + 1,
  parameter longint      THRESHOLD  = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  din,
  input  logic                    first,
  output logic                    bit_out,
  output logic                    bit_valid,
  output logic signed [ACC_W-1:0] metric
);

  localparam int unsigned CNT_W = $clog2(BIT_CYCLES + 1);

  logic                    running;
  logic [CNT_W-1:0]        cnt;
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] total;

  assign total = acc + ACC_W'(din);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running   <= 1'b0;
      cnt       <= '0;
      acc       <= '0;
      bit_out   <= 1'b0;
      bit_valid <= 1'b0;
      metric    <= '0;
    end else begin
      bit_valid <= 1'b0;
      if (first) begin
        running <= 1'b1;
        acc     <= ACC_W'(din);
        cnt     <= CNT_W'(1);
      end else if (running) begin
        if (cnt == CNT_W'(BIT_CYCLES - 1)) begin
          bit_out   <= (total > ACC_W'(THRESHOLD));
          bit_valid <= 1'b1;
          metric    <= total;
          acc       <= '0;
          cnt       <= '0;
        end else begin
          acc <= total;
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  initial assert (BIT_CYCLES > 1) else $error("threshold_detector: BIT_CYCLES must exceed 1");

endmodule
