// rx_sync: input stage of the receiver.
//
// Registers the received sample and the frame-start strobe on the master
// clock, so every later stage sees inputs that change only at clock edges,
// and marks the first sample of the frame with `first`. While `in_valid` is
// low the held sample is replaced by zero, so idle inputs add nothing to the
// detector's integral.
//
// Timing: one cycle of latency; `sample` and `first` in cycle t+1 come from
// `sample_in`, `in_valid` and `start` in cycle t. The local oscillators are
// cleared by the unregistered `start`, which puts their phase 0 in the same
// cycle as the registered first sample. Receiving the signal and
// synchronising it with the clock as the first stage follows the original
// design; the strobe and the valid gating are this design's choices.
module rx_sync #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] sample_in,
  input  logic                in_valid,
  input  logic                start,
  output logic signed [W-1:0] sample,
  output logic                first
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sample <= '0;
      first  <= 1'b0;
    end else begin
      sample <= in_valid ? sample_in : '0;
      first  <= start;
    end
  end

endmodule
