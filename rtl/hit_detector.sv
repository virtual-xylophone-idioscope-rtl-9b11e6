// Hit detector: turns the sound of the baton striking the playing surface
// into an interrupt request.
//
// Each microphone sample (one per AC97 frame, marked by sample_valid) is
// reduced to its magnitude, scaled down by MAG_SHIFT bits, and compared with
// THRESHOLD. The first sample above the threshold after one at or below it
// raises irq for one clock, provided irq_enable is 1; a sound that stays
// loud gives a single request. The threshold value 0x4 follows the original
// design; the scaling of the sample before the comparison is this design's
// choice (with MAG_SHIFT = 8 a sample must exceed about 4% of full scale).
//
// Timing: irq is registered, one clock after the sample that crosses.
// Synchronous active-low reset.
module hit_detector #(
  parameter int unsigned THRESHOLD = 4,
  parameter int unsigned MAG_SHIFT = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sample_valid,
  input  logic signed [15:0] sample,
  input  logic               irq_enable,
  output logic               irq,
  output logic               loud          // last sample was above threshold
);

  logic [16:0] magnitude;
  logic        above;

  always_comb begin
    magnitude = sample[15] ? 17'(-32'(sample)) : 17'(sample);
    above     = 32'(magnitude >> MAG_SHIFT) > THRESHOLD;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      loud <= 1'b0;
      irq  <= 1'b0;
    end else begin
      irq <= 1'b0;
      if (sample_valid) begin
        loud <= above;
        irq  <= above && !loud && irq_enable;
      end
    end
  end

endmodule
