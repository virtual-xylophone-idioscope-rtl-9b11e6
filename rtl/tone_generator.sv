// Tone generator: seven square-wave notes, one per playing-field region.
//
// While enable is 1 the output toggles between +AMPLITUDE and -AMPLITUDE
// every HALF_PERIOD[region] audio frames, so region 0 (letter A) gives the
// lowest note and region 6 (letter G) the highest. The sample advances once
// per sample_tick (one tick per 48 kHz AC97 frame). With enable at 0, or a
// region above 6, the output is silent (0) and the phase counter is cleared.
// Changing the region restarts the wave.
//
// Seven tones of rising pitch follow the original design; their exact
// frequencies and the amplitude are this design's choice: the half periods
// round 48000 / (2 f) for the notes A3, B3, C4, D4, E4, F4, G4
// (220, 247, 262, 294, 330, 349, 392 Hz).
//
// Timing: sample is registered and changes only on a clock with sample_tick.
// Synchronous active-low reset.
module tone_generator
  import idioscope_pkg::*;
#(
  parameter logic signed [15:0] AMPLITUDE = 16'sh2000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sample_tick,
  input  logic               enable,
  input  region_t            region,
  output logic signed [15:0] sample
);

  localparam logic [7:0] HALF_PERIOD [NUM_REGIONS] = '{
    8'd109, 8'd97, 8'd92, 8'd82, 8'd73, 8'd69, 8'd61
  };

  logic [7:0] phase;
  logic       high;
  region_t    last_region;
  logic       active, was_active;

  assign active = enable && (32'(region) < NUM_REGIONS);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase       <= '0;
      high        <= 1'b1;
      last_region <= '0;
      was_active  <= 1'b0;
      sample      <= '0;
    end else if (sample_tick) begin
      last_region <= region;
      was_active  <= active;
      if (!active || !was_active || region != last_region) begin
        phase  <= '0;
        high   <= 1'b1;
        sample <= active ? AMPLITUDE : 16'sd0;
      end else begin
        if (phase == HALF_PERIOD[region] - 8'd1) begin
          phase <= '0;
          high  <= !high;
          sample <= high ? -AMPLITUDE : AMPLITUDE;
        end else begin
          phase  <= phase + 8'd1;
          sample <= high ? AMPLITUDE : -AMPLITUDE;
        end
      end
    end
  end

endmodule
