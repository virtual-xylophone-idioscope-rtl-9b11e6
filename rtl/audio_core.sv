// Audio core: hit detection and tone generation behind software registers.
//
// Microphone samples arrive from the AC97 codec through ac97_link. The hit
// detector compares each with a threshold and raises hit_irq when the baton
// strikes; the interrupt handler in software then writes the region of the
// baton (0..6) and sets start, and the tone generator plays that region's
// note into both playback channels until software clears start again (half
// a second later, timed in software).
//
// Slave registers (word index): 0 start (bit 0, tone on), 1 region
// (bits 2:0), 2 interrupt enable (bit 0, reset value 1), 3 status (read
// only: bit 0 codec ready, bit 1 codec initialised, bit 2 microphone above
// threshold). The register map and the interrupt enable are this design's
// choice; the start/region pair mirrors the letter graphic generator.
//
// Timing: hit_irq is a one-clock pulse, at most one per 48 kHz frame.
// Synchronous active-low reset.
module audio_core
  import idioscope_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // software register bus
  input  reg_req_t    reg_req,
  input  logic [3:0]  reg_rd_addr,
  output logic [31:0] reg_rdata,
  // interrupt towards the interrupt controller
  output logic        hit_irq,
  // AC97 codec pins
  input  logic        ac97_bit_clk,
  input  logic        ac97_sdata_in,
  output logic        ac97_sync,
  output logic        ac97_sdata_out,
  output logic        ac97_reset_n
);

  logic    start;
  region_t region;
  logic    irq_en;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      start  <= 1'b0;
      region <= '0;
      irq_en <= 1'b1;
    end else if (reg_req.wr) begin
      unique case (reg_req.addr)
        4'd0:    start  <= reg_req.wdata[0];
        4'd1:    region <= reg_req.wdata[2:0];
        4'd2:    irq_en <= reg_req.wdata[0];
        default: ;
      endcase
    end
  end

  logic               codec_ready, init_done, loud;
  logic signed [15:0] rec_left, tone;
  logic               rec_valid, frame_start;

  always_comb begin
    unique case (reg_rd_addr)
      4'd0:    reg_rdata = {31'd0, start};
      4'd1:    reg_rdata = {29'd0, region};
      4'd2:    reg_rdata = {31'd0, irq_en};
      4'd3:    reg_rdata = {29'd0, loud, init_done, codec_ready};
      default: reg_rdata = '0;
    endcase
  end

  ac97_link u_link (
    .clk, .rst_n,
    .ac97_bit_clk, .ac97_sdata_in, .ac97_sync, .ac97_sdata_out, .ac97_reset_n,
    .play_left(tone), .play_right(tone),
    .rec_left, .rec_valid, .frame_start, .codec_ready, .init_done
  );

  hit_detector u_hit (
    .clk, .rst_n,
    .sample_valid(rec_valid), .sample(rec_left),
    .irq_enable(irq_en), .irq(hit_irq), .loud
  );

  tone_generator u_tone (
    .clk, .rst_n,
    .sample_tick(frame_start), .enable(start), .region,
    .sample(tone)
  );

endmodule
