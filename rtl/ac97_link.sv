// AC97 link controller: exchanges audio frames with the AC97 codec.
//
// The codec supplies the 12.288 MHz BIT_CLK. Every 256 bit clocks (48 kHz)
// the controller sends a frame on SDATA_OUT, marked by SYNC, and receives
// one on SDATA_IN. A frame is a 16-bit tag (slot 0) followed by twelve 20-bit
// slots, most significant bit first:
//   out: slot 1/2 register command address/data, slot 3/4 left/right
//        playback sample (16 bits, left-aligned in the slot);
//   in:  tag bit 15 = codec ready, tag bit 12 = slot 3 valid,
//        slot 3 = left record sample (the microphone).
// After reset the controller pulses ac97_reset_n low, waits for codec ready,
// and then sends one register write per frame from INIT_TABLE (volumes
// unmuted, record source = microphone), after which slots 1/2 stay empty.
//
// The original system used a downloaded AC97 controller of which only the
// role is known; this one is written from the AC'97 link protocol. The
// register values assume a National LM4550 style codec as on the XUP-V2P
// board, and RESET_CYCLES is this design's choice.
//
// Clocking: everything runs on clk, which must be at least about 8x BIT_CLK
// (100 MHz is assumed). BIT_CLK is synchronised and its edges detected:
// SYNC and SDATA_OUT change a few clk cycles after a BIT_CLK rising edge and
// SDATA_IN is sampled at a BIT_CLK falling edge, as the protocol requires.
// frame_start pulses once per frame, when play_left/right are captured;
// rec_valid pulses once per frame with a new rec_left.
// Synchronous active-low reset.
module ac97_link #(
  parameter int unsigned RESET_CYCLES = 128
) (
  input  logic               clk,
  input  logic               rst_n,
  // codec pins
  input  logic               ac97_bit_clk,
  input  logic               ac97_sdata_in,
  output logic               ac97_sync,
  output logic               ac97_sdata_out,
  output logic               ac97_reset_n,
  // sample interface
  input  logic signed [15:0] play_left,
  input  logic signed [15:0] play_right,
  output logic signed [15:0] rec_left,
  output logic               rec_valid,
  output logic               frame_start,
  output logic               codec_ready,
  output logic               init_done
);

  localparam int unsigned N_INIT = 6;
  // {register index, value}
  localparam logic [22:0] INIT_TABLE [N_INIT] = '{
    {7'h02, 16'h0000},   // master volume: 0 dB, unmuted
    {7'h04, 16'h0000},   // headphone volume: 0 dB, unmuted
    {7'h0E, 16'h0048},   // microphone volume: 0 dB, +20 dB boost
    {7'h18, 16'h0808},   // PCM out volume: 0 dB
    {7'h1A, 16'h0000},   // record select: microphone, both channels
    {7'h1C, 16'h0000}    // record gain: 0 dB
  };

  // ---------------- codec reset ----------------
  logic [$clog2(RESET_CYCLES+1)-1:0] rst_cnt;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rst_cnt      <= '0;
      ac97_reset_n <= 1'b0;
    end else if (32'(rst_cnt) != RESET_CYCLES) begin
      rst_cnt      <= rst_cnt + 1'b1;
      ac97_reset_n <= 1'b0;
    end else begin
      ac97_reset_n <= 1'b1;
    end
  end

  // ---------------- BIT_CLK edge detection ----------------
  logic [2:0] bclk_s;
  logic [1:0] sdin_s;
  logic       bclk_rise, bclk_fall;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bclk_s <= '0;
      sdin_s <= '0;
    end else begin
      bclk_s <= {bclk_s[1:0], ac97_bit_clk};
      sdin_s <= {sdin_s[0], ac97_sdata_in};
    end
  end
  assign bclk_rise = bclk_s[1] && !bclk_s[2];
  assign bclk_fall = !bclk_s[1] && bclk_s[2];

  // ---------------- transmit ----------------
  logic [7:0]                 pos;        // bit position in the frame, 0 = tag MSB
  logic [7:0]                 next_pos;
  logic [255:0]               out_frame;
  logic [$clog2(N_INIT+1)-1:0] cmd_idx;
  logic                       cmd_valid;

  assign next_pos  = pos + 8'd1;
  assign cmd_valid = codec_ready && (32'(cmd_idx) < N_INIT);
  assign init_done = (32'(cmd_idx) == N_INIT);

  function automatic logic [255:0] build_frame(logic cv, logic [22:0] cmd,
                                               logic [15:0] l, logic [15:0] r,
                                               logic ready);
    logic [15:0] tag;
    tag = {ready, cv, cv, ready, ready, 11'd0};
    return {tag,
            cv ? {1'b0, cmd[22:16], 12'd0} : 20'd0,
            cv ? {cmd[15:0], 4'd0}         : 20'd0,
            {l, 4'd0},
            {r, 4'd0},
            160'd0};
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n || !ac97_reset_n) begin
      pos            <= 8'd254;
      out_frame      <= '0;
      cmd_idx        <= '0;
      ac97_sync      <= 1'b0;
      ac97_sdata_out <= 1'b0;
      frame_start    <= 1'b0;
    end else begin
      frame_start <= 1'b0;
      if (bclk_rise) begin
        pos       <= next_pos;
        ac97_sync <= (next_pos == 8'd255) || (next_pos < 8'd15);
        if (next_pos == 8'd255) begin
          out_frame      <= build_frame(cmd_valid, INIT_TABLE[32'(cmd_idx) < N_INIT ? cmd_idx : '0],
                                        play_left, play_right, codec_ready);
          if (cmd_valid) cmd_idx <= cmd_idx + 1'b1;
          frame_start    <= 1'b1;
          ac97_sdata_out <= 1'b0;
        end else begin
          ac97_sdata_out <= out_frame[8'd255 - next_pos];
        end
      end
    end
  end

  // ---------------- receive ----------------
  logic        slot3_valid;
  logic [14:0] rec_sr;
  always_ff @(posedge clk) begin
    if (!rst_n || !ac97_reset_n) begin
      codec_ready <= 1'b0;
      slot3_valid <= 1'b0;
      rec_sr      <= '0;
      rec_left    <= '0;
      rec_valid   <= 1'b0;
    end else begin
      rec_valid <= 1'b0;
      if (bclk_fall) begin
        if (pos == 8'd0) codec_ready <= sdin_s[1];
        if (pos == 8'd3) slot3_valid <= sdin_s[1];
        if (pos >= 8'd56 && pos <= 8'd71) rec_sr <= {rec_sr[13:0], sdin_s[1]};
        if (pos == 8'd71 && slot3_valid) begin
          rec_left  <= {rec_sr[14:0], sdin_s[1]};
          rec_valid <= 1'b1;
        end
      end
    end
  end

endmodule
