// Behavioural model of an AC97 codec, the audio chip of the board, for
// testbenches only (not synthesizable).
//
// Drives BIT_CLK (period 82 time units, about 8 clocks of a 10-unit system
// clock) while reset_n is high. It finds frames by the rising edge of SYNC
// seen on a falling BIT_CLK edge, samples SDATA_OUT on falling edges and
// drives SDATA_IN on rising edges. Each received frame is decoded: register
// writes in slots 1/2 are logged, slot 3/4 samples are published, and the
// SYNC pulse length and frame period are checked from the second frame on
// (the first may start before the controller leaves reset). Each transmitted frame
// carries codec ready, slot 3 valid and the current mic_sample in slot 3.
module ac97_codec_model (
  input  logic               reset_n,
  input  logic               sync,
  input  logic               sdata_out,
  input  logic signed [15:0] mic_sample,
  output logic               bit_clk,
  output logic               sdata_in,
  // what the model received
  output int                 frames_rx,      // frames with the valid-frame tag bit
  output logic signed [15:0] rx_left,
  output logic signed [15:0] rx_right,
  output int                 cmd_count,
  output logic [22:0]        cmd_log [16],   // {register, value} of each write
  output logic signed [15:0] tx_mic,         // mic sample of the current frame
  output int                 protocol_errors
);

  logic [255:0] out_frame, in_frame;
  int           cpos = -1, sync_len = 0, period = 0, n_sync = 0;
  logic         prev_sync = 0;

  initial begin
    bit_clk = 0; sdata_in = 0; frames_rx = 0; cmd_count = 0; protocol_errors = 0;
    rx_left = 0; rx_right = 0; tx_mic = 0; out_frame = '0; in_frame = '0;
    foreach (cmd_log[i]) cmd_log[i] = '0;
  end

  always begin
    #41;
    if (reset_n) bit_clk = !bit_clk;
    else bit_clk = 0;
  end

  always @(negedge bit_clk) begin
    if (cpos >= 0 && cpos < 256) out_frame[255 - cpos] = sdata_out;
    period++;
    if (sync) sync_len++;
    if (!sync && prev_sync) begin
      if (n_sync >= 2 && sync_len != 16) protocol_errors++;
      sync_len = 0;
    end
    if (sync && !prev_sync) begin
      if (cpos >= 0) begin
        if (n_sync >= 2 && period != 256) protocol_errors++;
        if (out_frame[255]) begin
          if (out_frame[254] && out_frame[253]) begin
            if (out_frame[239]) protocol_errors++;     // only writes are expected
            if (cmd_count < 16) cmd_log[cmd_count] = {out_frame[238:232], out_frame[219:204]};
            cmd_count++;
          end
          if (out_frame[252]) rx_left  = out_frame[199:184];
          if (out_frame[251]) rx_right = out_frame[179:164];
          frames_rx++;
        end
      end
      n_sync++;
      period  = 0;
      cpos    = 0;
      tx_mic  = mic_sample;
      in_frame = {1'b1, 2'b00, 1'b1, 12'd0, 40'd0, mic_sample, 4'd0, 180'd0};
    end else if (cpos >= 0) begin
      cpos++;
    end
    prev_sync = sync;
  end

  always @(posedge bit_clk) begin
    sdata_in <= (cpos >= 0 && cpos < 256) ? in_frame[255 - cpos] : 1'b0;
  end

endmodule
