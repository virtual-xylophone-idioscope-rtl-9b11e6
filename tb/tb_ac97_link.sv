// Self-checking testbench for ac97_link, against a behavioural codec.
//
// Checks the codec reset pulse, that the six initialisation register writes
// arrive in order and once each, that every playback sample pair captured
// at frame_start reaches the codec in slots 3/4 of the next frame, that each
// microphone sample the codec sends comes out on rec_left with rec_valid,
// that SYNC is 16 bit clocks long and frames are 256 bit clocks apart, and
// that frame_start comes once per frame.
module tb_ac97_link;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               ac97_bit_clk, ac97_sdata_in, ac97_sync, ac97_sdata_out, ac97_reset_n;
  logic signed [15:0] play_left = 0, play_right = 0, rec_left;
  logic               rec_valid, frame_start, codec_ready, init_done;
  logic signed [15:0] mic_sample = 16'sh1234;

  int                 frames_rx, cmd_count, protocol_errors;
  logic signed [15:0] rx_left, rx_right, tx_mic;
  logic [22:0]        cmd_log [16];

  ac97_link dut (.*);

  ac97_codec_model codec (
    .reset_n(ac97_reset_n), .sync(ac97_sync), .sdata_out(ac97_sdata_out),
    .mic_sample, .bit_clk(ac97_bit_clk), .sdata_in(ac97_sdata_in),
    .frames_rx, .rx_left, .rx_right, .cmd_count, .cmd_log, .tx_mic, .protocol_errors
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [22:0] exp_cmd [6] = '{
    {7'h02, 16'h0000}, {7'h04, 16'h0000}, {7'h0E, 16'h0048},
    {7'h18, 16'h0808}, {7'h1A, 16'h0000}, {7'h1C, 16'h0000}};

  // playback samples in the order the link captured them
  logic signed [31:0] sent [$];
  int starts = 0, recs = 0, last_start = 0, cyc = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) begin
    if (frame_start) begin
      if (starts > 1) check(cyc - last_start > 1900 && cyc - last_start < 2300,
                            $sformatf("frame_start spacing %0d clocks", cyc - last_start));
      last_start = cyc;
      starts++;
      if (codec_ready) sent.push_back({play_left, play_right});
      play_left  = 16'($urandom);
      play_right = 16'($urandom);
    end
    if (rec_valid) begin
      recs++;
      check(rec_left == tx_mic, $sformatf("rec_left %h, codec sent %h", rec_left, tx_mic));
      mic_sample = 16'($urandom);
    end
  end

  // each frame the codec decodes must carry the oldest captured pair
  always @(frames_rx) begin
    if (frames_rx > 0 && sent.size() > 0) begin
      logic signed [31:0] e;
      e = sent.pop_front();
      check({rx_left, rx_right} == e,
            $sformatf("codec got %h/%h, expected %h", rx_left, rx_right, e));
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!ac97_reset_n, "codec held in reset");
    wait (ac97_reset_n);
    repeat (20) @(posedge frame_start);
    check(init_done && codec_ready, "initialisation finished");
    check(cmd_count == 6, $sformatf("%0d register writes, expected 6", cmd_count));
    for (int i = 0; i < 6; i++)
      check(cmd_log[i] == exp_cmd[i], $sformatf("write %0d: %h, expected %h", i, cmd_log[i], exp_cmd[i]));
    check(protocol_errors == 0, $sformatf("%0d protocol errors", protocol_errors));
    check(recs >= 18, $sformatf("%0d microphone samples", recs));
    check(frames_rx >= 16, $sformatf("%0d valid frames", frames_rx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
