// Self-checking testbench for audio_core, with a behavioural codec.
//
// Checks the status register after codec initialisation; that a loud
// microphone burst raises exactly one hit interrupt and quiet sound none;
// that with the interrupt disabled a burst raises none; that after writing a
// region and start the codec receives a square wave of the region's half
// period (in frames) on both channels; and that clearing start silences it.
module tb_audio_core;
  import idioscope_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  reg_req_t    reg_req = '0;
  logic [3:0]  reg_rd_addr = '0;
  logic [31:0] reg_rdata;
  logic        hit_irq;
  logic        ac97_bit_clk, ac97_sdata_in, ac97_sync, ac97_sdata_out, ac97_reset_n;

  logic signed [15:0] mic_sample = 0;
  int                 frames_rx, cmd_count, protocol_errors;
  logic signed [15:0] rx_left, rx_right, tx_mic;
  logic [22:0]        cmd_log [16];

  audio_core dut (.*);

  ac97_codec_model codec (
    .reset_n(ac97_reset_n), .sync(ac97_sync), .sdata_out(ac97_sdata_out),
    .mic_sample, .bit_clk(ac97_bit_clk), .sdata_in(ac97_sdata_in),
    .frames_rx, .rx_left, .rx_right, .cmd_count, .cmd_log, .tx_mic, .protocol_errors
  );

  int checks = 0, failures = 0, irqs = 0;
  always @(posedge clk) if (rst_n && hit_irq) irqs++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic reg_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk) reg_req = '{wr: 1'b1, addr: a, wdata: d};
    @(negedge clk) reg_req = '0;
  endtask

  task automatic frames(int n);
    int f0 = frames_rx;
    wait (frames_rx >= f0 + n);
  endtask

  int half [7] = '{109, 97, 92, 82, 73, 69, 61};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (ac97_reset_n);
    frames(10);
    reg_rd_addr = 4'd3; #1;
    check(reg_rdata[1:0] == 2'b11, "status: codec ready and initialised");

    // quiet room: no interrupt
    for (int i = 0; i < 20; i++) begin mic_sample = 16'(signed'($urandom_range(0, 600)) - 300); frames(1); end
    check(irqs == 0, "no interrupt for quiet sound");
    // baton strike: a few loud frames
    mic_sample = 16'sd12000; frames(2);
    mic_sample = -16'sd9000; frames(2);
    mic_sample = 16'sd100;   frames(3);
    check(irqs == 1, $sformatf("%0d interrupts for one strike, expected 1", irqs));
    // disabled
    reg_write(4'd2, 0);
    mic_sample = 16'sd15000; frames(2);
    mic_sample = 16'sd0;     frames(2);
    check(irqs == 1, "no interrupt while disabled");
    reg_write(4'd2, 1);

    // play the notes of regions 4 (E) and 6 (G)
    for (int r = 4; r <= 6; r += 2) begin
      logic signed [15:0] prev;
      int run, runs, f;
      reg_write(4'd1, r);
      reg_write(4'd0, 1);
      frames(3);
      prev = rx_left; run = 0; runs = 0; f = frames_rx;
      while (runs < 3) begin
        wait (frames_rx != f);
        f = frames_rx;
        check(rx_left == rx_right, "both channels equal");
        check(rx_left == 16'sh2000 || rx_left == -16'sh2000, "tone amplitude");
        if (rx_left == prev) run++;
        else begin
          if (runs > 0) check(run == half[r], $sformatf("region %0d: half period %0d frames, expected %0d", r, run, half[r]));
          runs++; run = 1; prev = rx_left;
        end
      end
      reg_write(4'd0, 0);
      frames(3);
      check(rx_left == 0 && rx_right == 0, "silent after start cleared");
    end
    check(protocol_errors == 0, "AC-link protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
