// Self-checking testbench for tone_generator.
//
// For each region 0..6 the testbench enables the tone, ticks the sample
// clock, and measures the length of the high and low halves of the square
// wave in ticks; they must equal 109, 97, 92, 82, 73, 69, 61 ticks
// (notes A3..G4 at 48 kHz), and the amplitude must be +/-0x2000. It also
// checks silence when disabled and for region 7.
module tb_tone_generator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               sample_tick = 0, enable = 0;
  logic [2:0]         region = 0;
  logic signed [15:0] sample;

  tone_generator dut (.*);

  int checks = 0, failures = 0;
  int half [7] = '{109, 97, 92, 82, 73, 69, 61};

  task automatic tick();
    @(negedge clk) sample_tick = 1;
    @(negedge clk) sample_tick = 0;
    @(negedge clk);
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    tick();
    check(sample == 0, "silent after reset");
    for (int r = 0; r < 7; r++) begin
      logic signed [15:0] prev;
      int run, runs;
      region = 3'(r); enable = 1;
      tick();
      check(sample == 16'sh2000, $sformatf("region %0d starts high", r));
      prev = sample; run = 1; runs = 0;
      while (runs < 4) begin
        tick();
        check(sample == 16'sh2000 || sample == -16'sh2000, "amplitude");
        if (sample == prev) run++;
        else begin
          check(run == half[r], $sformatf("region %0d half period %0d, expected %0d", r, run, half[r]));
          runs++; run = 1; prev = sample;
        end
      end
    end
    enable = 0;
    tick(); tick();
    check(sample == 0, "silent when disabled");
    enable = 1; region = 3'd7;
    tick(); tick();
    check(sample == 0, "silent for region 7");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
