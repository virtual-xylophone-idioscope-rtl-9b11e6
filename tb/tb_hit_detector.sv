// Self-checking testbench for hit_detector.
//
// Feeds quiet noise, loud bursts of either sign, and samples just below and
// just above the threshold (magnitude / 256 > 4, i.e. |s| >= 1280), and
// compares irq with a reference: one pulse per rising crossing, none while
// the interrupt is disabled.
module tb_hit_detector;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               sample_valid = 0, irq_enable = 1, irq, loud;
  logic signed [15:0] sample = 0;

  hit_detector dut (.*);

  int checks = 0, failures = 0, irqs = 0, expected_irqs = 0;
  bit ref_loud = 0;

  always @(posedge clk) if (rst_n && irq) irqs++;

  task automatic feed(input logic signed [15:0] s);
    bit above;
    int mag;
    mag = (s < 0) ? -int'(s) : int'(s);
    above = (mag / 256) > 4;
    @(negedge clk);
    sample = s; sample_valid = 1;
    @(negedge clk);
    sample_valid = 0;
    checks++;
    if (irq != (above && !ref_loud && irq_enable)) begin
      failures++;
      $display("FAIL: sample %0d irq=%0b", s, irq);
    end
    if (above && !ref_loud && irq_enable) expected_irqs++;
    ref_loud = above;
    repeat (3) @(negedge clk);
    checks++;
    if (irq) begin failures++; $display("FAIL: irq longer than one clock"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) feed(16'(signed'($urandom_range(0, 2000)) - 1000));
    feed(16'sd1279); feed(16'sd1280); feed(16'sd1280); feed(-16'sd1280);
    feed(16'sd0); feed(-16'sd1280); feed(16'sd10);
    feed(16'sd30000); feed(-16'sd30000); feed(16'sd20000); feed(16'sd5);
    feed(-16'sd32768); feed(16'sd0);
    irq_enable = 0;
    feed(16'sd30000); feed(16'sd0); feed(-16'sd25000); feed(16'sd0);
    irq_enable = 1;
    repeat (200) feed(16'(signed'($urandom_range(0, 8000)) - 4000));
    checks++;
    if (irqs != expected_irqs || expected_irqs < 5) begin
      failures++; $display("FAIL: %0d irqs, expected %0d", irqs, expected_irqs);
    end
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
