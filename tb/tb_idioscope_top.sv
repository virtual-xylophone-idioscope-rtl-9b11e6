// End-to-end testbench for idioscope_top at its default configuration.
//
// Plays two notes the way the running system does. A behavioural codec
// supplies the microphone; a bus-slave model stands in for the memory
// controller, completing each pixel write after a random 0..3 clock wait and
// keeping a 128x128 window of the frame buffer. The processor's interrupt
// handler and half-second timer are played by the testbench: on hit_irq it
// writes the region to both cores and starts them, later it clears start.
// Checks: codec initialisation, one interrupt per strike and none for quiet
// sound, the letter's pixels (and only those) written in the chosen colour,
// the note's half period at the codec, repeated passes while started, and
// that clearing start stops drawing and sound. Every mechanism (interrupt,
// pixel write, bus wait, pass repeat, stop, tone edge, codec register write)
// is counted and must occur.
module tb_idioscope_top;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        reg_wr = 0;
  logic [4:0]  reg_addr = 0, reg_rd_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic        mst_wr_req, mst_cmplt = 0;
  logic [31:0] mst_addr, mst_wr_data;
  logic        gfx_busy, gfx_pass_done, hit_irq;
  logic        ac97_bit_clk, ac97_sdata_in, ac97_sync, ac97_sdata_out, ac97_reset_n;

  logic signed [15:0] mic_sample = 0;
  int                 frames_rx, cmd_count, protocol_errors;
  logic signed [15:0] rx_left, rx_right, tx_mic;
  logic [22:0]        cmd_log [16];

  idioscope_top dut (.*);

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

  function automatic bit ref_pixel(int letter, int row, int col);
    byte unsigned g [7][8] = '{
      '{8'h18, 8'h24, 8'h42, 8'h42, 8'h7E, 8'h42, 8'h42, 8'h00},
      '{8'h7C, 8'h42, 8'h42, 8'h7C, 8'h42, 8'h42, 8'h7C, 8'h00},
      '{8'h3C, 8'h42, 8'h40, 8'h40, 8'h40, 8'h42, 8'h3C, 8'h00},
      '{8'h78, 8'h44, 8'h42, 8'h42, 8'h42, 8'h44, 8'h78, 8'h00},
      '{8'h7E, 8'h40, 8'h40, 8'h7C, 8'h40, 8'h40, 8'h7E, 8'h00},
      '{8'h7E, 8'h40, 8'h40, 8'h7C, 8'h40, 8'h40, 8'h40, 8'h00},
      '{8'h3C, 8'h42, 8'h40, 8'h4E, 8'h42, 8'h42, 8'h3C, 8'h00}};
    return g[letter][row / 16][7 - col / 16];
  endfunction

  // ---------------- mechanism counters ----------------
  int n_irq = 0, n_writes = 0, n_waits = 0, n_passes = 0, n_stops = 0, n_edges = 0;

  // ---------------- memory-controller model ----------------
  int          wait_cnt = 0, bad_addr = 0;
  logic [31:0] fb [128][128];
  always @(posedge clk) begin
    if (rst_n && mst_wr_req && !mst_cmplt) begin
      if (wait_cnt == 0) begin
        int off;
        mst_cmplt <= 1'b1;
        wait_cnt  <= $urandom_range(0, 3);
        n_writes++;
        off = int'(mst_addr - 32'h4000_0000);
        if (off < 0 || off / 4096 > 127 || (off % 4096) / 4 > 127 || off % 4 != 0) bad_addr++;
        else fb[off / 4096][(off % 4096) / 4] = mst_wr_data;
      end else begin
        wait_cnt <= wait_cnt - 1;
        n_waits++;
      end
    end else mst_cmplt <= 1'b0;
  end

  always @(posedge clk) begin
    if (rst_n && hit_irq) n_irq++;
    if (rst_n && gfx_pass_done) n_passes++;
  end

  logic signed [15:0] prev_left = 0;
  always @(frames_rx) begin
    if (rx_left != prev_left && prev_left != 0 && rx_left != 0) n_edges++;
    prev_left = rx_left;
  end

  task automatic reg_write(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk) begin reg_wr = 1; reg_addr = a; reg_wdata = d; end
    @(negedge clk) reg_wr = 0;
  endtask

  task automatic frames(int n);
    int f0 = frames_rx;
    wait (frames_rx >= f0 + n);
  endtask

  task automatic clear_fb();
    foreach (fb[r, c]) fb[r][c] = 32'hDEAD_BEEF;   // stands for live video
  endtask

  task automatic strike();
    mic_sample = 16'sd14000; frames(1);
    mic_sample = -16'sd11000; frames(1);
    mic_sample = 16'sd6000; frames(1);
    mic_sample = 16'sd50; frames(3);
  endtask

  int half [7] = '{109, 97, 92, 82, 73, 69, 61};

  // one note: strike, handler starts both cores, check letter and tone, stop
  task automatic play_note(int region, logic [17:0] colour);
    int irq0, wrong, run, runs, f, passes0;
    logic signed [15:0] prev;
    logic [31:0] word;
    irq0 = n_irq;
    clear_fb();
    strike();
    check(n_irq == irq0 + 1, $sformatf("one interrupt per strike (%0d)", n_irq - irq0));
    // interrupt handler
    reg_write(5'h00, {14'd0, colour});
    reg_write(5'h08, region);
    reg_write(5'h11, region);
    reg_write(5'h07, 1);
    reg_write(5'h10, 1);
    passes0 = n_passes;
    wait (n_passes == passes0 + 1);
    word = {8'h00, colour[17:12], 2'b00, colour[11:6], 2'b00, colour[5:0], 2'b00};
    wrong = 0;
    for (int r = 0; r < 128; r++)
      for (int c = 0; c < 128; c++)
        if (fb[r][c] != (ref_pixel(region, r, c) ? word : 32'hDEAD_BEEF)) wrong++;
    check(wrong == 0, $sformatf("letter %c: %0d pixels wrong", 8'("A") + 8'(region), wrong));
    check(bad_addr == 0, "writes stay inside the letter box");
    // tone at the codec
    prev = rx_left; run = 0; runs = 0; f = frames_rx;
    while (runs < 3) begin
      wait (frames_rx != f);
      f = frames_rx;
      if (rx_left == prev) run++;
      else begin
        if (runs > 0) check(run == half[region], $sformatf("half period %0d frames, expected %0d", run, half[region]));
        runs++; run = 1; prev = rx_left;
      end
    end
    check(n_passes > passes0 + 1, "letter repainted while started");
    // timer expiry: secondary handler clears both start registers
    reg_write(5'h07, 0);
    reg_write(5'h10, 0);
    repeat (10) @(posedge clk);
    check(!gfx_busy && !mst_wr_req, "drawing stopped");
    if (!gfx_busy) n_stops++;
    frames(3);
    check(rx_left == 0, "tone stopped");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (ac97_reset_n);
    frames(10);
    reg_rd_addr = 5'h13; #1;
    check(reg_rdata[1:0] == 2'b11, "codec ready and initialised");
    check(cmd_count == 6, "six codec register writes");
    for (int i = 0; i < 30; i++) begin
      mic_sample = 16'(signed'($urandom_range(0, 800)) - 400);
      frames(1);
    end
    check(n_irq == 0, "quiet sound raises no interrupt");

    play_note(2, 18'h3F000);   // C, red
    play_note(5, 18'h3FFFF);   // F, white

    check(protocol_errors == 0, "AC-link protocol");
    check(n_irq > 0,    "mechanism: hit interrupt");
    check(n_writes > 0, "mechanism: pixel write");
    check(n_waits > 0,  "mechanism: bus wait");
    check(n_passes > 2, "mechanism: pass repeat");
    check(n_stops > 0,  "mechanism: stop on start = 0");
    check(n_edges > 0,  "mechanism: tone edge");
    check(cmd_count > 0, "mechanism: codec register write");
    $display("interrupts=%0d pixel_writes=%0d bus_waits=%0d passes=%0d stops=%0d tone_edges=%0d codec_writes=%0d",
             n_irq, n_writes, n_waits, n_passes, n_stops, n_edges, cmd_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
