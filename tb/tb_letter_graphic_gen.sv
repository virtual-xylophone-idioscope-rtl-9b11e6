// Self-checking testbench for letter_graphic_gen.
//
// A bus-slave model completes each pixel write after a random 0..3 clock
// wait and records it. For letters A, D and G the testbench checks that one
// pass writes exactly the pixels of the reference glyph (an 8x8 outline font
// magnified 16x), each once, at base + 4096*row + 4*col with the colour
// packed into the pixel word, and that the pass takes the expected number of
// clocks. It also checks register read-back, that a pass repeats while start
// stays 1, that clearing start stops the drawing, and that region 7 draws
// nothing.
module tb_letter_graphic_gen;
  import idioscope_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  reg_req_t    reg_req;
  logic [3:0]  reg_rd_addr;
  logic [31:0] reg_rdata;
  logic        mst_wr_req, mst_cmplt, busy, pass_done;
  logic [31:0] mst_addr, mst_wr_data;

  letter_graphic_gen dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // reference glyphs, leftmost column in bit 7, top row first
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

  // ---------------- bus slave model ----------------
  int          wait_cnt = 0;
  int          writes = 0, req_cycles = 0, bad_addr = 0;
  int          hits [128][128];
  logic [31:0] last_data;
  always @(posedge clk) begin
    if (rst_n && mst_wr_req) req_cycles++;
    if (rst_n && mst_wr_req && !mst_cmplt) begin
      if (wait_cnt == 0) begin
        int off, row, col;
        mst_cmplt <= 1'b1;
        wait_cnt  <= $urandom_range(0, 3);
        writes++;
        last_data = mst_wr_data;
        off = int'(mst_addr - 32'h4000_0000);
        row = off / 4096;
        col = (off % 4096) / 4;
        if (off < 0 || off % 4 != 0 || row > 127 || col > 127) bad_addr++;
        else hits[row][col]++;
      end else wait_cnt <= wait_cnt - 1;
    end else mst_cmplt <= 1'b0;
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic reg_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk);
    reg_req = '{wr: 1'b1, addr: a, wdata: d};
    @(negedge clk);
    reg_req = '0;
  endtask

  task automatic clear_hits();
    foreach (hits[r, c]) hits[r][c] = 0;
    writes = 0; req_cycles = 0; bad_addr = 0;
  endtask

  task automatic run_letter(int letter, logic [17:0] col);
    int t0, ones, wrong, expected_cycles;
    logic [31:0] exp_word;
    reg_write(4'd0, {14'd0, col});
    reg_write(4'd8, letter);
    clear_hits();
    @(negedge clk);
    reg_req = '{wr: 1'b1, addr: 4'd7, wdata: 32'd1};
    @(posedge clk);
    t0 = cyc;               // this edge writes start
    @(negedge clk);
    reg_req = '0;
    while (!pass_done) @(posedge clk);
    ones = 0; wrong = 0;
    for (int r = 0; r < 128; r++)
      for (int c = 0; c < 128; c++) begin
        ones += ref_pixel(letter, r, c);
        if (hits[r][c] != int'(ref_pixel(letter, r, c))) wrong++;
      end
    check(bad_addr == 0, $sformatf("letter %0d: %0d writes outside the glyph box", letter, bad_addr));
    check(wrong == 0, $sformatf("letter %0d: %0d pixels wrong", letter, wrong));
    check(writes == ones, $sformatf("letter %0d: %0d writes, expected %0d", letter, writes, ones));
    exp_word = {8'h00, col[17:12], 2'b00, col[11:6], 2'b00, col[5:0], 2'b00};
    check(last_data == exp_word, $sformatf("pixel word %h, expected %h", last_data, exp_word));
    // IDLE + 16 words x 3 + 16384 bits x 4 + 128 rows + 2 per pixel
    // + clocks spent waiting for completion + DONE, seen one clock later
    expected_cycles = 1 + 16 * 3 + 16384 * 4 + 128 + 2 * ones + req_cycles + 1 + 1;
    check(cyc - t0 == expected_cycles,
          $sformatf("letter %0d: pass took %0d clocks, expected %0d", letter, cyc - t0, expected_cycles));
  endtask

  initial begin
    reg_req = '0; reg_rd_addr = '0; mst_cmplt = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // register read-back
    reg_write(4'd0, 32'h0003_F041);
    reg_write(4'd8, 32'd5);
    reg_rd_addr = 4'd0; #1;
    check(reg_rdata == 32'h0003_F041, "colour read-back");
    reg_rd_addr = 4'd8; #1;
    check(reg_rdata == 32'd5, "region read-back");
    check(!busy, "idle before start");

    run_letter(0, 18'h3F000);   // A in red
    // still started: a second pass begins at once
    repeat (5) @(posedge clk);
    check(busy, "pass repeats while start stays 1");
    reg_write(4'd7, 32'd0);
    repeat (10) @(posedge clk);
    check(!busy && !mst_wr_req, "start = 0 stops drawing");

    run_letter(3, 18'h00FC0);   // D in green
    reg_write(4'd7, 32'd0);
    repeat (10) @(posedge clk);
    run_letter(6, 18'h0003F);   // G in blue
    reg_write(4'd7, 32'd0);
    repeat (10) @(posedge clk);

    // region 7 has no letter
    reg_write(4'd8, 32'd7);
    clear_hits();
    reg_write(4'd7, 32'd1);
    repeat (200) @(posedge clk);
    check(!busy && writes == 0, "region 7 draws nothing");
    reg_write(4'd7, 32'd0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
