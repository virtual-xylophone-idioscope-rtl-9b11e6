// Self-checking testbench for letter_rom.
//
// Reads all 16 words of the ROMs for B and G and compares every bit with a
// reference glyph (8x8 outline font magnified 16x, eight glyph rows per
// word, top-left pixel in bit 1023 of word 0). Also checks the one-clock
// read latency.
module tb_letter_rom;
  import idioscope_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [3:0]    addr;
  logic [1023:0] data_b, data_g;

  letter_rom #(.LETTER(1)) u_b (.clk, .addr, .rd_data(data_b));
  letter_rom #(.LETTER(6)) u_g (.clk, .addr, .rd_data(data_g));

  int checks = 0, failures = 0;

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

  function automatic logic [1023:0] ref_word(int letter, int w);
    logic [1023:0] v;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 128; c++)
        v[1023 - (r * 128 + c)] = ref_pixel(letter, w * 8 + r, c);
    return v;
  endfunction

  initial begin
    for (int w = 0; w < 16; w++) begin
      @(negedge clk) addr = 4'(w);
      @(posedge clk); #1;
      checks++;
      if (data_b != ref_word(1, w)) begin failures++; $display("FAIL: B word %0d", w); end
      checks++;
      if (data_g != ref_word(6, w)) begin failures++; $display("FAIL: G word %0d", w); end
    end
    // latency: a new address shows only after the next clock edge
    @(negedge clk) addr = 4'd0;
    @(posedge clk); #1;
    @(negedge clk) addr = 4'd4;
    #1;
    checks++;
    if (data_b != ref_word(1, 0)) begin failures++; $display("FAIL: read not registered"); end
    @(posedge clk); #1;
    checks++;
    if (data_b != ref_word(1, 4)) begin failures++; $display("FAIL: word 4 after one clock"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
