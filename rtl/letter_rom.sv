// Letter ROM: one read-only block memory holding a 128x128 monochrome glyph.
//
// Seven instances (LETTER = 0..6) hold the letters A..G shown for the seven
// regions of the playing field. Each ROM is 16 words deep and 1024 bits wide;
// word w holds glyph rows 8w..8w+7, row after row, and within a row the
// leftmost pixel comes first, so bit 1023 of word 0 is the top-left pixel.
// A 1 is a pixel of the letter (drawn), a 0 is background (skipped).
//
// The depth, width, bit order and the meaning of 1 and 0 follow the original
// block-RAM initialisation files. Those files were made from scanned bitmaps
// that are not available here, so the glyph shapes are this design's own: an
// 8x8 outline font (the table below) magnified 16 times in each direction.
// The ROM contents are computed at elaboration from that table.
//
// Timing: synchronous read, like a block RAM. rd_data holds word addr one
// clock after addr is presented.
module letter_rom
  import idioscope_pkg::*;
#(
  parameter int unsigned LETTER = 0            // 0..6 selects A..G
) (
  input  logic                         clk,
  input  logic [$clog2(ROM_WORDS)-1:0] addr,
  output logic [ROM_WIDTH-1:0]         rd_data
);

  // 8x8 glyphs, one byte per row, top row in the most significant byte,
  // leftmost column in the MSB of each byte.
  localparam logic [63:0] FONT [NUM_REGIONS] = '{
    64'h18_24_42_42_7E_42_42_00,   // A
    64'h7C_42_42_7C_42_42_7C_00,   // B
    64'h3C_42_40_40_40_42_3C_00,   // C
    64'h78_44_42_42_42_44_78_00,   // D
    64'h7E_40_40_7C_40_40_7E_00,   // E
    64'h7E_40_40_7C_40_40_40_00,   // F
    64'h3C_42_40_4E_42_42_3C_00    // G
  };
  localparam int unsigned SCALE = GLYPH_DIM / 8;
  localparam int unsigned ROWS_PER_WORD = ROM_WIDTH / GLYPH_DIM;

  function automatic logic [ROM_WIDTH-1:0] glyph_word(int unsigned w);
    logic [ROM_WIDTH-1:0] v;
    int unsigned row, col, fr, fc;
    v = '0;
    for (int unsigned i = 0; i < ROM_WIDTH; i++) begin
      row = w * ROWS_PER_WORD + i / GLYPH_DIM;
      col = i % GLYPH_DIM;
      fr  = row / SCALE;
      fc  = col / SCALE;
      v[ROM_WIDTH-1-i] = FONT[LETTER][63 - (fr * 8 + fc)];
    end
    return v;
  endfunction

  logic [ROM_WIDTH-1:0] mem [ROM_WORDS];

  initial begin
    for (int unsigned w = 0; w < ROM_WORDS; w++) mem[w] = glyph_word(w);
  end

  always_ff @(posedge clk) rd_data <= mem[addr];

  initial assert (LETTER < NUM_REGIONS) else $error("LETTER out of range");

endmodule
