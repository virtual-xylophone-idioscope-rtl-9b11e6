// Shared types and constants of the virtual-xylophone hardware.
//
// The frame buffer layout follows the TFT controller convention: one 32-bit
// word per pixel, 1024 words (4096 bytes) per line, 512 lines, based at
// 0x4000_0000, of which 640x480 are visible. Colour channels are 6 bits
// each. The bus numbers bits big-endian (bit 0 is the MSB), so the red field
// [8:13] is bits 23:18 here, green [16:21] is 15:10 and blue [24:29] is 7:2;
// the other bits are unused and written as zero.
//
// Letters are 128x128 monochrome glyphs stored as 16 words of 1024 bits
// (eight glyph rows per word, leftmost pixel of the top row in the MSB).
// Region numbers 0..6 select letters A..G.
package idioscope_pkg;

  localparam logic [31:0] TFT_BASE_ADDR  = 32'h4000_0000;
  localparam int unsigned LINE_BYTES     = 4096;   // 1024 words per line
  localparam int unsigned PIXEL_BYTES    = 4;
  localparam int unsigned GLYPH_DIM      = 128;    // glyph is 128x128 pixels
  localparam int unsigned ROM_WORDS      = 16;     // words per letter ROM
  localparam int unsigned ROM_WIDTH      = 1024;   // bits per ROM word
  localparam int unsigned NUM_REGIONS    = 7;      // regions 0..6, letters A..G

  typedef logic [2:0] region_t;

  typedef struct packed {
    logic [5:0] r;
    logic [5:0] g;
    logic [5:0] b;
  } rgb666_t;

  // One write on a word-addressed register bus (the software-visible
  // slave registers of a core).
  typedef struct packed {
    logic        wr;
    logic [3:0]  addr;
    logic [31:0] wdata;
  } reg_req_t;

  // Pack a colour into the frame-buffer pixel word.
  function automatic logic [31:0] pack_pixel(rgb666_t c);
    return {8'h00, c.r, 2'b00, c.g, 2'b00, c.b, 2'b00};
  endfunction

  // Byte address of pixel (row, col) in a frame buffer based at base.
  function automatic logic [31:0] pixel_addr(logic [31:0] base, int unsigned row,
                                             int unsigned col);
    return base + 32'(LINE_BYTES * row) + 32'(PIXEL_BYTES * col);
  endfunction

endpackage
