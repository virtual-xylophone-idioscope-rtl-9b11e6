// Letter graphic generator: draws the note letter over the live video.
//
// While software holds the start register at 1, the core repeatedly paints
// the 128x128 glyph of letter A..G (region 0..6) into the frame buffer that
// the video input keeps overwriting, so the letter stays visible until start
// returns to 0 and the next video frame erases it. For every glyph bit the
// core walks a column counter (0..127) and a row counter (0..127); for every
// 1 bit it issues one bus-master write of the colour register to
//     base + 4096*row_count + 4*col_count
// and waits for the bus to signal completion.
//
// The state machine keeps the stages and state names of the original design:
// IDLE waits for start, SET_ROM_DATA loads a 1024-bit ROM word into DATA,
// RESET_COUNTERS clears the bit counter, CHECK looks at DATA[1023], SHIFT
// shifts DATA left, SET_DRAW decides, SET/DRAW/CMPLT perform one pixel write,
// COL_ADDR/ROW_ADDR advance the counters and DONE ends one pass over the 16
// ROM words. This design's own choices: the address of a pixel is computed
// before the column counter advances (so bit i of a row lands in column i),
// ROM_WAIT absorbs the one-clock read latency of the block ROMs, the region
// is captured when a pass starts, a region above 6 draws nothing, and a start
// of 0 returns to IDLE from any state except during an outstanding write.
//
// Slave registers (word index): 0 colour {r[17:12], g[11:6], b[5:0]},
// 7 start (bit 0, slv_reg7), 8 region (bits 2:0, slv_reg8). All read back.
//
// Master write port: mst_wr_req rises with mst_addr/mst_wr_data valid and is
// held until mst_cmplt is seen high, then drops for at least one clock.
//
// Timing per pass: 4 clocks per glyph bit, plus 1 per glyph row, 3 per ROM
// word, 2 + (wait for mst_cmplt) per drawn pixel, plus IDLE and DONE.
// Synchronous active-low reset.
module letter_graphic_gen
  import idioscope_pkg::*;
#(
  parameter logic [31:0] BASE_ADDR = TFT_BASE_ADDR
) (
  input  logic        clk,
  input  logic        rst_n,
  // software register bus
  input  reg_req_t    reg_req,
  input  logic [3:0]  reg_rd_addr,
  output logic [31:0] reg_rdata,
  // bus-master write port towards the memory controller
  output logic        mst_wr_req,
  output logic [31:0] mst_addr,
  output logic [31:0] mst_wr_data,
  input  logic        mst_cmplt,
  // status
  output logic        busy,
  output logic        pass_done     // one-clock pulse at the end of each pass
);

  localparam int unsigned AW = $clog2(ROM_WORDS);

  typedef enum logic [3:0] {
    IDLE, ROM_WAIT, SET_ROM_DATA, RESET_COUNTERS, CHECK, SHIFT, SET_DRAW,
    SET, DRAW, CMPLT, COL_ADDR, ROW_ADDR, DONE
  } state_t;

  // ---------------- slave registers ----------------
  rgb666_t colour;
  logic    slv_reg7;
  region_t slv_reg8;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      colour   <= '0;
      slv_reg7 <= 1'b0;
      slv_reg8 <= '0;
    end else if (reg_req.wr) begin
      unique case (reg_req.addr)
        4'd0:    colour   <= reg_req.wdata[17:0];
        4'd7:    slv_reg7 <= reg_req.wdata[0];
        4'd8:    slv_reg8 <= reg_req.wdata[2:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (reg_rd_addr)
      4'd0:    reg_rdata = {14'd0, colour};
      4'd7:    reg_rdata = {31'd0, slv_reg7};
      4'd8:    reg_rdata = {29'd0, slv_reg8};
      default: reg_rdata = '0;
    endcase
  end

  // ---------------- letter ROMs A..G ----------------
  logic [AW-1:0]        rom_addr;
  logic [ROM_WIDTH-1:0] rom_data [NUM_REGIONS];

  for (genvar l = 0; l < NUM_REGIONS; l++) begin : g_rom
    letter_rom #(.LETTER(l)) u_rom (.clk(clk), .addr(rom_addr), .rd_data(rom_data[l]));
  end

  // ---------------- drawing state machine ----------------
  state_t               state;
  logic [ROM_WIDTH-1:0] data;
  logic [10:0]          counter;     // bits consumed from DATA, 0..1024
  logic [6:0]           col_count;
  logic [6:0]           row_count;
  logic                 draw;
  region_t              letter;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= IDLE;
      data       <= '0;
      counter    <= '0;
      col_count  <= '0;
      row_count  <= '0;
      rom_addr   <= '0;
      draw       <= 1'b0;
      letter     <= '0;
      mst_wr_req <= 1'b0;
      mst_addr   <= BASE_ADDR;
      pass_done  <= 1'b0;
    end else begin
      pass_done <= 1'b0;
      if (!slv_reg7 && state != DRAW && state != CMPLT) begin
        state <= IDLE;
      end else begin
        unique case (state)
          IDLE: begin
            col_count <= '0;
            row_count <= '0;
            counter   <= '0;
            rom_addr  <= '0;
            letter    <= slv_reg8;
            if (slv_reg7 && 32'(slv_reg8) < NUM_REGIONS) state <= ROM_WAIT;
          end
          ROM_WAIT:     state <= SET_ROM_DATA;
          SET_ROM_DATA: begin
            data  <= rom_data[letter];
            state <= RESET_COUNTERS;
          end
          RESET_COUNTERS: begin
            counter   <= '0;
            col_count <= '0;
            state     <= CHECK;
          end
          CHECK: begin
            draw  <= data[ROM_WIDTH-1];
            state <= SHIFT;
          end
          SHIFT: begin
            data    <= data << 1;
            counter <= counter + 11'd1;
            state   <= SET_DRAW;
          end
          SET_DRAW: state <= draw ? SET : COL_ADDR;
          SET: begin
            mst_addr <= pixel_addr(BASE_ADDR, 32'(row_count), 32'(col_count));
            state    <= DRAW;
          end
          DRAW: begin
            mst_wr_req <= 1'b1;
            state      <= CMPLT;
          end
          CMPLT: begin
            if (mst_cmplt) begin
              mst_wr_req <= 1'b0;
              state      <= slv_reg7 ? COL_ADDR : IDLE;
            end
          end
          COL_ADDR: begin
            col_count <= col_count + 7'd1;         // wraps 127 -> 0
            state     <= (col_count == 7'd127) ? ROW_ADDR : CHECK;
          end
          ROW_ADDR: begin
            row_count <= row_count + 7'd1;         // wraps 127 -> 0
            if (counter == 11'(ROM_WIDTH)) begin
              rom_addr <= rom_addr + 1'b1;
              state    <= (rom_addr == AW'(ROM_WORDS - 1)) ? DONE : ROM_WAIT;
            end else begin
              state <= CHECK;
            end
          end
          DONE: begin
            pass_done <= 1'b1;
            state     <= IDLE;
          end
          default: state <= IDLE;
        endcase
      end
    end
  end

  assign mst_wr_data = pack_pixel(colour);
  assign busy        = (state != IDLE);

  // A write request, once raised, stays up until the bus completes it.
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
                               mst_wr_req && !mst_cmplt |=> mst_wr_req);
  // Address stays stable while a request is pending.
  a_addr_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                  mst_wr_req && !mst_cmplt |=> $stable(mst_addr));

endmodule
