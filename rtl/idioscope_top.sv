// Virtual xylophone custom hardware: letter overlay and audio core.
//
// Holds the two custom peripherals of the system on one software register
// bus. The processor (outside) tracks the red baton in the video frame,
// takes hit_irq, finds the region under the baton, writes the region to
// both cores and sets their start registers; the audio core then plays the
// region's note and the letter graphic generator paints the letter A..G over
// the live video through its bus-master write port, until software clears
// start again.
//
// Register bus: word-addressed writes (reg_wr, reg_addr, reg_wdata) and
// combinational reads (reg_rd_addr -> reg_rdata). Addresses 0x00-0x0F
// select the letter graphic generator, 0x10-0x1F the audio core; the low
// four bits are the core's register index. This decode is this design's
// choice; the processor bus, memory controller, video input and output,
// DMA, timer and interrupt controller are outside this module.
//
// Master write port: one pixel write per handshake (mst_wr_req held until
// mst_cmplt), byte addresses into the frame buffer at 0x4000_0000.
// Synchronous active-low reset; clk is the bus clock (100 MHz assumed).
module idioscope_top
  import idioscope_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // software register bus
  input  logic        reg_wr,
  input  logic [4:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  input  logic [4:0]  reg_rd_addr,
  output logic [31:0] reg_rdata,
  // frame-buffer master write port
  output logic        mst_wr_req,
  output logic [31:0] mst_addr,
  output logic [31:0] mst_wr_data,
  input  logic        mst_cmplt,
  // status and interrupt
  output logic        gfx_busy,
  output logic        gfx_pass_done,
  output logic        hit_irq,
  // AC97 codec pins
  input  logic        ac97_bit_clk,
  input  logic        ac97_sdata_in,
  output logic        ac97_sync,
  output logic        ac97_sdata_out,
  output logic        ac97_reset_n
);

  reg_req_t    gfx_req, aud_req;
  logic [31:0] gfx_rdata, aud_rdata;

  always_comb begin
    gfx_req = '{wr: reg_wr && !reg_addr[4], addr: reg_addr[3:0], wdata: reg_wdata};
    aud_req = '{wr: reg_wr &&  reg_addr[4], addr: reg_addr[3:0], wdata: reg_wdata};
    reg_rdata = reg_rd_addr[4] ? aud_rdata : gfx_rdata;
  end

  letter_graphic_gen u_gfx (
    .clk, .rst_n,
    .reg_req(gfx_req), .reg_rd_addr(reg_rd_addr[3:0]), .reg_rdata(gfx_rdata),
    .mst_wr_req, .mst_addr, .mst_wr_data, .mst_cmplt,
    .busy(gfx_busy), .pass_done(gfx_pass_done)
  );

  audio_core u_audio (
    .clk, .rst_n,
    .reg_req(aud_req), .reg_rd_addr(reg_rd_addr[3:0]), .reg_rdata(aud_rdata),
    .hit_irq,
    .ac97_bit_clk, .ac97_sdata_in, .ac97_sync, .ac97_sdata_out, .ac97_reset_n
  );

endmodule
