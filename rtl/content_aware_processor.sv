// content_aware_processor: top level of a low-power content-aware image
// processor for a wireless camera node.
//
// Frames arrive from the image sensor as 8x8 blocks, one block row per cycle.
// Each block passes two block buffers, then the preprocessor compares the
// block's Sobel edge map with the edge map of the same block in the previous
// frame (kept in an on-chip SRAM). Blocks with at least blk_thr changed edge
// pixels are streamed to an external JPEG encoder; the others are dropped and
// the encoder is told to insert an empty-block code. The encoder's 32-bit
// packets go through an asynchronous TX FIFO that assembles 256-bit payloads,
// which the TX controller sends over SPI to an nRF24L01+ radio. While the
// FIFO is full, everything on the system clock stops (clock enables), so no
// data is lost.
//
// Clocks: clk (system, 50 MHz in the thesis' measurements) for everything up
// to the FIFO write side; tx_clk (4 MHz by default) for the FIFO read side and
// the TX controller. Each has its own active-low asynchronous reset.
//
// The JPEG encoder is not part of this RTL: its interface is brought out as
// ports (enc_*). It must take one pixel per cycle while enc_pix_valid and
// enc_ce are high, treat enc_empty_blk as a block of zero coefficients, and
// may push a 32-bit word (enc_word_valid) only in cycles where enc_ce is high.
//
// The block diagram and the data flow follow the thesis; the port list, the
// clock enables and the encoder handshake are this design's.
module content_aware_processor
  import cam_pkg::*;
#(
  parameter int BLOCKS_PER_FRAME = 192,  // 12288-byte frames
  parameter int SRAM_DEPTH       = 512,  // edge SRAM words (2 per block)
  parameter int POWERUP_CYCLES   = 6000, // 1.5 ms at tx_clk = 4 MHz
  parameter int CE_HIGH_CYCLES   = 60    // 15 us at tx_clk = 4 MHz
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tx_clk,
  input  logic         tx_rst_n,
  // image sensor
  input  row_t         sensor_row,
  input  logic         sensor_valid,
  output logic         buffer1_empty,
  // external interrupt register (thresholds and quality factor)
  input  logic         cfg_irq,
  input  edge_thr_t    cfg_edge_thr,
  input  blk_thr_t     cfg_blk_thr,
  input  qf_t          cfg_qf,
  // JPEG encoder
  output logic         enc_ce,
  output qf_t          enc_qf,
  output pixel_t       enc_pix,
  output logic         enc_pix_valid,
  output logic         enc_first,
  output logic         enc_empty_blk,
  input  logic [31:0]  enc_word,
  input  logic         enc_word_valid,
  // nRF24L01+ radio
  output logic         spi_csn,
  output logic         spi_sck,
  output logic         spi_mosi,
  input  logic         spi_miso,
  output logic         nrf_ce,
  input  logic         nrf_irq_n,
  // status
  output logic         frame_end,
  output logic         fifo_full,
  output logic         pre_ce,
  output logic         pre_keep_valid, // a block decision this cycle
  output logic         pre_keep,
  output logic [7:0]   nrf_status,
  output logic [15:0]  payloads_sent
);
  localparam int ADDR_W = $clog2(SRAM_DEPTH);
  localparam int IDX_W  = ADDR_W - 1;

  logic             sys_ce;
  logic             b2_full, b2_release;
  pix_addr_t        b2_addr, pre_addr, feed_addr;
  pixel_t           b2_data;
  logic             pre_start, pre_busy, pre_done;
  logic [IDX_W-1:0] blk_idx;
  logic             first_frame;
  logic             feed_start, feed_busy, feed_done;
  edge_thr_t        edge_thr;
  blk_thr_t         blk_thr;
  logic [SUM_W-1:0] change_sum;
  logic             sram_cs_n, sram_we;
  logic [ADDR_W-1:0] sram_addr;
  logic [31:0]      sram_wdata, sram_rdata;
  logic             fifo_empty, fifo_rd_en;
  logic [255:0]     fifo_rdata;
  logic             tx_in_sleep;

  assign pre_keep_valid = pre_done && sys_ce;

  // buffer 2 is read by the preprocessor, then by the JPEG address generator
  assign b2_addr = feed_busy ? feed_addr : pre_addr;

  block_buffers u_bufs (
    .clk, .rst_n, .ce(sys_ce),
    .wr_row(sensor_row), .wr_valid(sensor_valid), .buffer1_empty,
    .b2_full, .b2_addr, .b2_data, .b2_release
  );

  preprocessor #(.ADDR_W(ADDR_W)) u_pre (
    .clk, .rst_n, .ce(pre_ce),
    .start(pre_start), .blk_idx, .first_frame, .edge_thr, .blk_thr,
    .pix_addr(pre_addr), .pix_data(b2_data),
    .sram_cs_n, .sram_we, .sram_addr, .sram_wdata, .sram_rdata,
    .busy(pre_busy), .done(pre_done), .keep(pre_keep), .change_sum
  );

  edge_sram #(.DEPTH(SRAM_DEPTH), .WIDTH(32)) u_sram (
    .clk, .cs_n(sram_cs_n || !pre_ce), .we(sram_we), .addr(sram_addr),
    .wdata(sram_wdata), .rdata(sram_rdata)
  );

  jpeg_feeder u_feed (
    .clk, .rst_n, .ce(sys_ce), .start(feed_start),
    .pix_addr(feed_addr), .pix_data(b2_data),
    .enc_pix, .enc_valid(enc_pix_valid), .enc_first,
    .busy(feed_busy), .done(feed_done)
  );

  system_controller #(.BLOCKS_PER_FRAME(BLOCKS_PER_FRAME), .IDX_W(IDX_W)) u_ctrl (
    .clk, .rst_n,
    .cfg_irq, .cfg_edge_thr, .cfg_blk_thr, .cfg_qf,
    .edge_thr, .blk_thr, .qf(enc_qf),
    .fifo_full,
    .b2_full, .b2_release,
    .pre_start, .pre_busy, .pre_done, .pre_keep, .blk_idx, .first_frame,
    .feed_start, .feed_done, .enc_empty_blk,
    .sys_ce, .pre_ce, .enc_ce, .frame_end
  );

  tx_fifo #(.WORD_W(32), .PAYLOAD_W(256)) u_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr_en(enc_word_valid && enc_ce), .wdata(enc_word), .full(fifo_full),
    .rclk(tx_clk), .rrst_n(tx_rst_n), .rd_en(fifo_rd_en), .rdata(fifo_rdata), .empty(fifo_empty)
  );

  tx_controller #(.PAYLOAD_W(256), .POWERUP_CYCLES(POWERUP_CYCLES),
                  .CE_HIGH_CYCLES(CE_HIGH_CYCLES)) u_tx (
    .clk(tx_clk), .rst_n(tx_rst_n),
    .fifo_empty, .fifo_rdata, .fifo_rd_en,
    .spi_csn, .spi_sck, .spi_mosi, .spi_miso, .nrf_ce, .nrf_irq_n,
    .nrf_status, .payloads_sent, .in_sleep(tx_in_sleep)
  );

  logic unused;
  assign unused = ^{change_sum, tx_in_sleep};
endmodule
