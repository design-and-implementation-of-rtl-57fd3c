// cam_pkg: types and constants shared by the content-aware image processor.
// The design works on 8x8 blocks of 8-bit grayscale pixels. The gradient
// magnitude |Gx|+|Gy| of a 3x3 Sobel window is at most 4*255*2 = 2040, so
// edge thresholds are 11 bits wide; the number of changed edge pixels in a
// block is 0..64, so block thresholds are 7 bits wide.
package cam_pkg;
  localparam int BLK     = 8;            // block side in pixels
  localparam int PIX_W   = 8;            // grayscale pixel width
  localparam int GRAD_W  = 11;           // width of |Gx|+|Gy|
  localparam int SUM_W   = 7;            // width of a 0..64 pixel count
  localparam int QF_W    = 7;            // JPEG quality factor 1..100

  typedef logic [PIX_W-1:0]  pixel_t;
  typedef pixel_t [BLK-1:0]  row_t;      // one block row, pixel 0 in [7:0]
  typedef logic [5:0]        pix_addr_t; // {row, column} inside a block
  typedef logic [GRAD_W-1:0] edge_thr_t;
  typedef logic [SUM_W-1:0]  blk_thr_t;
  typedef logic [QF_W-1:0]   qf_t;

endpackage
