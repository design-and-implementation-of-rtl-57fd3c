// jpeg_feeder: address generator that streams a kept block from buffer 2 to
// the JPEG encoder, one pixel per cycle in raster order (row 0 pixel 0 first).
// `start` begins the block; pix_valid is high for the next 64 cycles (the
// cycles in which ce is high) and `done` is high with the 64th pixel, after
// which buffer 2 may be released. The encoder takes the block serially in 64
// cycles as in the thesis; raster order and the handshake are this design's.
module jpeg_feeder
  import cam_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ce,
  input  logic      start,
  output pix_addr_t pix_addr,   // buffer 2 read address
  input  pixel_t    pix_data,   // buffer 2 read data
  output pixel_t    enc_pix,
  output logic      enc_valid,
  output logic      enc_first,  // first pixel of a block
  output logic      busy,
  output logic      done
);
  pix_addr_t cnt;

  assign pix_addr  = cnt;
  assign enc_pix   = pix_data;
  assign enc_valid = busy;
  assign enc_first = busy && (cnt == '0);
  assign done      = busy && (cnt == 6'd63);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (ce) begin
      if (!busy) begin
        busy <= start;
        cnt  <= '0;
      end else begin
        cnt <= cnt + 6'd1;
        if (cnt == 6'd63) busy <= 1'b0;
      end
    end
  end
endmodule
