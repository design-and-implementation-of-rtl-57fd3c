// block_buffers: two 64-byte block buffers that bridge the image sensor and
// the processing pipeline.
//
// The sensor writes buffer 1 one block row (8 pixels) per cycle while
// buffer1_empty is high; a row offered while it is low is not taken.
// buffer1_empty is low while the clock enable is low, so a stall of the
// system (TX FIFO full) also holds off the sensor. When all 8 rows are in and buffer 2 is free, a
// small state machine copies buffer 1 into buffer 2 row by row (8 cycles;
// buffer 1 is read a row at a time, buffer 2 written a row at a time), then
// raises buffer1_empty again so the sensor can start the next block. Buffer 2
// is read one pixel at a time with a combinational (distributed RAM) read:
// b2_addr = {row, column}. b2_full stays high until the consumer pulses
// b2_release, which frees buffer 2 for the next copy.
//
// The two-buffer arrangement, row-wide writes, pixel-wide buffer 2 reads and
// the buffer1Empty handshake follow the thesis; the copy taking one cycle per
// row, the release handshake and the clock enable `ce` (the clock gating of
// the system, see system_controller) are this design's choices.
module block_buffers
  import cam_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ce,            // clock enable (gated clock)
  // image sensor side
  input  row_t      wr_row,        // one block row, pixel 0 in bits [7:0]
  input  logic      wr_valid,      // accepted only while buffer1_empty
  output logic      buffer1_empty, // buffer 1 accepts rows
  // consumer side (preprocessor / JPEG address generator)
  output logic      b2_full,       // buffer 2 holds a complete block
  input  pix_addr_t b2_addr,
  output pixel_t    b2_data,
  input  logic      b2_release     // consumer is done with buffer 2
);
  typedef enum logic [1:0] {S_FILL, S_WAIT, S_COPY} state_t;

  row_t       buf1 [BLK];
  row_t       buf2 [BLK];
  state_t     state;
  logic [2:0] row_cnt;

  assign buffer1_empty = (state == S_FILL) && ce;  // no row is taken while stalled
  assign b2_data       = buf2[b2_addr[5:3]][b2_addr[2:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_FILL;
      row_cnt <= '0;
      b2_full <= 1'b0;
    end else if (ce) begin
      if (b2_release) b2_full <= 1'b0;
      unique case (state)
        S_FILL: if (wr_valid) begin
          row_cnt <= row_cnt + 3'd1;
          if (row_cnt == 3'd7) state <= S_WAIT;
        end
        S_WAIT: if (!b2_full || b2_release) state <= S_COPY;
        S_COPY: begin
          row_cnt <= row_cnt + 3'd1;
          if (row_cnt == 3'd7) begin
            state   <= S_FILL;
            b2_full <= 1'b1;
          end
        end
        default: state <= S_FILL;
      endcase
    end
  end

  // buffer storage: no reset, every location is written before it is read
  always_ff @(posedge clk) begin
    if (ce) begin
      if (state == S_FILL && wr_valid) buf1[row_cnt] <= wr_row;
      if (state == S_COPY)             buf2[row_cnt] <= buf1[row_cnt];
    end
  end
endmodule
