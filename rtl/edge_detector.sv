// edge_detector: Sobel edge detector for one 8x8 block, one bit per pixel.
//
// For every pixel the 3x3 neighbourhood is convolved with the Sobel kernels
//   Gx = [-1 0 +1; -2 0 +2; -1 0 +1]   Gy = [-1 -2 -1; 0 0 0; +1 +2 +1]
// and the pixel is an edge when |Gx| + |Gy| > edge_thr. Pixels outside the
// block are taken as zero (zero padding), so edges can appear at block borders.
//
// Pixels are loaded one per cycle from buffer 2 through pix_addr/pix_data
// (combinational read). Values are reused along a row: for the first pixel of
// a row all 9 window pixels are loaded (columns -1, 0 and 1), after that only
// the 3 pixels of the next column, while the window shifts left. That is
// 9 + 7*3 = 30 loads per row, 240 per block (a padded position still takes its
// load slot and yields zero). Each window is evaluated the cycle after its
// last load, in parallel with the next load, so a block takes 240 cycles of
// loads plus one: start in cycle 0, edge bits for pixels 0..63 in raster
// order with edge_valid, the last one in cycle 241 together with done.
//
// Kernel, absolute-sum magnitude, threshold, zero padding and the column
// reuse scheme follow the thesis; the strict '>' comparison and the exact
// cycle schedule are this design's choices.
module edge_detector
  import cam_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ce,
  input  logic      start,      // begin a block (ignored while busy)
  input  edge_thr_t edge_thr,
  output pix_addr_t pix_addr,   // buffer 2 read address
  input  pixel_t    pix_data,   // buffer 2 read data, same cycle
  output logic      edge_bit,   // 1: pixel is an edge
  output logic      edge_valid, // edge_bit is valid this cycle
  output logic      busy,
  output logic      done        // with the last edge bit of the block
);
  // column registers of the 3x3 window; index 0 = row above, 2 = row below
  pixel_t     col_l [3], col_m [3], col_r [3];
  pixel_t     ld0, ld1;         // first two pixels of the column being loaded
  logic [2:0] row;              // block row of the window centre
  logic [3:0] lcol;             // column being loaded, plus 1 (0 -> column -1)
  logic [1:0] k;                // row offset being loaded (0..2)

  // position of the current load and zero padding
  logic signed [4:0] ld_r, ld_c;
  logic              in_blk;
  pixel_t            ld_val;
  always_comb begin
    ld_r     = $signed({2'b00, row}) + $signed({3'b000, k}) - 5'sd1;
    ld_c     = $signed({1'b0, lcol}) - 5'sd1;
    in_blk   = (ld_r >= 0) && (ld_r < 8) && (ld_c >= 0) && (ld_c < 8);
    pix_addr = {ld_r[2:0], ld_c[2:0]};
    ld_val   = in_blk ? pix_data : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      row        <= '0;
      lcol       <= '0;
      k          <= '0;
      edge_valid <= 1'b0;
      done       <= 1'b0;
    end else if (ce) begin
      edge_valid <= 1'b0;
      done       <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          row  <= '0;
          lcol <= '0;
          k    <= '0;
        end
      end else begin
        if (k != 2'd2) k <= k + 2'd1;
        else begin
          k <= '0;
          // a complete window is centred on column lcol-2 once lcol >= 2
          if (lcol >= 4'd2) edge_valid <= 1'b1;
          if (lcol == 4'd9) begin
            lcol <= '0;
            row  <= row + 3'd1;
            if (row == 3'd7) begin
              busy <= 1'b0;
              done <= 1'b1;
            end
          end else lcol <= lcol + 4'd1;
        end
      end
    end
  end

  // window data path (no reset needed: written before use)
  always_ff @(posedge clk) begin
    if (ce && busy) begin
      unique case (k)
        2'd0: ld0 <= ld_val;
        2'd1: ld1 <= ld_val;
        default: begin
          col_l <= col_m;
          col_m <= col_r;
          col_r <= '{ld0, ld1, ld_val};
        end
      endcase
    end
  end

  // Sobel magnitude of the current window
  logic signed [11:0] gx, gy;
  logic [GRAD_W:0]    mag;
  always_comb begin
    gx = ($signed({4'b0, col_r[0]}) + 2 * $signed({4'b0, col_r[1]}) + $signed({4'b0, col_r[2]}))
       - ($signed({4'b0, col_l[0]}) + 2 * $signed({4'b0, col_l[1]}) + $signed({4'b0, col_l[2]}));
    gy = ($signed({4'b0, col_l[2]}) + 2 * $signed({4'b0, col_m[2]}) + $signed({4'b0, col_r[2]}))
       - ($signed({4'b0, col_l[0]}) + 2 * $signed({4'b0, col_m[0]}) + $signed({4'b0, col_r[0]}));
    mag      = GRAD_W'(gx < 0 ? -gx : gx) + GRAD_W'(gy < 0 ? -gy : gy);
    edge_bit = mag > {1'b0, edge_thr};
  end
endmodule
