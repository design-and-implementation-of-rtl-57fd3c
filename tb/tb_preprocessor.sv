// tb_preprocessor: runs three frames of NBLK blocks through the preprocessor
// with its edge SRAM. Block content moves between frames (a bright rectangle
// shifts), some blocks stay the same. For every block the expected decision
// is computed from the reference Sobel model: changed pixels = popcount of
// (edges this frame XOR edges last frame, all zero in the first frame), and
// keep = changed >= block threshold. Checks keep, the changed-pixel count and
// the cycle count per block (250 cycles, 247 in the first frame).
`timescale 1ns/1ps
module tb_preprocessor;
  import cam_pkg::*;
  import tb_ref_pkg::*;

  localparam int NBLK = 6;
  logic clk = 0, rst_n = 0, ce = 1, start = 0, first_frame = 1;
  logic [7:0] blk_idx = '0;
  edge_thr_t edge_thr = 100;
  blk_thr_t  blk_thr = 5;
  pix_addr_t pix_addr;
  pixel_t    pix_data;
  logic sram_cs_n, sram_we;
  logic [8:0] sram_addr;
  logic [31:0] sram_wdata, sram_rdata;
  logic busy, done, keep;
  logic [SUM_W-1:0] change_sum;
  blk_t blk;
  logic [63:0] prev_edges [NBLK];
  int checks = 0, failures = 0, kept = 0, dropped = 0;

  always #5 clk = ~clk;
  assign pix_data = blk[pix_addr];

  preprocessor dut (.clk, .rst_n, .ce, .start, .blk_idx, .first_frame, .edge_thr, .blk_thr,
                    .pix_addr, .pix_data, .sram_cs_n, .sram_we, .sram_addr, .sram_wdata,
                    .sram_rdata, .busy, .done, .keep, .change_sum);
  edge_sram sram (.clk, .cs_n(sram_cs_n), .we(sram_we), .addr(sram_addr),
                  .wdata(sram_wdata), .rdata(sram_rdata));

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      first_frame = (f == 0);
      for (int b = 0; b < NBLK; b++) begin
        automatic logic [63:0] e;
        automatic int exp_sum = 0, cyc = 0;
        // blocks 0,1 static; others have a rectangle that moves with the frame
        if (b < 2) make_block(blk, 2, 2, 3, 3, b);
        else make_block(blk, (f + b) % 6, (2 * f + b) % 6, 2, 2 + b % 3, b);
        if (b == 5 && f == 2) edge_thr = 200;
        e = sobel_edges(blk, int'(edge_thr));
        exp_sum = popcount64(e ^ (f == 0 ? 64'h0 : prev_edges[b]));
        prev_edges[b] = e;
        blk_idx = 8'(b);
        @(negedge clk); start = 1;
        @(negedge clk); start = 0; cyc = 1;
        while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
        checks += 2;
        if (keep !== (exp_sum >= int'(blk_thr)) || int'(change_sum) != exp_sum) begin
          failures++;
          $display("FAIL frame %0d blk %0d: keep=%b sum=%0d exp sum %0d", f, b, keep, change_sum, exp_sum);
        end
        if (cyc != (f == 0 ? 246 : 249)) begin
          failures++;
          $display("FAIL frame %0d blk %0d: done after %0d cycles", f, b, cyc + 1);
        end
        if (keep) kept++; else dropped++;
        @(negedge clk);
      end
    end
    checks++;
    if (kept == 0 || dropped == 0) begin failures++; $display("FAIL kept %0d dropped %0d", kept, dropped); end
    $display("kept %0d dropped %0d", kept, dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
