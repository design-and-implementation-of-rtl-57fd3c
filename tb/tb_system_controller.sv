// tb_system_controller: the system controller with small behavioural stand-ins
// for buffer 2, the preprocessor and the JPEG address generator. Checks that
// kept blocks are fed to the encoder and dropped ones produce enc_empty_blk,
// that buffer 2 is released once per block, block numbering and frame end
// after BLOCKS_PER_FRAME blocks, first_frame, the interrupt-driven register
// update, and the clock enables: FIFO full stops everything, the
// preprocessor's enable is low whenever it has no block.
`timescale 1ns/1ps
module tb_system_controller;
  import cam_pkg::*;
  localparam int BPF = 5;
  logic clk = 0, rst_n = 0;
  logic cfg_irq = 0;
  edge_thr_t cfg_edge_thr = '0, edge_thr;
  blk_thr_t  cfg_blk_thr = '0, blk_thr;
  qf_t       cfg_qf = '0, qf;
  logic fifo_full = 0, b2_full = 0, b2_release;
  logic pre_start, pre_busy = 0, pre_done = 0, pre_keep = 0;
  logic [7:0] blk_idx;
  logic first_frame, feed_start, feed_done = 0, enc_empty_blk;
  logic sys_ce, pre_ce, enc_ce, frame_end;
  int checks = 0, failures = 0;
  int releases = 0, feeds = 0, empties = 0, frames = 0, gated_pre = 0, pre_ce_bad = 0;
  int exp_keep [$];
  int exp_idx = 0;

  always #5 clk = ~clk;

  system_controller #(.BLOCKS_PER_FRAME(BPF)) dut (
    .clk, .rst_n, .cfg_irq, .cfg_edge_thr, .cfg_blk_thr, .cfg_qf, .edge_thr, .blk_thr, .qf,
    .fifo_full, .b2_full, .b2_release, .pre_start, .pre_busy, .pre_done, .pre_keep,
    .blk_idx, .first_frame, .feed_start, .feed_done, .enc_empty_blk,
    .sys_ce, .pre_ce, .enc_ce, .frame_end);

  // stand-ins: preprocessor takes 20 enabled cycles, feeder 64
  int pre_cnt = 0, feed_cnt = 0;
  logic feeding = 0;
  always @(posedge clk) begin
    if (pre_ce) begin
      pre_done <= 0;
      if (pre_start && !pre_busy) begin
        pre_busy <= 1; pre_cnt <= 0;
        checks++;
        if (int'(blk_idx) != exp_idx % BPF || first_frame !== (exp_idx < BPF)) begin
          failures++;
          $display("FAIL start blk_idx=%0d first=%b exp %0d", blk_idx, first_frame, exp_idx);
        end
      end else if (pre_busy) begin
        pre_cnt <= pre_cnt + 1;
        if (pre_cnt == 19) begin pre_done <= 1; pre_keep <= exp_keep[0]; end
        if (pre_cnt == 20) pre_busy <= 0;
      end
    end
    if (sys_ce) begin
      feed_done <= 0;
      if (feed_start) begin feeding <= 1; feed_cnt <= 0; feeds++; end
      else if (feeding) begin
        feed_cnt <= feed_cnt + 1;
        if (feed_cnt == 62) feed_done <= 1;
        if (feed_cnt == 63) feeding <= 0;
      end
      if (enc_empty_blk) empties++;
      if (b2_release) begin
        releases++; b2_full <= 0; void'(exp_keep.pop_front()); exp_idx++;
      end
      if (frame_end) frames++;
    end
    if (!pre_ce) gated_pre++;
    if (!pre_busy && !pre_start && pre_ce) pre_ce_bad++;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FIFO-full episodes
  initial begin
    @(posedge rst_n);
    forever begin
      repeat ($urandom_range(20, 200)) @(negedge clk);
      fifo_full = 1;
      repeat ($urandom_range(1, 30)) begin
        @(negedge clk);
        checks++;
        if (sys_ce || enc_ce || pre_ce) begin failures++; $display("FAIL enable high while FIFO full"); end
      end
      fifo_full = 0;
    end
  end

  initial begin
    int nk = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (edge_thr != 100 || blk_thr != 5 || qf != 50) begin failures++; $display("FAIL reset values"); end
    rst_n = 1;
    for (int b = 0; b < 3 * BPF; b++) begin
      automatic int k = $urandom_range(0, 1);
      nk += k;
      exp_keep.push_back(k);
      repeat ($urandom_range(0, 30)) @(negedge clk);
      b2_full = 1;
      while (b2_full) @(negedge clk);
      if (b == 7) begin
        cfg_edge_thr = 11'd200; cfg_blk_thr = 7'd2; cfg_qf = 7'd75; cfg_irq = 1;
        @(negedge clk); cfg_irq = 0;
        checks++;
        if (edge_thr != 200 || blk_thr != 2 || qf != 75) begin failures++; $display("FAIL cfg update"); end
      end
    end
    repeat (100) @(negedge clk);
    checks += 3;
    if (releases != 3 * BPF || feeds != nk || empties != 3 * BPF - nk) begin
      failures++;
      $display("FAIL releases %0d feeds %0d (exp %0d) empties %0d", releases, feeds, nk, empties);
    end
    if (frames != 3) begin failures++; $display("FAIL %0d frame ends", frames); end
    if (gated_pre == 0 || pre_ce_bad != 0) begin
      failures++; $display("FAIL block-level gating: gated %0d, enabled while idle %0d", gated_pre, pre_ce_bad);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
