// tb_cap_harness: end-to-end test of content_aware_processor, shared by the
// reduced-size and the full-size testbench.
//
// A sensor model streams NFRAMES frames of BPF blocks, one block row per
// cycle whenever buffer1_empty is high. Blocks come in three kinds: a static
// bright rectangle, a rectangle that moves every frame, and a flat block. The
// JPEG encoder is the behavioural stand-in jpeg_encoder_model, the radio is
// nrf24_model. Between frame 1 and frame 2 the external interrupt loads new
// thresholds (edge 200, block 2) and QF 75; before frame 3 it loads edge 100,
// block 30. With SWEEP set, frame 0 runs at the reset configuration and
// frames 1 to 5 each run one of five settings: block threshold 0 (every block
// kept, as with no preprocessing), then edge/block 200/2, 200/5, 100/5 and
// 100/10. Frame 1 must keep every block; the kept count of each frame is
// printed.
//
// Reference: the expected keep/drop decision of every block comes from the
// software Sobel model (tb_ref_pkg) with the thresholds in force, comparing
// with the previous frame's edge map (all zero in frame 0). From the decisions
// the expected encoder word stream follows, and from that the expected radio
// payloads. Checked: every decision, every payload byte received by the radio,
// the QF output, and that each mechanism happened: kept and dropped blocks,
// FIFO-full stalls, block-level gating of the preprocessor, decisions changed
// by a reconfiguration, frame ends, and IRQ acknowledges.
`timescale 1ns/1ps
module tb_cap_harness #(
  parameter int BPF     = 8,
  parameter int NFRAMES = 4,
  parameter bit FULL    = 0,    // 1: the processor with all its defaults
  parameter bit SWEEP   = 0     // 1: threshold sweep, one configuration per frame
);
  import cam_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, tx_clk = 0, tx_rst_n = 0;
  row_t sensor_row = '0;
  logic sensor_valid = 0, buffer1_empty;
  logic cfg_irq = 0;
  edge_thr_t cfg_edge_thr = '0;
  blk_thr_t  cfg_blk_thr = '0;
  qf_t       cfg_qf = '0, enc_qf;
  logic enc_ce, enc_pix_valid, enc_first, enc_empty_blk, enc_word_valid;
  pixel_t enc_pix;
  logic [31:0] enc_word;
  logic spi_csn, spi_sck, spi_mosi, spi_miso, nrf_ce, nrf_irq_n;
  logic frame_end, fifo_full, pre_ce, pre_keep_valid, pre_keep;
  logic [7:0] nrf_status;
  logic [15:0] payloads_sent;

  always #10 clk = ~clk;        // 50 MHz system clock
  always #125 tx_clk = ~tx_clk; // 4 MHz transmitter clock

  if (FULL) begin : g_full
    content_aware_processor dut (.*);
  end else begin : g_small
    content_aware_processor #(.BLOCKS_PER_FRAME(BPF), .POWERUP_CYCLES(200)) dut (.*);
  end

  jpeg_encoder_model enc (.clk, .rst_n, .ce(enc_ce), .pix(enc_pix), .pix_valid(enc_pix_valid),
                          .empty_blk(enc_empty_blk), .word(enc_word), .word_valid(enc_word_valid));
  nrf24_model #(.TX_DELAY(40)) radio (.clk(tx_clk), .sck(spi_sck), .mosi(spi_mosi), .csn(spi_csn),
                                      .ce(nrf_ce), .miso(spi_miso), .irq_n(nrf_irq_n));

  int checks = 0, failures = 0;
  // expected results, in block order
  int          exp_keep [$];
  logic [31:0] exp_words [$];
  logic [63:0] prev_map [BPF];
  int kept_in_frame [NFRAMES];
  int n_keep = 0, n_drop = 0, n_cfg_changed = 0, n_frames = 0, n_decisions = 0;
  longint n_full = 0, n_pre_gated = 0;

  // block content of frame f, block b
  function automatic void frame_block(ref blk_t blk, input int f, input int b);
    unique case (b % 3)
      0: make_block(blk, 2, 2, 3, 3, b);                                 // static object
      1: make_block(blk, (f + b) % 6, (2 * f + b) % 6, 2, 2 + b % 3, b); // moving object
      default: make_block(blk, 0, 0, 0, 0, b);                           // flat background
    endcase
  endfunction

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (fifo_full) n_full++;
    if (!pre_ce) n_pre_gated++;
    if (frame_end && !fifo_full) n_frames++;
  end

  // block decisions against the reference
  always @(posedge clk) if (rst_n && pre_keep_valid) begin
    checks++;
    if (n_decisions >= exp_keep.size()) begin
      failures++; $display("FAIL unexpected decision %0d", n_decisions);
    end else if (int'(pre_keep) != exp_keep[n_decisions]) begin
      failures++;
      $display("FAIL block %0d (frame %0d blk %0d): keep=%b exp %0d", n_decisions,
               n_decisions / BPF, n_decisions % BPF, pre_keep, exp_keep[n_decisions]);
    end
    n_decisions++;
  end

  task automatic set_cfg(input int et, input int bt, input int q);
    @(negedge clk);
    cfg_edge_thr = edge_thr_t'(et); cfg_blk_thr = blk_thr_t'(bt); cfg_qf = qf_t'(q);
    cfg_irq = 1;
    @(negedge clk);
    cfg_irq = 0;
    checks++;
    if (enc_qf != qf_t'(q)) begin failures++; $display("FAIL QF %0d exp %0d", enc_qf, q); end
  endtask

  initial begin
    #400ms;
    failures++;
    $display("watchdog: %0d decisions, %0d payloads", n_decisions, radio.payloads.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int et = 100, bt = 5, seq = 0, npay, t;
    blk_t blk;
    repeat (2) @(negedge tx_clk);
    rst_n = 1; tx_rst_n = 1;
    for (int f = 0; f < NFRAMES; f++) begin
      kept_in_frame[f] = 0;
      if (SWEEP) begin
        unique case (f)
          0: ;
          1: begin et = 100; bt = 0;  end
          2: begin et = 200; bt = 2;  end
          3: begin et = 200; bt = 5;  end
          4: begin et = 100; bt = 5;  end
          default: begin et = 100; bt = 10; end
        endcase
        if (f > 0) set_cfg(et, bt, 50);
      end else begin
        if (f == 2) begin et = 200; bt = 2; set_cfg(et, bt, 75); end
        if (f == 3) begin et = 100; bt = 30; set_cfg(et, bt, 50); end
      end
      for (int b = 0; b < BPF; b++) begin
        automatic logic [63:0] e, e_old;
        automatic int s, k, k_old;
        frame_block(blk, f, b);
        e = sobel_edges(blk, et);
        s = popcount64(e ^ (f == 0 ? 64'h0 : prev_map[b]));
        k = (s >= bt);
        // what the reset configuration would have decided
        e_old = sobel_edges(blk, 100);
        k_old = (popcount64(e_old ^ (f == 0 ? 64'h0 : prev_map[b])) >= 5);
        if (f >= 2 && k != k_old) n_cfg_changed++;
        prev_map[b] = e;
        exp_keep.push_back(k);
        if (k) begin
          automatic int sum = 0;
          for (int i = 0; i < 64; i++) sum += int'(blk[i]);
          exp_words.push_back({16'hB10C, 16'(seq)});
          exp_words.push_back(32'(sum));
          n_keep++;
          kept_in_frame[f]++;
        end else begin
          exp_words.push_back({16'hE000, 16'(seq)});
          n_drop++;
        end
        seq++;
        for (int r = 0; r < 8; r++) begin
          while (!buffer1_empty) @(negedge clk);
          for (int c = 0; c < 8; c++) sensor_row[c] = blk[r*8+c];
          sensor_valid = 1;
          @(negedge clk);
          sensor_valid = 0;
        end
      end
      // the next frame (and a reconfiguration) waits until this one is done
      t = 0;
      while (n_frames <= f && t < 5_000_000) begin @(negedge clk); t++; end
    end
    // wait for the radio to receive every complete payload
    npay = exp_words.size() / 8;
    t = 0;
    while (radio.payloads.size() < npay && t < 10_000_000) begin @(negedge clk); t++; end
    repeat (2000) @(negedge clk);
    checks++;
    if (radio.payloads.size() != npay || int'(payloads_sent) != npay) begin
      failures++;
      $display("FAIL %0d payloads received, %0d sent, exp %0d", radio.payloads.size(), payloads_sent, npay);
    end
    for (int p = 0; p < npay && p < radio.payloads.size(); p++) begin
      automatic int bad = 0;
      for (int i = 0; i < 32; i++)
        if (radio.payloads[p][i] !== exp_words[p*8 + i/4][(i%4)*8 +: 8]) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("FAIL payload %0d: %0d bytes differ", p, bad); end
    end
    checks++;
    if (n_decisions != NFRAMES * BPF) begin
      failures++; $display("FAIL %0d decisions, exp %0d", n_decisions, NFRAMES * BPF);
    end
    $display("blocks kept %0d dropped %0d; FIFO-full cycles %0d; preprocessor gated cycles %0d;",
             n_keep, n_drop, n_full, n_pre_gated);
    $display("decisions changed by reconfiguration %0d; frames %0d; IRQ acknowledges %0d; payloads %0d",
             n_cfg_changed, n_frames, radio.status_clears, radio.payloads.size());
    for (int f = 0; f < NFRAMES; f++)
      $display("frame %0d: %0d of %0d blocks kept", f, kept_in_frame[f], BPF);
    if (SWEEP) begin
      checks++;
      if (NFRAMES < 2 || kept_in_frame[1] != BPF) begin
        failures++; $display("FAIL block threshold 0 did not keep every block");
      end
    end
    checks++;
    if (n_keep == 0 || n_drop == 0 || n_full == 0 || n_pre_gated == 0 || n_cfg_changed == 0 ||
        n_frames != NFRAMES || radio.status_clears != npay || radio.config_writes != 1) begin
      failures++; $display("FAIL a mechanism did not occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
