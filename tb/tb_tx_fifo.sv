// tb_tx_fifo: 50 MHz writer and 4 MHz reader (unrelated clocks). The writer
// pushes random 32-bit words whenever the FIFO is not full; the reader pops
// whole 256-bit payloads at random times. Checks every payload against the
// written words (word 0 in bits [31:0]), that a payload is not readable before
// its 8th word, and that full is reached (two payloads pending) and respected.
`timescale 1ns/1ps
module tb_tx_fifo;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [31:0]  wdata = '0;
  logic [255:0] rdata;
  logic [31:0] words [$];
  int checks = 0, failures = 0, full_seen = 0, nwritten = 0;
  localparam int NPAY = 40;

  always #10 wclk = ~wclk;
  always #125 rclk = ~rclk;

  tx_fifo dut (.wclk, .wrst_n, .wr_en, .wdata, .full, .rclk, .rrst_n, .rd_en, .rdata, .empty);

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    repeat (2) @(negedge rclk);
    @(negedge wclk);
    wrst_n = 1; rrst_n = 1;
    // partial payload: 7 words must not make the FIFO readable
    for (int i = 0; i < 7; i++) begin
      wr_en = 1; wdata = $urandom; words.push_back(wdata);
      @(negedge wclk);
    end
    wr_en = 0;
    nwritten = 7;
    repeat (40) @(negedge wclk);
    checks++;
    if (!empty) begin failures++; $display("FAIL readable with 7 words"); end
    while (nwritten < NPAY * 8) begin
      if (full) begin
        full_seen++;
        wr_en = 0;
      end else if ($urandom_range(0, 3) != 0) begin
        wr_en = 1; wdata = $urandom; words.push_back(wdata); nwritten++;
      end else wr_en = 0;
      @(negedge wclk);
    end
    wr_en = 0;
  end

  // reader
  initial begin
    @(posedge rrst_n);
    for (int p = 0; p < NPAY; p++) begin
      logic [255:0] e;
      while (empty) @(negedge rclk);
      repeat ($urandom_range(0, 6)) @(negedge rclk);
      for (int i = 0; i < 8; i++) e[i*32 +: 32] = words.pop_front();
      checks++;
      if (rdata !== e) begin failures++; $display("FAIL payload %0d: %h exp %h", p, rdata, e); end
      rd_en = 1;
      @(negedge rclk);
      rd_en = 0;
    end
    repeat (10) @(negedge rclk);
    checks += 2;
    if (!empty) begin failures++; $display("FAIL not empty at the end"); end
    if (full_seen == 0) begin failures++; $display("FAIL full never reached"); end
    $display("full for %0d write cycles", full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
