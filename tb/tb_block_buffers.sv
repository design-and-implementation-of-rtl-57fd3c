// tb_block_buffers: pushes random blocks row by row (with random gaps) into
// buffer 1 while a consumer reads buffer 2 pixel by pixel and releases it
// after a random delay. Checks every pixel, that blocks come out in order,
// that buffer1_empty drops while buffer 1 is full or being copied, and that
// the copy takes 8 cycles when buffer 2 is free.
`timescale 1ns/1ps
module tb_block_buffers;
  import cam_pkg::*;

  logic clk = 0, rst_n = 0, ce = 1;
  row_t wr_row;
  logic wr_valid = 0, buffer1_empty, b2_full, b2_release = 0;
  pix_addr_t b2_addr = '0;
  pixel_t b2_data;
  pixel_t sent [$];
  int checks = 0, failures = 0;
  localparam int NBLK = 12;

  always #5 clk = ~clk;

  block_buffers dut (.clk, .rst_n, .ce, .wr_row, .wr_valid, .buffer1_empty,
                     .b2_full, .b2_addr, .b2_data, .b2_release);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // producer
  initial begin
    wr_row = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      for (int r = 0; r < 8; r++) begin
        while (!buffer1_empty || $urandom_range(0, 3) == 0) begin
          wr_valid = 0; @(negedge clk);
        end
        for (int c = 0; c < 8; c++) begin
          wr_row[c] = pixel_t'($urandom);
          sent.push_back(wr_row[c]);
        end
        wr_valid = 1;
        @(negedge clk);
        wr_valid = 0;
      end
      // buffer 1 must not accept rows right after the 8th row
      checks++;
      if (buffer1_empty) begin failures++; $display("FAIL buffer1_empty high after 8 rows"); end
      // with buffer 2 free the copy takes 8 cycles plus the wait state
      if (!b2_full) begin
        int n = 0;
        while (!buffer1_empty) begin @(negedge clk); n++; end
        checks++;
        if (n != 9) begin failures++; $display("FAIL copy took %0d cycles (exp 9)", n); end
      end
    end
  end

  // consumer
  initial begin
    @(posedge rst_n);
    for (int b = 0; b < NBLK; b++) begin
      while (!b2_full) @(negedge clk);
      repeat ($urandom_range(0, 40)) @(negedge clk);
      for (int i = 0; i < 64; i++) begin
        automatic pixel_t e = sent.pop_front();
        b2_addr = pix_addr_t'(i);
        #1;
        checks++;
        if (b2_data !== e) begin
          failures++;
          $display("FAIL block %0d pixel %0d: %h exp %h", b, i, b2_data, e);
        end
        @(negedge clk);
      end
      b2_release = 1;
      @(negedge clk);
      b2_release = 0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
