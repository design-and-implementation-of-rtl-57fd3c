// tb_jpeg_feeder: a block memory is read through the address generator; the
// 64 pixels must reach the encoder port in raster order, one per enabled
// cycle, with enc_first on the first and done on the last, also when the
// clock enable drops at random.
`timescale 1ns/1ps
module tb_jpeg_feeder;
  import cam_pkg::*;

  logic clk = 0, rst_n = 0, ce = 1, start = 0;
  pix_addr_t addr;
  pixel_t data, enc_pix;
  logic enc_valid, enc_first, busy, done;
  pixel_t mem [64];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  assign data = mem[addr];

  jpeg_feeder dut (.clk, .rst_n, .ce, .start, .pix_addr(addr), .pix_data(data),
                   .enc_pix, .enc_valid, .enc_first, .busy, .done);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) begin
      automatic int n = 0, cyc = 0;
      for (int i = 0; i < 64; i++) mem[i] = pixel_t'($urandom);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (n < 64 && cyc < 1000) begin
        ce = (k < 3) ? 1'b1 : ($urandom_range(0, 2) != 0);
        #1;
        if (enc_valid && ce) begin
          checks++;
          if (enc_pix !== mem[n] || enc_first !== (n == 0) || done !== (n == 63)) begin
            failures++;
            $display("FAIL pixel %0d: %h exp %h first=%b done=%b", n, enc_pix, mem[n], enc_first, done);
          end
          n++;
        end
        @(negedge clk); cyc++;
      end
      ce = 1;
      #1;
      checks++;
      if (n != 64 || busy || enc_valid) begin failures++; $display("FAIL block %0d: %0d pixels", k, n); end
      if (k < 3) begin
        checks++;
        if (cyc != 64) begin failures++; $display("FAIL took %0d cycles", cyc); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
