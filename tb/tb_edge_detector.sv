// tb_edge_detector: drives blocks (random and structured) through the Sobel
// edge detector with several thresholds and compares every edge bit with the
// reference model. Also checks the load count (240 cycles per block: 9 + 7*3
// loads per row), that no load leaves the block, and the latency to done.
`timescale 1ns/1ps
module tb_edge_detector;
  import cam_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, ce = 1, start = 0;
  edge_thr_t thr;
  pix_addr_t addr;
  pixel_t    data;
  logic edge_bit, edge_valid, busy, done;
  blk_t blk;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  assign data = blk[addr];

  edge_detector dut (.clk, .rst_n, .ce, .start, .edge_thr(thr), .pix_addr(addr),
                     .pix_data(data), .edge_bit, .edge_valid, .busy, .done);

  task automatic run_block(input int t, input bit gate);
    logic [63:0] exp, got;
    int n = 0, cyc = 0, busy_cyc = 0;
    exp = sobel_edges(blk, t);
    thr = edge_thr_t'(t);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!(done && ce)) begin
      if (busy && ce) busy_cyc++;
      if (edge_valid && ce) begin got[n] = edge_bit; n++; end
      if (gate) ce = ($urandom_range(0, 3) != 0);
      @(negedge clk); cyc++;
    end
    if (edge_valid) begin got[n] = edge_bit; n++; end
    ce = 1;
    checks++;
    if (n != 64 || got !== exp) begin
      failures++;
      $display("FAIL thr=%0d n=%0d exp=%h got=%h", t, n, exp, got);
    end
    if (!gate) begin
      checks++;
      if (busy_cyc != 240 || cyc != 241) begin
        failures++;
        $display("FAIL timing: busy %0d cycles (exp 240), done after %0d (exp 241)", busy_cyc, cyc);
      end
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    thr = 100;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 12; k++) begin
      make_block(blk, k % 5, (k * 3) % 6, 2 + k % 3, 3, k);
      run_block((k % 3 == 0) ? 100 : (k % 3 == 1) ? 200 : 400, k >= 8);
    end
    for (int k = 0; k < 8; k++) begin
      for (int i = 0; i < 64; i++) blk[i] = 8'($urandom);
      run_block(int'($urandom_range(0, 1500)), k >= 6);
    end
    // flat block: no edges inside but zero padding produces border edges
    for (int i = 0; i < 64; i++) blk[i] = 8'd128;
    run_block(200, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
