// tb_edge_map_buffers: with an edge SRAM attached, stores edge maps of
// several blocks, then reloads them (as the next frame would) and checks that
// prev_bit replays each stored map bit by bit, that the first frame reads as
// all zeros, that the stores land in SRAM words 2*blk and 2*blk+1, and the
// load / store cycle counts (4 and 2 cycles).
`timescale 1ns/1ps
module tb_edge_map_buffers;
  logic clk = 0, rst_n = 0, ce = 1;
  logic [7:0] blk_idx = '0;
  logic first_frame = 1, load_req = 0, load_done, store_req = 0, store_done;
  logic edge_bit = 0, edge_valid = 0, prev_bit;
  logic sram_cs_n, sram_we;
  logic [8:0] sram_addr;
  logic [31:0] sram_wdata, sram_rdata;
  logic [63:0] maps [8];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  edge_map_buffers dut (.clk, .rst_n, .ce, .blk_idx, .first_frame, .load_req, .load_done,
                        .store_req, .store_done, .edge_bit, .edge_valid, .prev_bit,
                        .sram_cs_n, .sram_we, .sram_addr, .sram_wdata, .sram_rdata);
  edge_sram sram (.clk, .cs_n(sram_cs_n), .we(sram_we), .addr(sram_addr),
                  .wdata(sram_wdata), .rdata(sram_rdata));

  task automatic load(input int b, input bit ff, input int exp_cyc);
    int n = 0;
    blk_idx = 8'(b); first_frame = ff;
    load_req = 1;
    @(negedge clk); load_req = 0; n = 1;
    while (!load_done && n < 20) begin @(negedge clk); n++; end
    checks++;
    if (n != exp_cyc) begin failures++; $display("FAIL load took %0d cycles (exp %0d)", n, exp_cyc); end
  endtask

  // push new edge bits and compare prev_bit with the expected old map
  task automatic stream(input logic [63:0] newmap, input logic [63:0] oldmap);
    int bad = 0;
    for (int i = 0; i < 64; i++) begin
      edge_bit = newmap[i]; edge_valid = 1;
      #1;
      if (prev_bit !== oldmap[i]) bad++;
      @(negedge clk);
      edge_valid = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %0d previous bits wrong", bad); end
  endtask

  task automatic store(input int b, input logic [63:0] m);
    int n = 0;
    blk_idx = 8'(b);
    store_req = 1;
    @(negedge clk); store_req = 0; n = 1;
    while (!store_done && n < 20) begin @(negedge clk); n++; end
    @(negedge clk);
    checks++;
    if (n != 2 || sram.mem[2*b] !== m[31:0] || sram.mem[2*b+1] !== m[63:32]) begin
      failures++;
      $display("FAIL store blk %0d: %0d cycles, sram %h_%h exp %h", b, n, sram.mem[2*b+1], sram.mem[2*b], m);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // frame 0: no previous map
    for (int b = 0; b < 8; b++) begin
      maps[b] = {$urandom, $urandom};
      load(b, 1, 1);
      stream(maps[b], 64'h0);
      store(b, maps[b]);
    end
    // frames 1 and 2: previous maps come back from the SRAM
    for (int f = 0; f < 2; f++)
      for (int b = 7; b >= 0; b--) begin
        automatic logic [63:0] m = {$urandom, $urandom};
        load(b, 0, 4);
        stream(m, maps[b]);
        store(b, m);
        maps[b] = m;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
