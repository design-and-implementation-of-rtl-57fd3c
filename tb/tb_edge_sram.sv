// tb_edge_sram: writes random words to random addresses, reads them back and
// checks data, the one-cycle read latency and that rdata holds while the
// SRAM is deselected.
`timescale 1ns/1ps
module tb_edge_sram;
  logic clk = 0, cs_n = 1, we = 0;
  logic [8:0]  addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [512];
  logic        written [512];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  edge_sram dut (.clk, .cs_n, .we, .addr, .wdata, .rdata);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) written[i] = 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      addr  = 9'($urandom);
      cs_n  = ($urandom_range(0, 5) == 0);
      we    = $urandom_range(0, 1);
      wdata = $urandom;
      if (!we && !cs_n && !written[addr]) we = 1;
      if (!cs_n && we) begin model[addr] = wdata; written[addr] = 1; end
      if (!cs_n && !we) begin
        automatic logic [31:0] e = model[addr];
        @(posedge clk); #1;
        checks++;
        if (rdata !== e) begin failures++; $display("FAIL read %0d: %h exp %h", addr, rdata, e); end
        // deselected: output holds
        @(negedge clk); cs_n = 1; wdata = ~wdata;
        @(posedge clk); #1;
        checks++;
        if (rdata !== e) begin failures++; $display("FAIL rdata did not hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
