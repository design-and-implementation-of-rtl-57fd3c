// tb_tx_controller: the TX controller against the radio model, fed from a
// payload queue that stands in for the TX FIFO. Checks the CONFIG write
// (0x0A), the power-up wait, that every payload arrives at the radio as
// 32 bytes with byte 0 = bits [7:0], one FIFO pop and one IRQ acknowledge
// per payload, the SPI load time (33 bytes x 16 cycles), and that the
// controller returns to SLEEP when the FIFO is empty.
`timescale 1ns/1ps
module tb_tx_controller;
  localparam int PWR = 100;
  logic clk = 0, rst_n = 0;
  logic fifo_empty, fifo_rd_en;
  logic [255:0] fifo_rdata;
  logic spi_csn, spi_sck, spi_mosi, spi_miso, nrf_ce, nrf_irq_n, in_sleep;
  logic [7:0] nrf_status;
  logic [15:0] payloads_sent;
  logic [255:0] q [$];
  logic [255:0] sent [$];
  int checks = 0, failures = 0, pops = 0;

  always #125 clk = ~clk;
  assign fifo_empty = (q.size() == 0);
  assign fifo_rdata = fifo_empty ? '0 : q[0];

  tx_controller #(.POWERUP_CYCLES(PWR), .CE_HIGH_CYCLES(60)) dut (
    .clk, .rst_n, .fifo_empty, .fifo_rdata, .fifo_rd_en,
    .spi_csn, .spi_sck, .spi_mosi, .spi_miso, .nrf_ce, .nrf_irq_n,
    .nrf_status, .payloads_sent, .in_sleep);
  nrf24_model #(.TX_DELAY(40)) radio (.clk, .sck(spi_sck), .mosi(spi_mosi), .csn(spi_csn),
                                      .ce(nrf_ce), .miso(spi_miso), .irq_n(nrf_irq_n));

  always @(posedge clk) if (fifo_rd_en) begin
    void'(q.pop_front());
    pops++;
  end

  // SPI load time of one payload command
  int csn_low = 0, max_csn_low = 0;
  always @(posedge clk) begin
    if (!spi_csn) csn_low++;
    else begin
      if (csn_low > max_csn_low) max_csn_low = csn_low;
      csn_low = 0;
    end
  end

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // a payload is waiting already, but nothing may be sent before power-up
    begin
      automatic logic [255:0] p = {8{$urandom}};
      q.push_back(p); sent.push_back(p);
    end
    t0 = 0;
    while (radio.payloads.size() == 0 && t0 < 2000) begin @(negedge clk); t0++; end
    checks++;
    if (t0 < PWR + 32 || radio.config_reg !== 8'h0A || radio.config_writes != 1) begin
      failures++;
      $display("FAIL config: first payload after %0d cycles, CONFIG=%h writes=%0d", t0,
               radio.config_reg, radio.config_writes);
    end
    for (int k = 1; k < 6; k++) begin
      repeat ($urandom_range(0, 300)) @(negedge clk);
      for (int j = 0; j < (k % 3); j++) begin
        automatic logic [255:0] p = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        q.push_back(p); sent.push_back(p);
      end
    end
    t0 = 0;
    while ((q.size() != 0 || !in_sleep) && t0 < 20000) begin @(negedge clk); t0++; end
    repeat (5) @(negedge clk);
    checks += 3;
    if (radio.payloads.size() != sent.size() || pops != sent.size() ||
        int'(payloads_sent) != sent.size() || radio.status_clears != sent.size()) begin
      failures++;
      $display("FAIL counts: radio %0d pops %0d sent %0d acks %0d exp %0d", radio.payloads.size(),
               pops, payloads_sent, radio.status_clears, sent.size());
    end
    if (!in_sleep || !nrf_irq_n) begin failures++; $display("FAIL not back in SLEEP"); end
    if (max_csn_low != 33 * 16) begin failures++; $display("FAIL payload load took %0d cycles", max_csn_low); end
    for (int i = 0; i < sent.size() && i < radio.payloads.size(); i++) begin
      checks++;
      if (radio.payloads[i].size() != 32) begin
        failures++; $display("FAIL payload %0d has %0d bytes", i, radio.payloads[i].size());
      end else
        for (int b = 0; b < 32; b++)
          if (radio.payloads[i][b] !== sent[i][b*8 +: 8]) begin
            failures++; $display("FAIL payload %0d byte %0d", i, b); break;
          end
    end
    checks++;
    // the last command is the IRQ acknowledge: the radio reported TX_DS set
    if (nrf_status !== 8'h2E) begin failures++; $display("FAIL status byte %h", nrf_status); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
