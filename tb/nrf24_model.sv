// nrf24_model: behavioural model of the SPI side of an nRF24L01+ radio, for
// testbenches. It decodes W_REGISTER (CONFIG, STATUS) and W_TX_PAYLOAD
// commands (mode 0, MSB first), shifts STATUS out on MISO during the command
// byte, and after a CE pulse with a payload loaded and PWR_UP set it pulls
// IRQ low TX_DELAY clock cycles later (data sent). Writing STATUS with bit 5
// set releases IRQ. Received payloads are kept for checking.
module nrf24_model #(
  parameter int TX_DELAY = 40
) (
  input  logic clk,
  input  logic sck,
  input  logic mosi,
  input  logic csn,
  input  logic ce,
  output logic miso,
  output logic irq_n
);
  logic [7:0] config_reg = 8'h08;
  logic [7:0] status_reg = 8'h0E;
  logic [7:0] bytes [$];
  logic [7:0] shreg;
  int         nbits = 0;
  logic [7:0] payloads [$][$];
  logic [7:0] cur_payload [$];
  logic       payload_loaded = 1'b0;
  int         config_writes = 0;
  int         status_clears = 0;
  int         ce_cycles = 0;
  int         tx_timer = -1;
  logic [7:0] miso_sh;

  assign irq_n = !status_reg[5];
  assign miso  = miso_sh[7];

  // SPI slave, event driven on the pins
  always @(negedge csn) begin
    bytes.delete();
    nbits = 0;
    miso_sh = status_reg;
  end
  always @(posedge sck) if (!csn) begin
    shreg = {shreg[6:0], mosi};
    nbits++;
    if (nbits % 8 == 0) bytes.push_back(shreg);
  end
  always @(negedge sck) if (!csn) miso_sh = {miso_sh[6:0], 1'b0};
  always @(posedge csn) if (bytes.size() > 0) begin
    if (bytes[0] == 8'h20 && bytes.size() == 2) begin
      config_reg = bytes[1];
      config_writes++;
    end else if (bytes[0] == 8'h27 && bytes.size() == 2) begin
      if (bytes[1][5]) begin
        status_reg[5] = 1'b0;
        status_clears++;
      end
    end else if (bytes[0] == 8'hA0) begin
      cur_payload.delete();
      for (int i = 1; i < bytes.size(); i++) cur_payload.push_back(bytes[i]);
      payloads.push_back(cur_payload);
      payload_loaded = 1'b1;
    end
  end

  always @(posedge clk) begin
    // transmission
    if (ce) ce_cycles++;
    else if (ce_cycles > 0) begin
      if (payload_loaded && config_reg[1]) tx_timer = TX_DELAY;
      ce_cycles = 0;
    end
    if (tx_timer > 0) tx_timer--;
    else if (tx_timer == 0) begin
      status_reg[5] = 1'b1;
      payload_loaded = 1'b0;
      tx_timer = -1;
    end
  end
endmodule
