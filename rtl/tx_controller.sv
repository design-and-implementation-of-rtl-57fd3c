// tx_controller: drives an nRF24L01+ 2.4 GHz transceiver over SPI and sends
// each 256-bit payload of the TX FIFO as one 32-byte radio packet.
//
// States (transmitter clock domain):
//   CONFIG  - after reset, write CONFIG = 0x0A (CRC on, power up, PTX mode)
//   PWRUP   - wait POWERUP_CYCLES for the radio to power up (1.5 ms)
//   SLEEP   - idle until the FIFO holds a complete payload
//   STANDBY - W_TX_PAYLOAD (0xA0) followed by the 32 payload bytes, byte 0 =
//             payload bits [7:0]; then the payload is popped from the FIFO
//   TX      - pulse CE high for CE_HIGH_CYCLES to start the transmission and
//             wait for the IRQ pin (active low, "data sent")
//   ACK     - write STATUS = 0x20 to clear the data-sent flag (releases IRQ)
// then back to SLEEP.
//
// SPI is mode 0, MSB first: MOSI changes while SCK is low, the radio samples
// on the rising edge, one bit every 2 clock cycles, CSN low for a whole
// command. With the default 4 MHz clock SCK runs at 2 MHz and loading a
// payload (33 bytes) takes 528 cycles = 132 us. The STATUS byte the radio
// shifts out during every command byte 0 is kept in nrf_status.
//
// The CONFIG/SLEEP/STANDBY/TX sequence, the CONFIG write, the 1.5 ms power-up
// time and the 32-byte payload come from the thesis. The clock frequency, the
// command and register values (from the radio's data sheet), the CE pulse
// length and the ACK state that clears the interrupt are this design's.
module tx_controller
  import cam_pkg::*;
#(
  parameter int PAYLOAD_W      = 256,
  parameter int POWERUP_CYCLES = 6000,  // 1.5 ms at 4 MHz
  parameter int CE_HIGH_CYCLES = 60     // 15 us at 4 MHz (radio needs > 10 us)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // TX FIFO read side
  input  logic                 fifo_empty,
  input  logic [PAYLOAD_W-1:0] fifo_rdata,
  output logic                 fifo_rd_en,
  // nRF24L01+ pins
  output logic                 spi_csn,
  output logic                 spi_sck,
  output logic                 spi_mosi,
  input  logic                 spi_miso,
  output logic                 nrf_ce,
  input  logic                 nrf_irq_n,
  // status
  output logic [7:0]           nrf_status,
  output logic [15:0]          payloads_sent,
  output logic                 in_sleep
);
  localparam int NBYTES = PAYLOAD_W / 8;
  // nRF24L01+ SPI command bytes and register values (from the radio's data sheet)
  localparam logic [7:0] NRF_W_REGISTER   = 8'h20;  // OR'ed with register number
  localparam logic [7:0] NRF_W_TX_PAYLOAD = 8'hA0;
  localparam logic [4:0] NRF_REG_CONFIG   = 5'h00;
  localparam logic [4:0] NRF_REG_STATUS   = 5'h07;
  localparam logic [7:0] NRF_CONFIG_PTX   = 8'h0A;  // EN_CRC | PWR_UP, PRIM_RX = 0
  localparam logic [7:0] NRF_STATUS_TX_DS = 8'h20;  // write 1 to clear TX_DS
  localparam int CNT_W  = $clog2((POWERUP_CYCLES > CE_HIGH_CYCLES ? POWERUP_CYCLES
                                                                  : CE_HIGH_CYCLES) + 1);
  typedef enum logic [2:0] {T_CONFIG, T_PWRUP, T_SLEEP, T_STANDBY, T_TX, T_ACK} state_t;

  state_t     state;
  logic [CNT_W-1:0] cnt;
  logic       launched;     // SPI command of this state already started

  // ---------------- SPI byte engine ----------------
  logic       spi_busy, spi_go, spi_done;
  logic [5:0] byte_idx, last_idx;
  logic [2:0] bit_idx;
  logic [7:0] rx_shift;

  function automatic logic [7:0] tx_byte(input state_t st, input logic [5:0] idx,
                                         input logic [PAYLOAD_W-1:0] pl);
    unique case (st)
      T_CONFIG:  return (idx == 0) ? (NRF_W_REGISTER | 8'(NRF_REG_CONFIG)) : NRF_CONFIG_PTX;
      T_ACK:     return (idx == 0) ? (NRF_W_REGISTER | 8'(NRF_REG_STATUS)) : NRF_STATUS_TX_DS;
      T_STANDBY: return (idx == 0) ? NRF_W_TX_PAYLOAD : pl[(32'(idx) - 1) * 8 +: 8];
      default:   return 8'h00;
    endcase
  endfunction

  assign last_idx = (state == T_STANDBY) ? 6'(NBYTES) : 6'd1;
  assign spi_go   = !launched && !spi_busy &&
                    (state == T_CONFIG || state == T_STANDBY || state == T_ACK);

  logic [7:0] cur_byte;
  assign cur_byte = tx_byte(state, byte_idx, fifo_rdata);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spi_busy   <= 1'b0;
      spi_csn    <= 1'b1;
      spi_sck    <= 1'b0;
      spi_mosi   <= 1'b0;
      spi_done   <= 1'b0;
      byte_idx   <= '0;
      bit_idx    <= '0;
      rx_shift   <= '0;
      nrf_status <= '0;
    end else begin
      spi_done <= 1'b0;
      if (!spi_busy) begin
        if (spi_go) begin
          spi_busy <= 1'b1;
          spi_csn  <= 1'b0;
          byte_idx <= '0;
          bit_idx  <= '0;
          spi_mosi <= tx_byte(state, 6'd0, fifo_rdata)[7];
        end
      end else if (!spi_sck) begin
        spi_sck  <= 1'b1;                          // radio samples MOSI
        rx_shift <= {rx_shift[6:0], spi_miso};
      end else begin
        spi_sck <= 1'b0;
        if (bit_idx == 3'd7) begin
          if (byte_idx == 6'd0) nrf_status <= rx_shift;
          if (byte_idx == last_idx) begin
            spi_busy <= 1'b0;
            spi_csn  <= 1'b1;
            spi_done <= 1'b1;
          end else begin
            byte_idx <= byte_idx + 6'd1;
            bit_idx  <= '0;
            spi_mosi <= tx_byte(state, byte_idx + 6'd1, fifo_rdata)[7];
          end
        end else begin
          bit_idx  <= bit_idx + 3'd1;
          spi_mosi <= cur_byte[3'd6 - bit_idx];
        end
      end
    end
  end

  // ---------------- control state machine ----------------
  assign fifo_rd_en = (state == T_STANDBY) && spi_done;
  assign in_sleep   = (state == T_SLEEP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= T_CONFIG;
      launched      <= 1'b0;
      cnt           <= '0;
      nrf_ce        <= 1'b0;
      payloads_sent <= '0;
    end else begin
      if (spi_go) launched <= 1'b1;
      unique case (state)
        T_CONFIG: if (spi_done) begin
          state    <= T_PWRUP;
          launched <= 1'b0;
          cnt      <= '0;
        end
        T_PWRUP: begin
          cnt <= cnt + 1'b1;
          if (cnt == CNT_W'(POWERUP_CYCLES - 1)) state <= T_SLEEP;
        end
        T_SLEEP: if (!fifo_empty) state <= T_STANDBY;
        T_STANDBY: if (spi_done) begin
          state    <= T_TX;
          launched <= 1'b0;
          cnt      <= '0;
          nrf_ce   <= 1'b1;
        end
        T_TX: begin
          if (cnt != CNT_W'(CE_HIGH_CYCLES)) cnt <= cnt + 1'b1;
          else nrf_ce <= 1'b0;
          if (!nrf_ce && !nrf_irq_n) state <= T_ACK;
        end
        T_ACK: if (spi_done) begin
          state         <= T_SLEEP;
          launched      <= 1'b0;
          payloads_sent <= payloads_sent + 16'd1;
        end
        default: state <= T_CONFIG;
      endcase
    end
  end
endmodule
