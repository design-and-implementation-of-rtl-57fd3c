// tx_fifo: asynchronous FIFO between the JPEG encoder (32-bit packets, system
// clock) and the TX controller (256-bit radio payloads, transmitter clock).
//
// It holds two payload slots of 256 bits, written as 16 words of 32 bits.
// The write pointer has 5 bits (4 address bits + a wrap bit), the read
// pointer 2 bits (1 slot bit + a wrap bit). A payload becomes readable only
// once all 8 of its words are written:
//   empty = (wptr[4:3] == rptr)
//   full  = (wptr[4] != rptr[1]) && (wptr[3] == rptr[0])
// so `full` means both slots hold (part of) a payload the reader has not yet
// taken. rdata shows the whole oldest payload (word 0 in bits [31:0]) while
// empty is low; rd_en removes it.
//
// Pointer widths and the two conditions are those of the thesis. Because the
// two sides run on unrelated clocks, this design compares each side's own
// pointer with a copy of the other side's pointer that was Gray-coded,
// registered and passed through a two-flop synchronizer, so empty and full may
// be seen a few cycles late but never early. Writes while full and reads while
// empty are ignored (and flagged by assertions).
module tx_fifo #(
  parameter int WORD_W    = 32,
  parameter int PAYLOAD_W = 256
) (
  // write side (system clock)
  input  logic                 wclk,
  input  logic                 wrst_n,
  input  logic                 wr_en,
  input  logic [WORD_W-1:0]    wdata,
  output logic                 full,
  // read side (transmitter clock)
  input  logic                 rclk,
  input  logic                 rrst_n,
  input  logic                 rd_en,
  output logic [PAYLOAD_W-1:0] rdata,
  output logic                 empty
);
  localparam int WORDS  = PAYLOAD_W / WORD_W;     // words per payload
  localparam int WOFF_W = $clog2(WORDS);          // word offset bits
  localparam int WPTR_W = WOFF_W + 2;             // slot bit + wrap bit

  logic [WORD_W-1:0] mem [2*WORDS];
  logic [WPTR_W-1:0] wptr;
  logic [1:0]        rptr;

  function automatic logic [1:0] to_gray(input logic [1:0] b);
    return {b[1], b[1] ^ b[0]};
  endfunction
  function automatic logic [1:0] from_gray(input logic [1:0] g);
    return {g[1], g[1] ^ g[0]};
  endfunction

  logic [1:0] wgray, rgray;                      // registered Gray pointers

  // ---------------- write side ----------------
  logic [1:0] rgray_s1, rgray_s2, rptr_w;
  logic [WPTR_W-1:0] wptr_nxt;

  assign rptr_w   = from_gray(rgray_s2);
  assign full     = (wptr[WPTR_W-1] != rptr_w[1]) && (wptr[WPTR_W-2] == rptr_w[0]);
  assign wptr_nxt = wptr + WPTR_W'(wr_en && !full);

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wptr     <= '0;
      wgray    <= '0;
      rgray_s1 <= '0;
      rgray_s2 <= '0;
    end else begin
      wptr     <= wptr_nxt;
      wgray    <= to_gray(wptr_nxt[WPTR_W-1 -: 2]);
      rgray_s1 <= rgray;
      rgray_s2 <= rgray_s1;
    end
  end

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wptr[WPTR_W-2:0]] <= wdata;
  end

  // ---------------- read side ----------------
  logic [1:0] wgray_s1, wgray_s2, wslot_r, rptr_nxt;

  assign wslot_r  = from_gray(wgray_s2);
  assign empty    = (wslot_r == rptr);
  assign rptr_nxt = rptr + 2'(rd_en && !empty);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rptr     <= '0;
      rgray    <= '0;
      wgray_s1 <= '0;
      wgray_s2 <= '0;
    end else begin
      rptr     <= rptr_nxt;
      rgray    <= to_gray(rptr_nxt);
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
    end
  end

  always_comb begin
    for (int i = 0; i < WORDS; i++)
      rdata[i*WORD_W +: WORD_W] = mem[{rptr[0], WOFF_W'(i)}];
  end

  // ---------------- protocol checks ----------------
  a_no_write_when_full: assert property (@(posedge wclk) disable iff (!wrst_n) !(wr_en && full))
    else $error("tx_fifo: write while full, word dropped");
  a_no_read_when_empty: assert property (@(posedge rclk) disable iff (!rrst_n) !(rd_en && empty))
    else $error("tx_fifo: read while empty");
endmodule
