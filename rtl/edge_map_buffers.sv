// edge_map_buffers: the current and previous frame edge buffers (64 bits
// each) and the buffer controller that moves them to and from the edge SRAM.
//
// Previous frame buffer: load_req starts a load of block blk_idx. The
// controller reads SRAM words 2*blk_idx and 2*blk_idx+1 on two consecutive
// cycles (32 bits per cycle, word 0 = pixels 0..31, bit i = pixel i); the
// second word arrives one cycle later; load_done is high the cycle after it (4 cycles
// after load_req, 1 cycle in the first frame). In the first frame there is no previous edge map, so
// load_req with first_frame set fills the buffer with zeros instead, without
// touching the SRAM. The buffer then shifts one bit out per edge_valid: prev_bit
// is the previous-frame edge bit of the pixel whose edge bit is on edge_bit now.
//
// Current frame buffer: every edge_valid shifts edge_bit in; after 64 pixels
// bit i holds pixel i. store_req writes it back to the same two SRAM words in
// two cycles; store_done pulses in the second one.
//
// Buffer sizes, the 32-bit SRAM path and the two-cycle transfers follow the
// thesis; the word order, zero previous map in the first frame and handshake
// pulses are this design's choices.
module edge_map_buffers
  import cam_pkg::*;
#(
  parameter int ADDR_W = 9    // SRAM word address width
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  logic [ADDR_W-2:0] blk_idx,     // block number within the frame
  input  logic              first_frame, // no previous edge map yet
  input  logic              load_req,
  output logic              load_done,
  input  logic              store_req,
  output logic              store_done,
  // edge stream
  input  logic              edge_bit,
  input  logic              edge_valid,
  output logic              prev_bit,
  // SRAM port
  output logic              sram_cs_n,
  output logic              sram_we,
  output logic [ADDR_W-1:0] sram_addr,
  output logic [31:0]       sram_wdata,
  input  logic [31:0]       sram_rdata
);
  typedef enum logic [2:0] {S_IDLE, S_RD0, S_RD1, S_RD2, S_WR0, S_WR1} state_t;

  state_t      state;
  logic [63:0] prev_buf, cur_buf;

  assign prev_bit = prev_buf[0];

  always_comb begin
    sram_cs_n  = 1'b1;
    sram_we    = 1'b0;
    sram_addr  = {blk_idx, 1'b0};
    sram_wdata = cur_buf[31:0];
    unique case (state)
      S_RD0: sram_cs_n = 1'b0;
      S_RD1: begin sram_cs_n = 1'b0; sram_addr = {blk_idx, 1'b1}; end
      S_WR0: begin sram_cs_n = 1'b0; sram_we = 1'b1; end
      S_WR1: begin
        sram_cs_n  = 1'b0;
        sram_we    = 1'b1;
        sram_addr  = {blk_idx, 1'b1};
        sram_wdata = cur_buf[63:32];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      load_done <= 1'b0;
      prev_buf  <= '0;
      cur_buf   <= '0;
    end else if (ce) begin
      load_done <= 1'b0;
      if (edge_valid) begin
        cur_buf  <= {edge_bit, cur_buf[63:1]};
        prev_buf <= {1'b0, prev_buf[63:1]};
      end
      unique case (state)
        S_IDLE: begin
          if (load_req) begin
            if (first_frame) begin
              prev_buf  <= '0;
              load_done <= 1'b1;
            end else state <= S_RD0;
          end else if (store_req) state <= S_WR0;
        end
        S_RD0: state <= S_RD1;                 // word 0 addressed
        S_RD1: begin                           // word 1 addressed, word 0 back
          prev_buf[31:0] <= sram_rdata;
          state          <= S_RD2;
        end
        S_RD2: begin                           // word 1 back
          prev_buf[63:32] <= sram_rdata;
          load_done       <= 1'b1;
          state           <= S_IDLE;
        end
        S_WR0: state <= S_WR1;
        S_WR1: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign store_done = (state == S_WR1);
endmodule
