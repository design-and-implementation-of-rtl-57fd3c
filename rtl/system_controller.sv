// system_controller: configuration registers, block sequencing and clock
// gating of the content-aware processor.
//
// Configuration: the edge threshold, block threshold and JPEG quality factor
// live in registers. A synchronous interrupt (cfg_irq high for a cycle) loads
// them from the external interrupt register (cfg_*), so a supervisor can make
// the content selection stricter or looser as channel conditions change.
//
// Sequencing: when buffer 2 holds a block, the preprocessor is started on it
// with the block number and a first-frame flag. When it reports
//   keep = 1: the JPEG address generator streams the block to the encoder and
//             buffer 2 is released with its last pixel;
//   keep = 0: buffer 2 is released at once and enc_empty_blk pulses, telling
//             the encoder to insert the code of an empty block instead of
//             encoding it.
// The block counter wraps after BLOCKS_PER_FRAME blocks, which ends a frame;
// first_frame is high during the first frame after reset (no previous edge
// map exists yet).
//
// Clock gating, realised as clock enables: when the TX FIFO is full, sys_ce
// and enc_ce go low and the whole system except the transmitter stops
// (nothing is lost); pre_ce is in addition low whenever the preprocessor has
// no block to work on (block-level gating).
//
// Register set, interrupt update, FIFO-full gating, block-level gating and
// the empty-block signal follow the thesis. Register reset values (edge
// threshold 100, block threshold 5, QF 50 - one of the settings the thesis
// evaluates), the use of clock enables instead of gated clocks and the
// handshakes are this design's.
module system_controller
  import cam_pkg::*;
#(
  parameter int        BLOCKS_PER_FRAME = 192,
  parameter int        IDX_W            = 8,
  parameter edge_thr_t EDGE_THR_RST     = 11'd100,
  parameter blk_thr_t  BLK_THR_RST      = 7'd5,
  parameter qf_t       QF_RST           = 7'd50
) (
  input  logic             clk,
  input  logic             rst_n,
  // external interrupt register
  input  logic             cfg_irq,
  input  edge_thr_t        cfg_edge_thr,
  input  blk_thr_t         cfg_blk_thr,
  input  qf_t              cfg_qf,
  output edge_thr_t        edge_thr,
  output blk_thr_t         blk_thr,
  output qf_t              qf,
  // TX FIFO
  input  logic             fifo_full,
  // block buffers
  input  logic             b2_full,
  output logic             b2_release,
  // preprocessor
  output logic             pre_start,
  input  logic             pre_busy,
  input  logic             pre_done,
  input  logic             pre_keep,
  output logic [IDX_W-1:0] blk_idx,
  output logic             first_frame,
  // JPEG address generator and encoder
  output logic             feed_start,
  input  logic             feed_done,
  output logic             enc_empty_blk,
  // clock enables
  output logic             sys_ce,
  output logic             pre_ce,
  output logic             enc_ce,
  output logic             frame_end     // pulse with the last block of a frame
);
  typedef enum logic [1:0] {C_WAIT, C_PRE, C_FEED} state_t;
  state_t state;
  logic   blk_end;

  assign sys_ce = !fifo_full;
  assign enc_ce = !fifo_full;
  assign pre_ce = sys_ce && (pre_start || pre_busy);

  assign pre_start     = sys_ce && (state == C_WAIT) && b2_full;
  assign feed_start    = sys_ce && (state == C_PRE) && pre_done && pre_keep;
  assign enc_empty_blk = sys_ce && (state == C_PRE) && pre_done && !pre_keep;
  assign b2_release    = enc_empty_blk || (sys_ce && (state == C_FEED) && feed_done);
  assign blk_end       = b2_release;
  assign frame_end     = blk_end && (blk_idx == IDX_W'(BLOCKS_PER_FRAME - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      edge_thr <= EDGE_THR_RST;
      blk_thr  <= BLK_THR_RST;
      qf       <= QF_RST;
    end else if (cfg_irq) begin
      edge_thr <= cfg_edge_thr;
      blk_thr  <= cfg_blk_thr;
      qf       <= cfg_qf;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= C_WAIT;
      blk_idx     <= '0;
      first_frame <= 1'b1;
    end else if (sys_ce) begin
      unique case (state)
        C_WAIT: if (b2_full) state <= C_PRE;
        C_PRE:  if (pre_done) state <= pre_keep ? C_FEED : C_WAIT;
        C_FEED: if (feed_done) state <= C_WAIT;
        default: state <= C_WAIT;
      endcase
      if (blk_end) begin
        if (frame_end) begin
          blk_idx     <= '0;
          first_frame <= 1'b0;
        end else blk_idx <= blk_idx + 1'b1;
      end
    end
  end
endmodule
