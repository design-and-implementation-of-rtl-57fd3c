// preprocessor: decides whether an 8x8 block has to be encoded.
//
// For each block it (1) loads the block's edge map of the previous frame from
// the edge SRAM into the previous frame edge buffer, (2) runs the Sobel edge
// detector over the block in buffer 2, (3) XORs every new edge bit with the
// previous one (frame differencing) and counts the changed pixels in the
// accumulator, (4) writes the new edge map back to the SRAM, and (5) reports
// keep = (changed pixels >= blk_thr) with a one-cycle `done`.
//
// Timing per block (ce high throughout): start in cycle 0, edge map load
// 4 cycles, 240 pixel loads + 1 for the edge detector, 1 cycle to the
// decision, 2 SRAM write cycles and the done cycle: 250 cycles in all
// (247 in the first frame, which has no edge map to load).
// `busy` covers the whole sequence including the done cycle, so the caller
// can derive the block-level clock enable from start | busy.
//
// The sequence of operations follows the pipeline of the thesis; the
// handshakes and the exact cycle counts are this design's.
module preprocessor
  import cam_pkg::*;
#(
  parameter int ADDR_W = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  logic              start,
  input  logic [ADDR_W-2:0] blk_idx,
  input  logic              first_frame,
  input  edge_thr_t         edge_thr,
  input  blk_thr_t          blk_thr,
  // buffer 2 read port
  output pix_addr_t         pix_addr,
  input  pixel_t            pix_data,
  // edge SRAM port
  output logic              sram_cs_n,
  output logic              sram_we,
  output logic [ADDR_W-1:0] sram_addr,
  output logic [31:0]       sram_wdata,
  input  logic [31:0]       sram_rdata,
  // result
  output logic              busy,
  output logic              done,
  output logic              keep,
  output logic [SUM_W-1:0]  change_sum
);
  typedef enum logic [2:0] {P_IDLE, P_LOAD, P_EDGE, P_STORE, P_DONE} state_t;
  state_t state;

  logic load_req, load_done, store_req, store_done;
  logic ed_start, ed_busy, ed_done, edge_bit, edge_valid;
  logic prev_bit, diff, diff_valid;
  logic acc_clear, decision_valid, acc_keep;

  assign load_req  = (state == P_IDLE) && start;
  assign acc_clear = load_req;
  assign ed_start  = (state == P_LOAD) && load_done;
  assign store_req = (state == P_EDGE) && decision_valid;
  assign busy      = (state != P_IDLE);
  assign done      = (state == P_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= P_IDLE;
      keep  <= 1'b0;
    end else if (ce) begin
      unique case (state)
        P_IDLE:  if (start) state <= P_LOAD;
        P_LOAD:  if (load_done) state <= P_EDGE;
        P_EDGE:  if (decision_valid) begin
          keep  <= acc_keep;
          state <= P_STORE;
        end
        P_STORE: if (store_done) state <= P_DONE;
        P_DONE:  state <= P_IDLE;
        default: state <= P_IDLE;
      endcase
    end
  end

  edge_detector u_ed (
    .clk, .rst_n, .ce,
    .start(ed_start), .edge_thr,
    .pix_addr, .pix_data,
    .edge_bit, .edge_valid, .busy(ed_busy), .done(ed_done)
  );

  edge_map_buffers #(.ADDR_W(ADDR_W)) u_emb (
    .clk, .rst_n, .ce,
    .blk_idx, .first_frame,
    .load_req, .load_done, .store_req, .store_done,
    .edge_bit, .edge_valid, .prev_bit,
    .sram_cs_n, .sram_we, .sram_addr, .sram_wdata, .sram_rdata
  );

  frame_differencer u_fd (
    .cur_edge(edge_bit), .prev_edge(prev_bit), .in_valid(edge_valid),
    .diff, .diff_valid
  );

  accumulator_thresholder u_acc (
    .clk, .rst_n, .ce,
    .clear(acc_clear), .in_bit(diff), .in_valid(diff_valid), .blk_thr,
    .sum(change_sum), .decision_valid, .keep(acc_keep)
  );

  // the edge detector's own status is implied by the sequence above
  logic unused_ed;
  assign unused_ed = ed_busy ^ ed_done;
endmodule
