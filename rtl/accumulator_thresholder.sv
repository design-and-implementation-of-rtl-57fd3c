// accumulator_thresholder: counts the changed edge pixels of one block and
// decides whether the block carries information.
//
// `clear` starts a block. Each cycle with in_valid adds in_bit to the sum;
// with the 64th valid bit the decision is registered: decision_valid pulses
// for one cycle the cycle after, with keep = (sum >= blk_thr) and the final
// sum. A block threshold of 0 therefore keeps every block.
// Counting over the 64 pixels and thresholding follow the thesis; the '>='
// comparison is this design's choice.
module accumulator_thresholder
  import cam_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     ce,
  input  logic     clear,          // start of a new block
  input  logic     in_bit,
  input  logic     in_valid,
  input  blk_thr_t blk_thr,
  output logic [SUM_W-1:0] sum,    // changed pixels so far / of the block
  output logic     decision_valid, // one-cycle pulse
  output logic     keep            // block is to be encoded
);
  logic [5:0] cnt;                 // pixels seen, modulo 64

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum            <= '0;
      cnt            <= '0;
      decision_valid <= 1'b0;
      keep           <= 1'b0;
    end else if (ce) begin
      decision_valid <= 1'b0;
      if (clear) begin
        sum <= '0;
        cnt <= '0;
      end else if (in_valid) begin
        sum <= sum + SUM_W'(in_bit);
        cnt <= cnt + 6'd1;
        if (cnt == 6'd63) begin
          decision_valid <= 1'b1;
          keep           <= (sum + SUM_W'(in_bit)) >= blk_thr;
        end
      end
    end
  end
endmodule
