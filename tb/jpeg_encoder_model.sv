// jpeg_encoder_model: stand-in for the JPEG encoder in system testbenches.
// It does not compress: for every block streamed in it emits two 32-bit
// words, {16'hB10C, block sequence number} and the 32-bit sum of the 64
// pixels; for every empty-block request it emits one word
// {16'hE000, block sequence number}. Words leave one per cycle, only in
// cycles where ce is high, as the real encoder's output would.
module jpeg_encoder_model (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic [7:0]  pix,
  input  logic        pix_valid,
  input  logic        empty_blk,
  output logic [31:0] word,
  output logic        word_valid
);
  logic [31:0] q [$];
  logic [31:0] sum;
  int          npix;
  logic [15:0] seq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q.delete();
      sum        <= '0;
      npix       <= 0;
      seq        <= '0;
      word_valid <= 1'b0;
      word       <= '0;
    end else if (ce) begin
      word_valid <= 1'b0;
      if (q.size() > 0) begin
        word       <= q.pop_front();
        word_valid <= 1'b1;
      end
      if (pix_valid) begin
        if (npix == 63) begin
          q.push_back({16'hB10C, seq});
          q.push_back(sum + 32'(pix));
          seq  <= seq + 16'd1;
          sum  <= '0;
          npix <= 0;
        end else begin
          sum  <= sum + 32'(pix);
          npix <= npix + 1;
        end
      end
      if (empty_blk) begin
        q.push_back({16'hE000, seq});
        seq <= seq + 16'd1;
      end
    end
  end
endmodule
