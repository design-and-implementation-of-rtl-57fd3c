// tb_content_aware_processor_full: end-to-end test of content_aware_processor
// with all its default parameters: 4 frames of 192 blocks (12288-byte
// frames), 1.5 ms radio power-up. See tb_cap_harness.
`timescale 1ns/1ps
module tb_content_aware_processor_full;
  tb_cap_harness #(.BPF(192), .NFRAMES(4), .FULL(1)) h ();
endmodule
