// tb_content_aware_processor: end-to-end test at reduced size: frames of 9
// blocks, 4 frames, a short radio power-up time. See tb_cap_harness.
`timescale 1ns/1ps
module tb_content_aware_processor;
  tb_cap_harness #(.BPF(9), .NFRAMES(4), .FULL(0)) h ();
endmodule
