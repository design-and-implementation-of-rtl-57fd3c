// tb_threshold_sweep: runs content_aware_processor, with all its default
// parameters, through the five threshold settings of the evaluation: block
// threshold 0 (every block encoded, the same output as no preprocessing), then
// edge/block thresholds 200/2, 200/5, 100/5 and 100/10. Each setting is loaded
// through the configuration interrupt before its own 192-block frame, after a
// first frame at the reset setting. Every decision and every radio payload is
// checked against the reference model; see tb_cap_harness. A second
// watchdog here ends the run if the harness's own never fires.
`timescale 1ns/1ps
module tb_threshold_sweep;
  tb_cap_harness #(.BPF(192), .NFRAMES(6), .FULL(1), .SWEEP(1)) h ();

  // outer watchdog, behind the harness's own
  initial begin
    #450ms;
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures + 1);
    $finish;
  end
endmodule
