// frame_differencer: marks a pixel as changed when its edge bit differs from
// the edge bit of the same pixel in the previous frame (a single XOR). The
// valid strobe passes through; the unit is combinational and adds no latency.
// Entirely as described in the thesis.
module frame_differencer (
  input  logic cur_edge,   // edge bit from the edge detector
  input  logic prev_edge,  // edge bit from the previous frame edge buffer
  input  logic in_valid,
  output logic diff,       // 1: edge appeared or disappeared
  output logic diff_valid
);
  assign diff       = cur_edge ^ prev_edge;
  assign diff_valid = in_valid;
endmodule
