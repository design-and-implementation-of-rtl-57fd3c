// tb_accumulator_thresholder: feeds random 64-bit change maps with gaps in
// the valid strobe and checks the final count and the keep decision
// (keep = count >= threshold) against a software count, including the
// boundary cases count == threshold and threshold 0.
`timescale 1ns/1ps
module tb_accumulator_thresholder;
  import cam_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, ce = 1, clear = 0, in_bit = 0, in_valid = 0;
  blk_thr_t thr;
  logic [SUM_W-1:0] sum;
  logic decision_valid, keep;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  accumulator_thresholder dut (.clk, .rst_n, .ce, .clear, .in_bit, .in_valid,
                               .blk_thr(thr), .sum, .decision_valid, .keep);

  task automatic run(input logic [63:0] m, input int t);
    int exp = popcount64(m), ndec = 0;
    thr = blk_thr_t'(t);
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int i = 0; i < 64; i++) begin
      while ($urandom_range(0, 2) == 0) begin
        in_valid = 0; in_bit = 1;
        @(negedge clk);
        if (decision_valid) ndec++;
      end
      in_valid = 1; in_bit = m[i];
      @(negedge clk);
      if (decision_valid) ndec++;
    end
    in_valid = 0;
    checks++;
    if (!decision_valid || ndec != 1 || int'(sum) != exp || keep != (exp >= t)) begin
      failures++;
      $display("FAIL map=%h thr=%0d: dv=%b early=%0d sum=%0d exp=%0d keep=%b", m, t,
               decision_valid, ndec, sum, exp, keep);
    end
    @(negedge clk);
    checks++;
    if (decision_valid) begin failures++; $display("FAIL decision_valid longer than a cycle"); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    thr = 5;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(64'h0, 0);
    run(64'h0, 1);
    run(64'h1F, 5);
    run(64'hF, 5);
    run('1, 64);
    run('1, 65);
    for (int k = 0; k < 30; k++) begin
      automatic logic [63:0] m = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      run(m, int'($urandom_range(0, 16)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
