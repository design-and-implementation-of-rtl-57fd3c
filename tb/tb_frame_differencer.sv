// tb_frame_differencer: exhaustive check of the XOR frame differencer.
`timescale 1ns/1ps
module tb_frame_differencer;
  logic cur, prev, v, diff, diff_valid;
  int checks = 0, failures = 0;

  frame_differencer dut (.cur_edge(cur), .prev_edge(prev), .in_valid(v), .diff, .diff_valid);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {v, cur, prev} = 3'(i);
      #1;
      checks++;
      if (diff !== (cur != prev) || diff_valid !== v) begin
        failures++;
        $display("FAIL cur=%b prev=%b v=%b -> diff=%b valid=%b", cur, prev, v, diff, diff_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
