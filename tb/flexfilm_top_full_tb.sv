// Full-size testbench of flexfilm_top: all parameters at their defaults
// (2048 x 2048 images). One complete frame goes through the TDMA link and the
// noise reducer and must come out unchanged with zero thresholds; the other
// steps are those of top_tb_body.svh (motion estimation, a coring frame,
// memory QoS).
module flexfilm_top_full_tb;
  localparam int W = 2048, H = 2048, NFR = 1, QOS_CYCLES = 6000;
`include "top_tb_body.svh"
  flexfilm_top dut (.*);
  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
