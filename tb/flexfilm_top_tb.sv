// End-to-end testbench of flexfilm_top at a reduced image size (16 x 8) so
// that several frames and all mechanisms run in seconds. See top_tb_body.svh
// for the test sequence.
module flexfilm_top_tb;
  localparam int W = 16, H = 8, NFR = 3, QOS_CYCLES = 6000;
`include "top_tb_body.svh"
  flexfilm_top #(.IMG_W(W), .IMG_H(H)) dut (.*);
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
