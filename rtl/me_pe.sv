// Motion-estimation processing element: one candidate motion vector.
// Each clock with en high it forms the absolute difference of the reference
// pixel and its search pixel (a subtraction and a sign comparison) and adds it
// to a SAD_W-bit accumulator; clr restarts the sum with the current
// difference. sad is registered (valid one clock after the last en). The
// 10-bit difference and 19-bit accumulation follow the source.
module me_pe #(
  parameter int unsigned PIX_W = 10,
  parameter int unsigned SAD_W = 19
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             en,
  input  logic [PIX_W-1:0] cur,
  input  logic [PIX_W-1:0] srch,
  output logic [SAD_W-1:0] sad
);
  logic [PIX_W-1:0] absdiff;
  assign absdiff = (cur >= srch) ? cur - srch : srch - cur;

  always_ff @(posedge clk) begin
    if (en) sad <= (clr ? '0 : sad) + SAD_W'(absdiff);
  end
endmodule
