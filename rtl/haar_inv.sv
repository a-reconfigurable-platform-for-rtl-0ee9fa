// Inverse temporal Haar filter (inverse of haar_fwd):
//   b = l - floor(h / 2),  a = h + b
// Inputs may be wider than the forward outputs (filtered bands). The result
// is clipped to the pixel range 0 .. 2^W-1. One clock latency.
module haar_inv #(
  parameter int unsigned W  = 10,
  parameter int unsigned IW = W + 1
) (
  input  logic                 clk,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] l,
  input  logic signed [IW-1:0] h,
  output logic                 out_valid,
  output logic [W-1:0]         a,
  output logic [W-1:0]         b
);
  logic signed [IW+1:0] bb, aa;
  assign bb = (IW+2)'(l) - (IW+2)'(h >>> 1);
  assign aa = (IW+2)'(h) + bb;

  function automatic logic [W-1:0] clip(input logic signed [IW+1:0] v);
    if (v < 0) return '0;
    if (v > (IW+2)'((1 << W) - 1)) return '1;
    return v[W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    a <= clip(aa);
    b <= clip(bb);
  end
endmodule
