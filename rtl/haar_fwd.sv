// Temporal Haar filter between the current image (a) and the motion-
// compensated image (b), integer and lossless (S-transform):
//   h = a - b,  l = b + floor(h / 2)
// l is the temporal low band (about the mean), h the high band. One clock
// latency. The Haar step follows the source; the lossless integer form is
// this design's choice so that the inverse restores the image exactly.
module haar_fwd #(
  parameter int unsigned W = 10
) (
  input  logic                clk,
  input  logic                in_valid,
  input  logic [W-1:0]        a,
  input  logic [W-1:0]        b,
  output logic                out_valid,
  output logic signed [W:0]   l,
  output logic signed [W:0]   h
);
  logic signed [W:0] hd;
  assign hd = $signed({1'b0, a}) - $signed({1'b0, b});

  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    h <= hd;
    l <= $signed({1'b0, b}) + (hd >>> 1);
  end
endmodule
