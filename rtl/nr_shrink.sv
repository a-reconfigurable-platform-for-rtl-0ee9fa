// Noise-reduction coefficient filter (coring).
// A wavelet detail coefficient whose magnitude is below the programmable
// threshold is treated as noise and set to zero; larger ones pass unchanged.
// Combinational. The source states only that the wavelet bands are filtered
// with user-selectable parameters; hard thresholding is this design's choice.
module nr_shrink #(
  parameter int unsigned W = 14
) (
  input  logic signed [W-1:0] c,
  input  logic        [W-2:0] thr,
  output logic signed [W-1:0] y
);
  logic [W-1:0] mag;
  assign mag = c[W-1] ? W'(-c) : W'(c);
  assign y   = (mag < W'(thr)) ? '0 : c;
endmodule
