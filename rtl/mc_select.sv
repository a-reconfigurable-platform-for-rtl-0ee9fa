// Motion-compensation source selection.
// For each block, the forward and backward motion estimators each deliver a
// vector and its SAD. The candidate with the smaller SAD (the block most like
// the current one) is used; on a scene cut one image gives large SADs
// everywhere, so all blocks come from the image of the same scene. Ties take
// the previous image (this design's choice). Registered, one clock latency.
module mc_select #(
  parameter int unsigned SAD_W = 19,
  parameter int unsigned VW    = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [SAD_W-1:0]     sad_prev,
  input  logic [SAD_W-1:0]     sad_next,
  input  logic signed [VW-1:0] mvx_prev, mvy_prev,
  input  logic signed [VW-1:0] mvx_next, mvy_next,
  output logic                 out_valid,
  output logic                 sel_next,
  output logic signed [VW-1:0] mv_x, mv_y,
  output logic [SAD_W-1:0]     sad
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; sel_next <= 1'b0; mv_x <= '0; mv_y <= '0; sad <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sel_next <= sad_next < sad_prev;
        mv_x <= (sad_next < sad_prev) ? mvx_next : mvx_prev;
        mv_y <= (sad_next < sad_prev) ? mvy_next : mvy_prev;
        sad  <= (sad_next < sad_prev) ? sad_next : sad_prev;
      end
    end
  end
endmodule
