// Forward 5/3 wavelet transform along one direction, integer and reversible.
//   d[n] = x[2n+1] - floor((x[2n] + x[2n+2]) / 2)
//   s[n] = x[2n]   + floor((d[n-1] + d[n] + 2) / 4)
// with symmetric extension at both ends of each line (x[-1] = x[1],
// x[LEN] = x[LEN-2], hence d[-1] = d[0]), which is what makes the transform
// invertible on a finite image.
//
// NCOL = 1: samples of one line arrive in order, one per in_valid; after each
// even sample x[2n+2] (n >= 0) and after the last sample, the pair (s[n], d[n])
// leaves one clock later. NCOL > 1: the filter runs down the columns of a
// row-major image NCOL samples wide; every per-line register becomes a line
// memory of NCOL words and the pair (s[n], d[n]) of each column leaves while
// row 2n+2 (or the last row) streams in. LEN is the line length along the
// filtered direction (even). Inputs and outputs are signed.
//
// The 5/3 kernel, symmetric extension and shift-add arithmetic follow the
// source; the lifting form and the line-memory scheme are this design's.
module dwt53_fwd #(
  parameter int unsigned IW   = 12,
  parameter int unsigned OW   = 14,
  parameter int unsigned LEN  = 2048,
  parameter int unsigned NCOL = 1,
  localparam int unsigned PW  = $clog2(LEN),
  localparam int unsigned CW  = (NCOL > 1) ? $clog2(NCOL) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_x,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_s,
  output logic signed [OW-1:0] out_d
);
  logic signed [OW-1:0] xa_m [NCOL];   // last even sample x[2n]
  logic signed [OW-1:0] xo_m [NCOL];   // last odd sample x[2n+1]
  logic signed [OW-1:0] dp_m [NCOL];   // previous detail d[n-1]
  logic [PW-1:0] pos_q;
  logic [CW-1:0] col_q;

  logic signed [OW-1:0] x, xa, xo, dp, d, dprev, s;
  logic                 odd, last, emit;

  assign x    = OW'(in_x);
  assign xa   = xa_m[col_q];
  assign xo   = xo_m[col_q];
  assign dp   = dp_m[col_q];
  assign odd  = pos_q[0];
  assign last = (pos_q == PW'(LEN - 1));
  assign emit = in_valid && ((!odd && pos_q != '0) || last);

  always_comb begin
    if (last) d = x - xa;                       // x[LEN] mirrors to x[LEN-2]
    else      d = xo - ((xa + x) >>> 1);
    dprev = (pos_q == PW'(2) || (last && LEN == 2)) ? d : dp;
    s = xa + ((dprev + d + OW'(2)) >>> 2);
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      if (!odd) xa_m[col_q] <= x;
      else      xo_m[col_q] <= x;
      if (emit) dp_m[col_q] <= d;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q <= '0; col_q <= '0; out_valid <= 1'b0; out_s <= '0; out_d <= '0;
    end else begin
      out_valid <= emit;
      if (emit) begin
        out_s <= s;
        out_d <= d;
      end
      if (in_valid) begin
        if (NCOL == 1 || col_q == CW'(NCOL - 1)) begin
          col_q <= '0;
          pos_q <= last ? '0 : pos_q + 1'b1;
        end else begin
          col_q <= col_q + 1'b1;
        end
      end
    end
  end
endmodule
