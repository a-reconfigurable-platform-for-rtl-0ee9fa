// Inverse 5/3 wavelet transform along one direction (exact inverse of
// dwt53_fwd with the same symmetric extension).
//   x[2n]   = s[n] - floor((d[n-1] + d[n] + 2) / 4)
//   x[2n+1] = d[n] + floor((x[2n] + x[2n+2]) / 2)
// Input: one pair (s[n], d[n]) per in_valid, LEN/2 pairs per line; NCOL as in
// dwt53_fwd (NCOL > 1 runs down the columns of a row-major band NCOL wide).
// Output: two samples (x0 = x[2m], x1 = x[2m+1]) per out_valid, one clock
// after pair m+1 arrives. The last pair of a line completes two sample pairs;
// the second is kept per column and leaves either when that column's first
// pair of the next line arrives (which produces no output of its own) or,
// with no input, when 'flush' is high and a scan pointer, which starts at the
// next column due, reaches that column (so they leave in column order).
// The lifting form and the pending/flush scheme are this design's.
module dwt53_inv #(
  parameter int unsigned IW   = 14,
  parameter int unsigned OW   = 12,
  parameter int unsigned LEN  = 2048,
  parameter int unsigned NCOL = 1,
  localparam int unsigned NP  = LEN / 2,
  localparam int unsigned PW  = (NP > 1) ? $clog2(NP) : 1,
  localparam int unsigned CW  = (NCOL > 1) ? $clog2(NCOL) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_s,
  input  logic signed [IW-1:0] in_d,
  input  logic                 flush,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_x0,
  output logic signed [OW-1:0] out_x1
);
  logic signed [IW-1:0] xe_m [NCOL];   // x[2n-2], even sample of the previous pair
  logic signed [IW-1:0] dp_m [NCOL];   // d[n-1]
  logic                 pv_m [NCOL];   // a final sample pair is pending
  logic signed [OW-1:0] p0_m [NCOL];
  logic signed [OW-1:0] p1_m [NCOL];
  logic [PW-1:0] n_q;
  logic [CW-1:0] col_q, fptr_q;

  logic signed [IW-1:0] dprev, xe_new, xo_prev;
  logic                 first, last, fl_emit;

  assign first = (n_q == '0);
  assign last  = (n_q == PW'(NP - 1));

  always_comb begin
    dprev   = first ? in_d : dp_m[col_q];
    xe_new  = in_s - ((dprev + in_d + IW'(2)) >>> 2);
    xo_prev = dp_m[col_q] + ((xe_m[col_q] + xe_new) >>> 1);
  end

  assign fl_emit = !in_valid && flush && pv_m[fptr_q];

  always_ff @(posedge clk) begin
    if (in_valid) begin
      xe_m[col_q] <= xe_new;
      dp_m[col_q] <= in_d;
      if (last) begin
        p0_m[col_q] <= OW'(xe_new);
        p1_m[col_q] <= OW'(in_d + xe_new);   // x[LEN] mirrors to x[LEN-2]
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q <= '0; col_q <= '0; fptr_q <= '0;
      out_valid <= 1'b0; out_x0 <= '0; out_x1 <= '0;
      for (int c = 0; c < NCOL; c++) pv_m[c] <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (!first) begin
          out_valid <= 1'b1;
          out_x0 <= OW'(xe_m[col_q]);
          out_x1 <= OW'(xo_prev);
        end else if (pv_m[col_q]) begin
          out_valid <= 1'b1;
          out_x0 <= p0_m[col_q];
          out_x1 <= p1_m[col_q];
        end
        if (first) pv_m[col_q] <= 1'b0;
        if (last)  pv_m[col_q] <= 1'b1;
        if (NCOL == 1 || col_q == CW'(NCOL - 1)) begin
          col_q <= '0;
          n_q   <= last ? '0 : n_q + 1'b1;
        end else begin
          col_q <= col_q + 1'b1;
        end
      end else if (fl_emit) begin
        out_valid <= 1'b1;
        out_x0 <= p0_m[fptr_q];
        out_x1 <= p1_m[fptr_q];
        pv_m[fptr_q] <= 1'b0;
      end
      // the flush scan starts at the next column to arrive, so pending
      // pairs leave in column order
      if (in_valid)
        fptr_q <= (NCOL == 1 || col_q == CW'(NCOL - 1)) ? '0 : col_q + 1'b1;
      else if (flush)
        fptr_q <= (NCOL == 1 || fptr_q == CW'(NCOL - 1)) ? '0 : fptr_q + 1'b1;
    end
  end
endmodule
