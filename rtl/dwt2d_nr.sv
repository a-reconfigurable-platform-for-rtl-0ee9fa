// One-level 2D 5/3 wavelet noise reducer for a W x H image.
// Pixels enter row-major, one per clock at most. A row filter splits each line
// into low (s) and high (d) halves; two column filters (line memories W/2 wide)
// split each half again, giving the LL, LH, HL and HH bands line by line as
// soon as the data allow (no frame buffer). The three detail bands pass the
// coring filter (thr[0] = LH, thr[1] = HL, thr[2] = HH); LL is kept. Two
// inverse column filters rebuild two rows of s and d values at a time, and two
// inverse row filters rebuild those two rows in parallel, so the output is two
// rows at once, two pixels per row and clock:
//   out_pix[0][0..1] = pixels 2m, 2m+1 of row 2k
//   out_pix[1][0..1] = the same pixels of row 2k+1
// With all thresholds zero the output equals the input exactly. The latency
// is about two image lines. After the last image of a stream, hold 'flush'
// high for W/2 + 2 idle clocks to push out the last two rows.
// The 2D 5/3 transform, its line-by-line schedule and the filtering of the
// bands follow the source, which cascades three such levels; this block is one
// level. The two-rows-in-parallel output is this design's choice.
module dwt2d_nr #(
  parameter int unsigned W  = 2048,
  parameter int unsigned H  = 2048,
  parameter int unsigned IW = 11,
  localparam int unsigned RW = IW + 2,     // row-transform coefficients
  localparam int unsigned CW = IW + 4      // column-transform coefficients
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_pix,
  input  logic [CW-2:0]        thr [3],
  input  logic                 flush,
  output logic                 out_valid,
  output logic signed [IW-1:0] out_pix [2][2]
);
  logic                 r_v;
  logic signed [RW-1:0] r_s, r_d;
  logic                 cs_v, cd_v;
  logic signed [CW-1:0] ll, lh, hl, hh, lh_f, hl_f, hh_f;
  logic                 is_v, id_v;
  logic signed [RW-1:0] s0, s1, d0, d1;
  logic                 oa_v, ob_v;

  dwt53_fwd #(.IW(IW), .OW(RW), .LEN(W), .NCOL(1)) u_row (
    .clk, .rst_n, .in_valid, .in_x(in_pix), .out_valid(r_v), .out_s(r_s), .out_d(r_d));

  dwt53_fwd #(.IW(RW), .OW(CW), .LEN(H), .NCOL(W/2)) u_col_s (
    .clk, .rst_n, .in_valid(r_v), .in_x(r_s), .out_valid(cs_v), .out_s(ll), .out_d(lh));
  dwt53_fwd #(.IW(RW), .OW(CW), .LEN(H), .NCOL(W/2)) u_col_d (
    .clk, .rst_n, .in_valid(r_v), .in_x(r_d), .out_valid(cd_v), .out_s(hl), .out_d(hh));

  nr_shrink #(.W(CW)) u_nr_lh (.c(lh), .thr(thr[0]), .y(lh_f));
  nr_shrink #(.W(CW)) u_nr_hl (.c(hl), .thr(thr[1]), .y(hl_f));
  nr_shrink #(.W(CW)) u_nr_hh (.c(hh), .thr(thr[2]), .y(hh_f));

  dwt53_inv #(.IW(CW), .OW(RW), .LEN(H), .NCOL(W/2)) u_icol_s (
    .clk, .rst_n, .in_valid(cs_v), .in_s(ll), .in_d(lh_f), .flush,
    .out_valid(is_v), .out_x0(s0), .out_x1(s1));
  dwt53_inv #(.IW(CW), .OW(RW), .LEN(H), .NCOL(W/2)) u_icol_d (
    .clk, .rst_n, .in_valid(cd_v), .in_s(hl_f), .in_d(hh_f), .flush,
    .out_valid(id_v), .out_x0(d0), .out_x1(d1));

  dwt53_inv #(.IW(RW), .OW(IW), .LEN(W), .NCOL(1)) u_irow_a (
    .clk, .rst_n, .in_valid(is_v), .in_s(s0), .in_d(d0), .flush(1'b1),
    .out_valid(oa_v), .out_x0(out_pix[0][0]), .out_x1(out_pix[0][1]));
  dwt53_inv #(.IW(RW), .OW(IW), .LEN(W), .NCOL(1)) u_irow_b (
    .clk, .rst_n, .in_valid(is_v), .in_s(s1), .in_d(d1), .flush(1'b1),
    .out_valid(ob_v), .out_x0(out_pix[1][0]), .out_x1(out_pix[1][1]));

  assign out_valid = oa_v;

  // both halves of the image travel in lock step
  assert property (@(posedge clk) disable iff (!rst_n) (cs_v == cd_v) && (is_v == id_v) && (oa_v == ob_v))
    else $error("dwt2d_nr: band paths out of step");
endmodule
