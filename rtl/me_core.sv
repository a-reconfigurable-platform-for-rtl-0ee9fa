// Full-search block-matching motion estimator.
// For a BLK x BLK block of reference pixels it evaluates every vector in
// -SR/2 .. SR/2-1 in both directions (16 x 16 = 256 vectors with the
// defaults) with one processing element (me_pe) per vector, all working in
// parallel on the same reference pixel, so a block takes BLK*BLK clocks at one
// reference pixel per clock. Reference pixels arrive in column-major order.
//
// Search window: (BLK+SR-1)^2 pixels whose top-left corner is the block
// position minus SR/2 in both directions, loaded one column per clock through
// win_we/win_col/win_data (row 0 in element 0). The window store has two
// banks: loads always go to the bank not in use, and 'start' switches to the
// bank just loaded. The next block's window (31 clocks) can therefore be
// loaded while the current block runs, and blocks follow each other every
// BLK*BLK+1 clocks (one clock for 'start'). For column j of
// the block a band register holds window columns j .. j+SR-1; it is shifted up
// one row per reference pixel, so PE(u,v) always reads band element [u][v],
// which is window pixel (i+u, j+v) for reference pixel (i, j). At the end of a
// column the band is reloaded for the next one.
//
// After the last pixel the SADs are copied to shadow registers and scanned one
// per clock over a shared SAD bus, overlapping the next block; the smallest SAD
// (first in scan order on ties, scan order u*SR+v) and its vector appear with
// a one-clock mv_valid pulse SR*SR+2 clocks after the last reference pixel.
// The next 'start' may follow the last pixel of a block; its window must have
// been loaded (into the idle bank) since the previous 'start'.
//
// The PE count, widths, block size, search range and column-major input follow
// the source; the band register, double-buffered column-wise window load and
// sequential minimum scan are this design's choices.
module me_core #(
  parameter int unsigned BLK   = 16,
  parameter int unsigned SR    = 16,
  parameter int unsigned PIX_W = 10,
  parameter int unsigned SAD_W = 19,
  localparam int unsigned WIN  = BLK + SR - 1,
  localparam int unsigned WCW  = $clog2(WIN),
  localparam int unsigned BW   = $clog2(BLK),
  localparam int unsigned VW   = $clog2(SR) + 1,
  localparam int unsigned NPE  = SR * SR,
  localparam int unsigned KW   = $clog2(NPE)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    win_we,
  input  logic [WCW-1:0]          win_col,
  input  logic [PIX_W-1:0]        win_data [WIN],
  input  logic                    start,
  input  logic                    cur_valid,
  input  logic [PIX_W-1:0]        cur_pix,
  output logic                    busy,
  output logic                    mv_valid,
  output logic signed [VW-1:0]    mv_x,
  output logic signed [VW-1:0]    mv_y,
  output logic [SAD_W-1:0]        min_sad
);
  logic [PIX_W-1:0] win  [2][WIN][WIN];   // [bank][row][col]
  logic             abank_q;              // bank in use
  logic [PIX_W-1:0] band [WIN][SR];    // [row][vector column]
  logic [BW-1:0]    i_q, j_q;
  logic             first_q;
  logic             last_pix, cap_q;
  logic [SAD_W-1:0] sad   [NPE];
  logic [SAD_W-1:0] sad_sh[NPE];
  logic             scan_q;
  logic [KW-1:0]    k_q;
  logic [SAD_W-1:0] best_q;
  logic [KW-1:0]    best_k_q;
  logic [SAD_W-1:0] sad_bus;

  assign last_pix = busy && cur_valid && (i_q == BW'(BLK - 1)) && (j_q == BW'(BLK - 1));

  // window load and band control
  always_ff @(posedge clk) begin
    if (win_we)
      for (int r = 0; r < WIN; r++) win[!abank_q][r][win_col] <= win_data[r];
    if (start && !busy) begin
      for (int r = 0; r < WIN; r++)
        for (int v = 0; v < SR; v++) band[r][v] <= win[!abank_q][r][v];
    end else if (busy && cur_valid) begin
      if (i_q == BW'(BLK - 1)) begin
        for (int r = 0; r < WIN; r++)
          for (int v = 0; v < SR; v++) band[r][v] <= win[abank_q][r][int'(j_q) + 1 + v < WIN ? int'(j_q) + 1 + v : WIN - 1];
      end else begin
        for (int r = 0; r < WIN - 1; r++) band[r] <= band[r+1];
        band[WIN-1] <= band[WIN-1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; i_q <= '0; j_q <= '0; first_q <= 1'b0; cap_q <= 1'b0; abank_q <= 1'b0;
    end else begin
      cap_q <= last_pix;
      if (start && !busy) begin
        busy <= 1'b1; i_q <= '0; j_q <= '0; first_q <= 1'b1;
        abank_q <= !abank_q;
      end else if (busy && cur_valid) begin
        first_q <= 1'b0;
        i_q <= i_q + 1'b1;
        if (i_q == BW'(BLK - 1)) begin
          i_q <= '0;
          j_q <= j_q + 1'b1;
          if (j_q == BW'(BLK - 1)) busy <= 1'b0;
        end
      end
    end
  end

  // the processing element array
  for (genvar u = 0; u < SR; u++) begin : g_row
    for (genvar v = 0; v < SR; v++) begin : g_col
      me_pe #(.PIX_W(PIX_W), .SAD_W(SAD_W)) u_pe (
        .clk, .clr(first_q), .en(busy && cur_valid),
        .cur(cur_pix), .srch(band[u][v]), .sad(sad[u*SR+v]));
    end
  end

  // sequential minimum search over the shadowed SADs
  assign sad_bus = sad_sh[k_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scan_q <= 1'b0; k_q <= '0; best_q <= '0; best_k_q <= '0;
      mv_valid <= 1'b0; mv_x <= '0; mv_y <= '0; min_sad <= '0;
      for (int k = 0; k < NPE; k++) sad_sh[k] <= '0;
    end else begin
      mv_valid <= 1'b0;
      if (cap_q) begin
        sad_sh <= sad;
        scan_q <= 1'b1;
        k_q    <= '0;
        best_q <= '1;
      end else if (scan_q) begin
        if (sad_bus < best_q || k_q == '0) begin
          best_q   <= sad_bus;
          best_k_q <= k_q;
        end
        k_q <= k_q + 1'b1;
        if (k_q == KW'(NPE - 1)) begin
          scan_q   <= 1'b0;
          mv_valid <= 1'b1;
          if (sad_bus < best_q) begin
            min_sad <= sad_bus;
            mv_y <= VW'(int'(k_q) / SR) - VW'(SR / 2);
            mv_x <= VW'(int'(k_q) % SR) - VW'(SR / 2);
          end else begin
            min_sad <= best_q;
            mv_y <= VW'(int'(best_k_q) / SR) - VW'(SR / 2);
            mv_x <= VW'(int'(best_k_q) % SR) - VW'(SR / 2);
          end
        end
      end
    end
  end
endmodule
