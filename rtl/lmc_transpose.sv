// Row-major to column-major reordering LMC.
// Images travel between FPGAs and sit in SDRAM row by row, but the motion
// estimator wants each strip of TH rows column by column. This macro writes
// a TH x TW tile arriving row-major into a small local RAM and reads it out
// column by column. Two tile buffers alternate (ping-pong), so one tile is
// written while the previous one is read, and a continuous input stream of
// one pixel per clock gives a continuous output stream after one tile of
// latency. in_ready is low only while both buffers hold unread tiles.
// Output: out_valid/out_pix, registered, one pixel per clock. The reordering
// with a local block RAM follows the source; tile size and ping-pong
// buffering are this design's choices.
module lmc_transpose #(
  parameter int unsigned TW = 16,
  parameter int unsigned TH = 16,
  parameter int unsigned PW = 10,
  localparam int unsigned N  = TW * TH,
  localparam int unsigned NW = $clog2(N),
  localparam int unsigned XW = $clog2(TW),
  localparam int unsigned YW = $clog2(TH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [PW-1:0] in_pix,
  output logic          out_valid,
  output logic [PW-1:0] out_pix
);
  logic [PW-1:0] mem [2][N];
  logic [1:0]    full_q;           // tile buffer holds an unread tile
  logic          wsel_q, rsel_q;
  logic [NW-1:0] wa_q;
  logic [XW-1:0] rc_q;             // read column
  logic [YW-1:0] rr_q;             // read row

  assign in_ready = !full_q[wsel_q];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wsel_q][wa_q] <= in_pix;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_q <= '0; wsel_q <= 1'b0; rsel_q <= 1'b0; wa_q <= '0;
      rc_q <= '0; rr_q <= '0; out_valid <= 1'b0; out_pix <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        wa_q <= wa_q + 1'b1;
        if (wa_q == NW'(N - 1)) begin
          wa_q <= '0;
          full_q[wsel_q] <= 1'b1;
          wsel_q <= !wsel_q;
        end
      end
      if (full_q[rsel_q]) begin
        out_valid <= 1'b1;
        out_pix   <= mem[rsel_q][NW'(rr_q) * NW'(TW) + NW'(rc_q)];
        rr_q <= rr_q + 1'b1;
        if (rr_q == YW'(TH - 1)) begin
          rr_q <= '0;
          rc_q <= rc_q + 1'b1;
          if (rc_q == XW'(TW - 1)) begin
            rc_q <= '0;
            full_q[rsel_q] <= 1'b0;
            rsel_q <= !rsel_q;
          end
        end
      end
    end
  end
endmodule
