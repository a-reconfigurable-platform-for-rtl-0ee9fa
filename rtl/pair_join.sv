// Re-pairs two pixel streams that arrive on different clocks.
// The original and the motion-compensated image share one TDMA link and so
// arrive interleaved; the temporal filter needs matching pixels of both in the
// same clock. Each stream goes into a small FIFO, and a pair leaves (registered)
// whenever both FIFOs hold a pixel. No back-pressure: the schedule guarantees
// equal rates, and an assertion flags an overflow.
module pair_join #(
  parameter int unsigned PW    = 30,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          a_valid,
  input  logic [PW-1:0] a_pix,
  input  logic          b_valid,
  input  logic [PW-1:0] b_pix,
  output logic          out_valid,
  output logic [PW-1:0] out_a,
  output logic [PW-1:0] out_b
);
  logic [PW-1:0] fa [DEPTH];
  logic [PW-1:0] fb [DEPTH];
  logic [AW-1:0] wa, wb, rd;
  logic [AW:0]   na, nb;
  logic          pop;

  assign pop = (na != '0) && (nb != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wa <= '0; wb <= '0; rd <= '0; na <= '0; nb <= '0;
      out_valid <= 1'b0; out_a <= '0; out_b <= '0;
    end else begin
      out_valid <= pop;
      if (a_valid) begin fa[wa] <= a_pix; wa <= wa + 1'b1; end
      if (b_valid) begin fb[wb] <= b_pix; wb <= wb + 1'b1; end
      if (pop) begin
        out_a <= fa[rd];
        out_b <= fb[rd];
        rd    <= rd + 1'b1;
      end
      na <= na + (AW+1)'(a_valid) - (AW+1)'(pop);
      nb <= nb + (AW+1)'(b_valid) - (AW+1)'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
    !(a_valid && !pop && na == (AW+1)'(DEPTH)) && !(b_valid && !pop && nb == (AW+1)'(DEPTH)))
    else $error("pair_join: overflow");
endmodule
