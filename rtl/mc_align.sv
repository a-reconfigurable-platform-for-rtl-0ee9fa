// Alignment of motion-compensated pixel groups.
// The frame memory can only deliver groups of N pixels at multiples of N.
// For a group starting at pixel column x this block names the aligned block
// holding its first pixel (blk_addr = x / N) and whether a second aligned block
// is needed (x not a multiple of N). Given those one or two blocks (blk0, blk1)
// it returns the N pixels starting at x by a funnel shift. Combinational.
// Alignment rule and the two-block worst case follow the source.
module mc_align #(
  parameter int unsigned N  = 16,
  parameter int unsigned PW = 32,
  parameter int unsigned XW = 12,
  localparam int unsigned OW = $clog2(N)
) (
  input  logic [XW-1:0]    x,
  output logic [XW-OW-1:0] blk_addr,
  output logic             need_second,
  input  logic [PW-1:0]    blk0 [N],
  input  logic [PW-1:0]    blk1 [N],
  output logic [PW-1:0]    group [N]
);
  logic [OW-1:0] off;
  assign off         = x[OW-1:0];
  assign blk_addr    = x[XW-1:OW];
  assign need_second = (off != '0);

  always_comb begin
    for (int k = 0; k < N; k++) begin
      if (k + int'(off) < N) group[k] = blk0[k + int'(off)];
      else                   group[k] = blk1[k + int'(off) - N];
    end
  end
endmodule
