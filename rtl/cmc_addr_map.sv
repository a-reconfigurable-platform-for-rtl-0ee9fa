// Address translation of the memory controller.
// A burst address is split so that its lowest bits select the bank: linear
// streams then visit all banks in turn, and each access can be activated while
// the previous bank is still busy (bank interleaving). Above the bank bits come
// the column (burst within a row) and then the row. Purely combinational.
// Spreading requests over all banks follows the source; the bit order is this
// design's.
module cmc_addr_map #(
  parameter int unsigned AW     = 22,
  parameter int unsigned BANK_W = 2,
  parameter int unsigned COL_W  = 7,
  localparam int unsigned ROW_W = AW - BANK_W - COL_W
) (
  input  logic [AW-1:0]     addr,
  output logic [BANK_W-1:0] bank,
  output logic [COL_W-1:0]  col,
  output logic [ROW_W-1:0]  row
);
  assign bank = addr[BANK_W-1:0];
  assign col  = addr[BANK_W+:COL_W];
  assign row  = addr[AW-1 -: ROW_W];
endmodule
