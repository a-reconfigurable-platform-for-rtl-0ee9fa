// Packs two 30-bit RGB pixels of one stream into one 64-bit link word.
// The first pixel of a pair goes to bits [PW-1:0], the second to
// bits [32+PW-1:32]; all other bits are zero. A word is output (registered)
// in the cycle after the second pixel of each pair arrives. Merging two pixels
// and zero padding follow the source; the bit placement is this design's.
module word_pack #(
  parameter int unsigned PW = 30,
  parameter int unsigned DW = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [PW-1:0] in_pix,
  output logic          out_valid,
  output logic [DW-1:0] out_word
);
  logic          half_q;
  logic [PW-1:0] first_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half_q    <= 1'b0;
      first_q   <= '0;
      out_valid <= 1'b0;
      out_word  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (!half_q) begin
          first_q <= in_pix;
          half_q  <= 1'b1;
        end else begin
          out_word  <= '0;
          out_word[PW-1:0]       <= first_q;
          out_word[DW/2+:PW]     <= in_pix;
          out_valid <= 1'b1;
          half_q    <= 1'b0;
        end
      end
    end
  end
endmodule
