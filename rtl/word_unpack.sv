// Splits a 64-bit link word into its two 30-bit pixels (inverse of word_pack).
// The first pixel leaves in the clock after the word arrives, the second one
// clock later. Words must be at least two clocks apart, which a stream that
// owns every second TDMA slot guarantees. Bit placement as in word_pack.
module word_unpack #(
  parameter int unsigned PW = 30,
  parameter int unsigned DW = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] in_word,
  output logic          out_valid,
  output logic [PW-1:0] out_pix
);
  logic          second_q;
  logic [PW-1:0] hold_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      second_q  <= 1'b0;
      hold_q    <= '0;
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= 1'b0;
      second_q  <= 1'b0;
      if (in_valid) begin
        out_pix   <= in_word[PW-1:0];
        hold_q    <= in_word[DW/2+:PW];
        out_valid <= 1'b1;
        second_q  <= 1'b1;
      end else if (second_q) begin
        out_pix   <= hold_q;
        out_valid <= 1'b1;
      end
    end
  end

  // a new word while the second pixel is pending would lose it
  assert property (@(posedge clk) disable iff (!rst_n) second_q |-> !in_valid)
    else $error("word_unpack: words closer than two clocks");
endmodule
