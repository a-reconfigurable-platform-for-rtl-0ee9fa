// Testbench for me_pe: random 10-bit pixel pairs accumulated over 256 clocks;
// the SAD must equal the reference sum of absolute differences, and clr must
// restart the sum.
module me_pe_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clr, en;
  logic [9:0] cur, srch;
  logic [18:0] sad;
  me_pe #(.PIX_W(10), .SAD_W(19)) dut (.*);
  initial begin
    for (int blk = 0; blk < 6; blk++) begin
      int ref_sad;
      ref_sad = 0;
      for (int i = 0; i < 256; i++) begin
        @(negedge clk);
        clr = (i == 0); en = 1;
        cur = blk == 5 ? 10'h3FF : 10'($urandom); srch = blk == 5 ? 10'h000 : 10'($urandom);
        ref_sad += (cur > srch) ? cur - srch : srch - cur;
        if (i % 7 == 3) begin @(negedge clk); en = 0; end
      end
      @(negedge clk); en = 0;
      checks++;
      if (sad != 19'(ref_sad)) begin failures++; $display("FAIL sad %0d exp %0d", sad, ref_sad); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
