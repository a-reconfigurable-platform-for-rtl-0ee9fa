// Testbench for lmc_transpose (16x16 tiles): several tiles stream in
// row-major, with and without input gaps, and must leave column-major in
// order; a continuous input stream must give a continuous output stream
// (one pixel per clock) after the first tile.
module lmc_transpose_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, in_ready, out_valid;
  logic [9:0] in_pix, out_pix;
  lmc_transpose #(.TW(16), .TH(16), .PW(10)) dut (.*);
  int tiles [6][16][16];
  int expq [$];
  int gaps_out = 0, started = 0, nout = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (expq.size() == 0 || out_pix != 10'(expq[0])) begin failures++; if (failures < 10) $display("FAIL out %0d", out_pix); end
      void'(expq.pop_front()); started = 1; nout++;
    end else if (started && nout < 4 * 256) gaps_out++;
  end
  initial begin
    in_valid = 0; in_pix = 0;
    for (int t = 0; t < 6; t++) for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) tiles[t][r][c] = int'($urandom_range(0, 1023));
    for (int t = 0; t < 6; t++) for (int c = 0; c < 16; c++) for (int r = 0; r < 16; r++) expq.push_back(tiles[t][r][c]);
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 6; t++) for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) begin
      @(negedge clk);
      if (t >= 4) while ($urandom_range(0, 2) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_pix = 10'(tiles[t][r][c]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
    repeat (600) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("FAIL %0d pixels missing", expq.size()); end
    checks++; if (gaps_out != 0) begin failures++; $display("FAIL %0d output gaps in continuous stream", gaps_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
