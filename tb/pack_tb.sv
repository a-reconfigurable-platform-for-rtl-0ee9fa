// Testbench for word_pack -> word_unpack: random 30-bit pixels, one every
// second clock, are packed two per 64-bit word and unpacked again. Checks the
// word layout (first pixel low, second at bit 32, padding zero) against a
// reference and that the unpacked stream equals the input stream.
module pack_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid, w_valid, o_valid;
  logic [29:0] in_pix, o_pix;
  logic [63:0] w;
  logic [29:0] q [$];
  logic [29:0] wq [$];

  word_pack   #(.PW(30), .DW(64)) dut_p (.clk, .rst_n, .in_valid, .in_pix, .out_valid(w_valid), .out_word(w));
  word_unpack #(.PW(30), .DW(64)) dut_u (.clk, .rst_n, .in_valid(w_valid), .in_word(w), .out_valid(o_valid), .out_pix(o_pix));

  always_ff @(posedge clk) if (rst_n) begin
    if (w_valid) begin
      logic [29:0] a, b;
      a = wq.pop_front(); b = wq.pop_front();
      checks++;
      if (w !== {2'b00, b, 2'b00, a}) begin failures++; $display("FAIL word %h", w); end
    end
    if (o_valid) begin
      checks++;
      if (q.size() == 0 || o_pix !== q.pop_front()) begin failures++; $display("FAIL pixel %h", o_pix); end
    end
  end

  initial begin
    in_valid = 0; in_pix = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk); in_valid = 1; in_pix = 30'($urandom); q.push_back(in_pix); wq.push_back(in_pix);
      @(negedge clk); in_valid = 0;
    end
    repeat (10) @(posedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("FAIL %0d pixels missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
