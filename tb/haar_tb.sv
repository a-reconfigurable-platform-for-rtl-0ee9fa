// Testbench for haar_fwd -> haar_inv: all corner values and random pixel
// pairs. Checks the bands against h = a - b, l = b + floor(h/2) and that the
// inverse restores both pixels exactly, with one clock latency per filter.
module haar_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, f_valid, i_valid;
  logic [9:0] a, b, ra, rb;
  logic signed [10:0] l, h;
  haar_fwd #(.W(10)) dut_f (.clk, .in_valid, .a, .b, .out_valid(f_valid), .l, .h);
  haar_inv #(.W(10), .IW(11)) dut_i (.clk, .in_valid(f_valid), .l, .h, .out_valid(i_valid), .a(ra), .b(rb));
  int qa [$], qb [$];
  initial begin
    in_valid = 0; a = 0; b = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      in_valid = 1;
      a = (i < 4) ? ((i & 1) ? 10'h3FF : 0) : 10'($urandom);
      b = (i < 4) ? ((i & 2) ? 10'h3FF : 0) : 10'($urandom);
      qa.push_back(a); qb.push_back(b);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!f_valid || h != 11'(int'(a) - int'(b)) || l != 11'(int'(b) + ((int'(a) - int'(b)) >>> 1))) begin
        failures++; $display("FAIL fwd a=%0d b=%0d l=%0d h=%0d", a, b, l, h);
      end
      @(negedge clk);
      checks++;
      if (!i_valid || ra != a || rb != b) begin failures++; $display("FAIL inv a=%0d b=%0d -> %0d %0d", a, b, ra, rb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
