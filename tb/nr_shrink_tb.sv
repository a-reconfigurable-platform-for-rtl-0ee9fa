// Testbench for nr_shrink: random coefficients and thresholds, both signs;
// output must be zero exactly when |c| < thr and c otherwise.
module nr_shrink_tb;
  int checks = 0, failures = 0;
  logic signed [13:0] c, y;
  logic [12:0] thr;
  nr_shrink #(.W(14)) dut (.*);
  initial begin
    for (int i = 0; i < 2000; i++) begin
      int cv, tv;
      cv = int'($urandom_range(0, 400)) - 200; tv = int'($urandom_range(0, 120));
      if (i < 4) begin cv = (i & 1) ? 50 : -50; tv = (i & 2) ? 50 : 51; end
      c = 14'(cv); thr = 13'(tv); #1;
      checks++;
      if (y != (((cv < 0 ? -cv : cv) < tv) ? 14'(0) : 14'(cv))) begin failures++; $display("FAIL c=%0d thr=%0d y=%0d", cv, tv, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
