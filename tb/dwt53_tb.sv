// Testbench for dwt53_fwd -> dwt53_inv, along lines (NCOL = 1) and down
// columns (NCOL = 4). Random frames go in back to back; the forward pairs are
// compared with a reference 5/3 lifting computed on whole lines with
// symmetric extension, and the inverse output must give back the input
// exactly (perfect reconstruction), column by column in order.
module dwt53_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  // configuration A: along lines, LEN 16;  B: down columns, LEN 8, NCOL 4
  localparam int LA = 16, LB = 8, NB = 4, FR = 3;
  logic va, vb, fva, fvb, iva, ivb, flush;
  logic signed [11:0] xa, xb;
  logic signed [13:0] sa, da, sb, db;
  logic signed [11:0] a0, a1, b0, b1;

  dwt53_fwd #(.IW(12), .OW(14), .LEN(LA), .NCOL(1))  fa (.clk, .rst_n, .in_valid(va), .in_x(xa), .out_valid(fva), .out_s(sa), .out_d(da));
  dwt53_inv #(.IW(14), .OW(12), .LEN(LA), .NCOL(1))  ia (.clk, .rst_n, .in_valid(fva), .in_s(sa), .in_d(da), .flush, .out_valid(iva), .out_x0(a0), .out_x1(a1));
  dwt53_fwd #(.IW(12), .OW(14), .LEN(LB), .NCOL(NB)) fb (.clk, .rst_n, .in_valid(vb), .in_x(xb), .out_valid(fvb), .out_s(sb), .out_d(db));
  dwt53_inv #(.IW(14), .OW(12), .LEN(LB), .NCOL(NB)) ib (.clk, .rst_n, .in_valid(fvb), .in_s(sb), .in_d(db), .flush, .out_valid(ivb), .out_x0(b0), .out_x1(b1));

  int ina [$];            // line samples, all frames
  int inb [NB][$];        // per column samples
  int exa_s [$], exa_d [$];
  int exb_s [$], exb_d [$];
  int oba [$];
  int obb [NB][$];
  int ocol = 0;

  function automatic void ref53(input int x [], output int s [], output int d []);
    int n;
    n = x.size() / 2;
    s = new[n]; d = new[n];
    for (int i = 0; i < n; i++) begin
      int r;
      r = (2 * i + 2 < x.size()) ? x[2 * i + 2] : x[x.size() - 2];
      d[i] = x[2 * i + 1] - ((x[2 * i] + r) >>> 1);
    end
    for (int i = 0; i < n; i++) s[i] = x[2 * i] + (((i == 0 ? d[0] : d[i - 1]) + d[i] + 2) >>> 2);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (fva) begin
      chk(exa_s.size() > 0 && sa == 14'(exa_s[0]) && da == 14'(exa_d[0]), $sformatf("line fwd s=%0d d=%0d exp %0d %0d", sa, da, exa_s[0], exa_d[0]));
      void'(exa_s.pop_front()); void'(exa_d.pop_front());
    end
    if (fvb) begin
      chk(exb_s.size() > 0 && sb == 14'(exb_s[0]) && db == 14'(exb_d[0]), $sformatf("col fwd s=%0d d=%0d exp %0d %0d", sb, db, exb_s[0], exb_d[0]));
      void'(exb_s.pop_front()); void'(exb_d.pop_front());
    end
    if (iva) begin oba.push_back(int'(a0)); oba.push_back(int'(a1)); end
    if (ivb) begin obb[ocol].push_back(int'(b0)); obb[ocol].push_back(int'(b1)); ocol = (ocol + 1) % NB; end
  end

  initial begin
    va = 0; vb = 0; xa = 0; xb = 0; flush = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // expected forward values
    for (int f = 0; f < FR * 2; f++) begin
      int x [], s [], d [];
      x = new[LA];
      foreach (x[i]) begin x[i] = int'($urandom_range(0, 2000)) - 1000; ina.push_back(x[i]); end
      ref53(x, s, d);
      foreach (s[i]) begin exa_s.push_back(s[i]); exa_d.push_back(d[i]); end
    end
    for (int f = 0; f < FR; f++) begin
      int fr [LB][NB];
      int s [NB][], d [NB][];
      for (int r = 0; r < LB; r++) for (int c = 0; c < NB; c++) begin
        fr[r][c] = (f == 0 && c == 0) ? 1000 * ((r % 2) ? 1 : -1) : int'($urandom_range(0, 2000)) - 1000;
        inb[c].push_back(fr[r][c]);
      end
      for (int c = 0; c < NB; c++) begin
        int x [];
        x = new[LB];
        for (int r = 0; r < LB; r++) x[r] = fr[r][c];
        ref53(x, s[c], d[c]);
      end
      for (int n = 0; n < LB / 2; n++) for (int c = 0; c < NB; c++) begin exb_s.push_back(s[c][n]); exb_d.push_back(d[c][n]); end
    end
    // stream both configurations; config A with random gaps
    fork
      foreach (ina[i]) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin va = 0; @(negedge clk); end
        va = 1; xa = 12'(ina[i]);
        if (i == ina.size() - 1) begin @(negedge clk); va = 0; end
      end
      for (int f = 0; f < FR; f++) for (int r = 0; r < LB; r++) for (int c = 0; c < NB; c++) begin
        @(negedge clk); vb = 1; xb = 12'(inb[c][f * LB + r]);
        if (f == FR - 1 && r == LB - 1 && c == NB - 1) begin @(negedge clk); vb = 0; end
      end
    join
    @(negedge clk); va = 0; vb = 0; flush = 1;
    repeat (20) @(negedge clk);
    chk(exa_s.size() == 0 && exb_s.size() == 0, "forward outputs missing");
    chk(oba.size() == ina.size(), $sformatf("line inverse produced %0d of %0d", oba.size(), ina.size()));
    foreach (oba[i]) chk(oba[i] == ina[i], $sformatf("line reconstruction %0d: %0d vs %0d", i, oba[i], ina[i]));
    for (int c = 0; c < NB; c++) begin
      chk(obb[c].size() == inb[c].size(), $sformatf("col %0d inverse produced %0d of %0d", c, obb[c].size(), inb[c].size()));
      foreach (obb[c][i]) chk(obb[c][i] == inb[c][i], $sformatf("col %0d reconstruction %0d", c, i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
