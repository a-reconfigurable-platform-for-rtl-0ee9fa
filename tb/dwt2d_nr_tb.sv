// Testbench for dwt2d_nr on small images (16 x 8). Frames of random pixels
// stream in back to back. The output, two rows and two pixels per clock, is
// compared with a reference model that does the same 2D 5/3 transform on
// whole arrays (rows, then columns, symmetric extension), cores the three
// detail bands and inverts. With all thresholds zero the output must equal
// the input exactly; with thresholds set it must match the model.
module dwt2d_nr_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int W = 16, H = 8, FR = 4;
  logic in_valid, flush, out_valid;
  logic signed [10:0] in_pix;
  logic [13:0] thr [3];
  logic signed [10:0] out_pix [2][2];
  dwt2d_nr #(.W(W), .H(H), .IW(11)) dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  typedef int vec_t [];
  function automatic void f53(input vec_t x, output vec_t s, output vec_t d);
    int n; n = x.size() / 2; s = new[n]; d = new[n];
    for (int i = 0; i < n; i++) d[i] = x[2*i+1] - ((x[2*i] + ((2*i+2 < x.size()) ? x[2*i+2] : x[x.size()-2])) >>> 1);
    for (int i = 0; i < n; i++) s[i] = x[2*i] + (((i == 0 ? d[0] : d[i-1]) + d[i] + 2) >>> 2);
  endfunction
  function automatic vec_t i53(input vec_t s, input vec_t d);
    int n; vec_t x; n = s.size(); x = new[2*n];
    for (int i = 0; i < n; i++) x[2*i] = s[i] - (((i == 0 ? d[0] : d[i-1]) + d[i] + 2) >>> 2);
    for (int i = 0; i < n; i++) x[2*i+1] = d[i] + ((x[2*i] + ((i + 1 < n) ? x[2*i+2] : x[2*i])) >>> 1);
    return x;
  endfunction
  function automatic int core(int c, int t);
    return ((c < 0 ? -c : c) < t) ? 0 : c;
  endfunction

  int img [FR][H][W];
  int expq [$];
  int tset [FR][3];

  task automatic model(input int f);
    int L [H][W/2], Hh [H][W/2], rec [H][W];
    int ll [H/2][W/2], lh [H/2][W/2], hl [H/2][W/2], hh [H/2][W/2];
    for (int r = 0; r < H; r++) begin
      vec_t x, s, d; x = new[W];
      for (int c = 0; c < W; c++) x[c] = img[f][r][c];
      f53(x, s, d);
      for (int c = 0; c < W/2; c++) begin L[r][c] = s[c]; Hh[r][c] = d[c]; end
    end
    for (int c = 0; c < W/2; c++) begin
      vec_t x, s, d, y, s2, d2, z; x = new[H]; y = new[H];
      for (int r = 0; r < H; r++) begin x[r] = L[r][c]; y[r] = Hh[r][c]; end
      f53(x, s, d); f53(y, s2, d2);
      for (int r = 0; r < H/2; r++) begin
        d[r] = core(d[r], tset[f][0]); s2[r] = core(s2[r], tset[f][1]); d2[r] = core(d2[r], tset[f][2]);
      end
      x = i53(s, d); z = i53(s2, d2);
      for (int r = 0; r < H; r++) begin L[r][c] = x[r]; Hh[r][c] = z[r]; end
    end
    for (int r = 0; r < H; r++) begin
      vec_t s, d, x; s = new[W/2]; d = new[W/2];
      for (int c = 0; c < W/2; c++) begin s[c] = L[r][c]; d[c] = Hh[r][c]; end
      x = i53(s, d);
      for (int c = 0; c < W; c++) rec[r][c] = x[c];
    end
    for (int k = 0; k < H/2; k++) for (int m = 0; m < W/2; m++) begin
      expq.push_back(rec[2*k][2*m]); expq.push_back(rec[2*k][2*m+1]);
      expq.push_back(rec[2*k+1][2*m]); expq.push_back(rec[2*k+1][2*m+1]);
    end
  endtask

  int nout = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    chk(expq.size() >= 4, "extra output");
    if (expq.size() >= 4) begin
      chk(out_pix[0][0] == 11'(expq[0]) && out_pix[0][1] == 11'(expq[1]) && out_pix[1][0] == 11'(expq[2]) && out_pix[1][1] == 11'(expq[3]),
          $sformatf("out %0d: %0d %0d %0d %0d exp %0d %0d %0d %0d", nout, out_pix[0][0], out_pix[0][1], out_pix[1][0], out_pix[1][1], expq[0], expq[1], expq[2], expq[3]));
      repeat (4) void'(expq.pop_front());
    end
    nout++;
  end

  initial begin
    in_valid = 0; in_pix = 0; flush = 0; thr = '{0, 0, 0};
    for (int f = 0; f < FR; f++) begin
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) img[f][r][c] = int'($urandom_range(0, 1023)) - (f % 2 ? 512 : 0);
      tset[f] = (f < 2) ? '{0, 0, 0} : '{40, 60, 80};
    end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < FR; f++) model(f);
    for (int f = 0; f < FR; f++) begin
      // thresholds change between frames while the previous frame drains;
      // keep them constant per frame by waiting for the pipeline at the switch
      if (f == 2) begin
        @(negedge clk); in_valid = 0; flush = 1;
        repeat (W + 4) @(negedge clk);
        flush = 0; thr = '{14'(40), 14'(60), 14'(80)};
      end
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
        @(negedge clk); in_valid = 1; in_pix = 11'(img[f][r][c]);
      end
    end
    @(negedge clk); in_valid = 0; flush = 1;
    repeat (W + 10) @(negedge clk);
    chk(expq.size() == 0, $sformatf("%0d output pixels missing", expq.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
