// Testbench for me_core at full size (16x16 block, vectors -8..+7).
// Each test builds a random 31x31 search window, takes the block from a known
// displacement and adds small noise, feeds the block column-major at one pixel
// per clock, and compares vector and SAD with an exhaustive reference search
// (smallest SAD, first in scan order on ties). Also checks the result time:
// SR*SR+2 clocks after the last pixel. Blocks follow back to back, the window
// of the next block being loaded while the previous minimum is scanned.
// A last series streams: each block's window is loaded while the previous
// block runs, and blocks start right after the previous one's last pixel, so
// a block must take BLK*BLK+1 clocks (start clock plus one pixel per clock).
module me_core_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int BLK = 16, SR = 16, WIN = 31;
  logic win_we, start, cur_valid, busy, mv_valid;
  logic [4:0] win_col;
  logic [9:0] win_data [WIN];
  logic [9:0] cur_pix;
  logic signed [4:0] mv_x, mv_y;
  logic [18:0] min_sad;
  me_core #(.BLK(BLK), .SR(SR), .PIX_W(10), .SAD_W(19)) dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  int w [WIN][WIN];
  int b [BLK][BLK];
  int exp_x [$], exp_y [$], exp_s [$];
  longint cyc = 0, t_last [$];
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (mv_valid) begin
    chk(exp_x.size() > 0, "unexpected result");
    if (exp_x.size() > 0) begin
      chk(mv_x == 5'(exp_x[0]) && mv_y == 5'(exp_y[0]) && min_sad == 19'(exp_s[0]),
          $sformatf("got (%0d,%0d) sad %0d exp (%0d,%0d) sad %0d", mv_x, mv_y, min_sad, exp_x[0], exp_y[0], exp_s[0]));
      chk(cyc - t_last[0] == SR * SR + 2, $sformatf("latency %0d", cyc - t_last[0]));
      void'(exp_x.pop_front()); void'(exp_y.pop_front()); void'(exp_s.pop_front()); void'(t_last.pop_front());
    end
  end

  task automatic make_test(input int dx, input int dy, input int noise);
    int best, bx, by;
    for (int r = 0; r < WIN; r++) for (int c = 0; c < WIN; c++) w[r][c] = int'($urandom_range(0, 1023));
    for (int i = 0; i < BLK; i++) for (int j = 0; j < BLK; j++) begin
      int v;
      v = w[i + dy + 8][j + dx + 8] + int'($urandom_range(0, 2 * noise)) - noise;
      b[i][j] = v < 0 ? 0 : (v > 1023 ? 1023 : v);
    end
    best = -1;
    for (int u = 0; u < SR; u++) for (int v = 0; v < SR; v++) begin
      int s;
      s = 0;
      for (int i = 0; i < BLK; i++) for (int j = 0; j < BLK; j++)
        s += (b[i][j] > w[i + u][j + v]) ? b[i][j] - w[i + u][j + v] : w[i + u][j + v] - b[i][j];
      if (best < 0 || s < best) begin best = s; bx = v - 8; by = u - 8; end
    end
    exp_x.push_back(bx); exp_y.push_back(by); exp_s.push_back(best);
  endtask

  task automatic load_window();
    for (int c = 0; c < WIN; c++) begin
      @(negedge clk);
      win_we = 1; win_col = 5'(c);
      for (int r = 0; r < WIN; r++) win_data[r] = 10'(w[r][c]);
    end
    @(negedge clk); win_we = 0;
  endtask

  task automatic run_block(input bit gaps, input bit at_once = 0);
    if (!at_once) @(negedge clk);
    start = 1;
    @(negedge clk); start = 0;
    for (int j = 0; j < BLK; j++) for (int i = 0; i < BLK; i++) begin
      if (gaps && $urandom_range(0, 5) == 0) begin cur_valid = 0; @(negedge clk); end
      cur_valid = 1; cur_pix = 10'(b[i][j]);
      if (i == BLK - 1 && j == BLK - 1) t_last.push_back(cyc);
      @(negedge clk);
    end
    cur_valid = 0;
  endtask

  initial begin
    win_we = 0; start = 0; cur_valid = 0; win_col = 0; cur_pix = 0;
    for (int r = 0; r < WIN; r++) win_data[r] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    make_test(3, -5, 0);  load_window(); run_block(0);
    make_test(-8, 7, 3);  load_window(); run_block(0);
    make_test(7, -8, 10); load_window(); run_block(1);
    make_test(0, 0, 20);  load_window(); run_block(0);
    make_test(-2, 4, 60); load_window(); run_block(1);
    // streaming: window k+1 loads during block k
    begin
      int bw [4][WIN][WIN], bb [4][BLK][BLK];
      longint t0;
      for (int k = 0; k < 4; k++) begin
        make_test(k * 3 - 6, 5 - k * 4, k * 5);
        bw[k] = w; bb[k] = b;
      end
      w = bw[0]; load_window();
      for (int k = 0; k < 4; k++) begin
        b = bb[k];
        fork
          run_block(0, k > 0);
          if (k < 3) begin w = bw[k + 1]; @(negedge clk); load_window(); end
        join
        if (k == 0) t0 = t_last[t_last.size() - 1];
      end
      chk(t_last[t_last.size() - 1] - t0 == 3 * (BLK * BLK + 1),
          $sformatf("streaming block period %0d", (t_last[t_last.size() - 1] - t0) / 3));
    end
    repeat (300) @(posedge clk);
    chk(exp_x.size() == 0, "missing results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
