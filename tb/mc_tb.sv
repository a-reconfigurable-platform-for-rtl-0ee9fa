// Testbench for motion-compensation selection and alignment.
// mc_select: random SAD/vector pairs; the smaller-SAD candidate must win,
// ties go to the previous image, and a scene cut (one side with huge SADs)
// must select the other side for every block.
// mc_align: random 32-pixel memory rows; for every offset the 16-pixel group
// at x must equal the reference slice, with need_second set exactly when
// x is not a multiple of 16.
module mc_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  logic in_valid, out_valid, sel_next;
  logic [18:0] sad_prev, sad_next, sad;
  logic signed [4:0] mvx_prev, mvy_prev, mvx_next, mvy_next, mv_x, mv_y;
  mc_select #(.SAD_W(19), .VW(5)) dut_sel (.*);

  logic [11:0] x;
  logic [7:0]  blk_addr;
  logic        need_second;
  logic [31:0] blk0 [16], blk1 [16], group [16];
  mc_align #(.N(16), .PW(32), .XW(12)) dut_al (.*);

  initial begin
    in_valid = 0; sad_prev = 0; sad_next = 0; mvx_prev = 0; mvy_prev = 0; mvx_next = 0; mvy_next = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      bit cut, exp_n;
      cut = (i >= 200);
      @(negedge clk);
      in_valid = 1;
      sad_prev = 19'($urandom_range(0, 5000)); sad_next = (i % 17 == 0) ? sad_prev : 19'($urandom_range(0, 5000));
      if (cut) sad_prev = 19'($urandom_range(200000, 260000));   // previous image belongs to another scene
      mvx_prev = 5'($urandom); mvy_prev = 5'($urandom); mvx_next = 5'($urandom); mvy_next = 5'($urandom);
      exp_n = sad_next < sad_prev;
      @(negedge clk); in_valid = 0;
      chk(out_valid, "valid");
      chk(sel_next == exp_n, "selection");
      chk(mv_x == (exp_n ? mvx_next : mvx_prev) && mv_y == (exp_n ? mvy_next : mvy_prev), "vector");
      chk(sad == (exp_n ? sad_next : sad_prev), "sad");
      if (cut) chk(sel_next, "scene cut not avoided");
    end
    for (int i = 0; i < 200; i++) begin
      logic [31:0] row [32];
      foreach (row[k]) row[k] = $urandom;
      x = 12'($urandom);
      for (int k = 0; k < 16; k++) begin blk0[k] = row[k]; blk1[k] = row[16 + k]; end
      #1;
      chk(blk_addr == 8'(x / 16), "block address");
      chk(need_second == (x % 16 != 0), "need_second");
      for (int k = 0; k < 16; k++) chk(group[k] == row[(x % 16) + k], $sformatf("group[%0d] x=%0d", k, x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
