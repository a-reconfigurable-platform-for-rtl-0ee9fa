// Testbench for lmc_agen: programs several access patterns over the control
// bus (row-major, column-major transposition of a 16x16 tile, reversed rows
// with negative stride) and compares every address with a reference list;
// 'run' is randomly withheld; 'done' must pulse once after the last address.
// Writes to another page must be ignored.
module lmc_agen_tb;
  import flexfilm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic cb_we, run, addr_valid, done;
  logic [15:0] cb_addr, addr;
  logic [31:0] cb_wdata;
  lmc_agen #(.AW(16), .BASE(8'h01)) dut (.*);
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  task automatic cbw(input logic [15:0] a, input int d);
    @(negedge clk); cb_we = 1; cb_addr = a; cb_wdata = 32'(d);
    @(negedge clk); cb_we = 0;
  endtask
  task automatic pattern(input int base, input int sx, input int sy, input int cx, input int cy);
    int exp [$], n_done;
    run = 0;
    for (int y = 0; y < cy; y++) for (int x = 0; x < cx; x++) exp.push_back((base + x * sx + y * sy) & 16'hFFFF);
    cbw(16'h0100, base); cbw(16'h0101, sx); cbw(16'h0102, sy); cbw(16'h0103, cx); cbw(16'h0104, cy);
    cbw(16'h0201, 99);   // another macro's page
    cbw(16'h0105, 1);
    n_done = 0;
    while (exp.size() > 0 || addr_valid) begin
      @(negedge clk);
      run = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (done) n_done++;
      if (addr_valid && run) begin
        chk(exp.size() > 0 && addr == 16'(exp[0]), $sformatf("addr %0d exp %0d", addr, exp.size() > 0 ? exp[0] : -1));
        void'(exp.pop_front());
      end
    end
    @(posedge clk); if (done) n_done++;
    chk(n_done == 1, $sformatf("done pulses %0d", n_done));
  endtask
  initial begin
    cb_we = 0; cb_addr = 0; cb_wdata = 0; run = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    pattern(100, 1, 16, 16, 4);       // row-major
    pattern(0, 16, 1, 16, 16);        // column-major walk of a 16x16 tile
    pattern(500, -1, 32, 8, 3);       // reversed rows
    pattern(1000, 17, 0, 5, 2);       // diagonal
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
