// Testbench for load_gen: with an always-ready memory, one request every
// 'period' clocks at consecutive addresses and nothing lost; with a stalled
// memory the four-entry queue fills and the lost counter must count the
// missed deadlines exactly; the queue then drains in address order. Checks the write data pattern too.
module load_gen_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic cfg_en, cfg_we, req_valid, req_ready, req_we;
  logic [7:0] cfg_period;
  logic [21:0] cfg_base, req_addr;
  logic [127:0] req_wdata [4];
  logic [31:0] lost, issued;
  load_gen #(.AW(22), .DW(128), .BEATS(4), .PW(8)) dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  int n, last_t, t, exp_a;
  initial begin
    cfg_en = 0; cfg_we = 1; cfg_period = 10; cfg_base = 22'd100; req_ready = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); cfg_en = 1; req_ready = 1;
    n = 0; last_t = -1; t = 0; exp_a = 100;
    while (n < 30) begin
      @(posedge clk); t++;
      if (req_valid && req_ready) begin
        chk(req_addr == 22'(exp_a), $sformatf("addr %0d exp %0d", req_addr, exp_a));
        chk(req_wdata[1] == {4{32'(req_addr) ^ 32'h9E37_79B9}}, "write pattern");
        chk(req_we, "write flag");
        if (last_t >= 0) chk(t - last_t == 10, $sformatf("period %0d", t - last_t));
        last_t = t; exp_a++; n++;
      end
    end
    chk(lost == 0, "lost with ready memory");
    chk(issued == 30 || issued == 29, $sformatf("issued %0d", issued));
    // stalled memory: the queue takes the first four due requests, so
    // 20 periods lose 16; the queued addresses then drain in order
    @(negedge clk); cfg_en = 0; req_ready = 0; cfg_period = 8;
    @(negedge clk); cfg_en = 1;
    repeat (20 * 8 - 2) @(negedge clk);
    chk(lost == 16, $sformatf("lost count %0d", lost));
    chk(req_valid, "request still waiting");
    exp_a = int'(req_addr);
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); req_ready = 1;
      chk(req_valid && req_addr == 22'(exp_a + k), "queued address order");
    end
    repeat (40) @(negedge clk);
    chk(lost == 16, "lost after memory recovered");
    $display("lost %0d issued %0d", lost, issued);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
