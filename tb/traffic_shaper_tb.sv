// Testbench for traffic_shaper: a requester asks every clock and is granted
// whenever 'allow' is high. For several (T, n) settings from the QoS tests
// (32/1, 61/2, 45/1, 93/2, 57/1, 113/2) the grant times are checked against a
// reference sliding-window model: no window of T clocks holds more than n
// grants, and every clock where the window had room was granted (no lost
// bandwidth). With shaping off every clock is granted.
module traffic_shaper_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_en, allow, grant;
  logic [7:0] cfg_t;
  logic [2:0] cfg_n;
  traffic_shaper #(.NMAX(4), .TW(8)) dut (.*);

  logic gate = 1;
  assign grant = allow && gate;
  int hist [$];
  int now;

  task automatic run(input int t, input int n, input int cycles);
    int g;
    @(negedge clk); cfg_en = 1; cfg_t = 8'(t); cfg_n = 3'(n);
    hist.delete();
    gate = 0;
    repeat (300) @(posedge clk);   // let old history age out
    g = 0;
    for (int c = 0; c < cycles; c++) begin
      int inwin;
      @(negedge clk);
      inwin = 0;
      foreach (hist[i]) if (now - hist[i] < t) inwin++;
      checks++;
      if (allow != (inwin < n)) begin
        failures++;
        if (failures < 10) $display("FAIL T=%0d n=%0d t=%0d allow=%0d inwin=%0d age=%p used=%b", t, n, now, allow, inwin, dut.age_q, dut.used_q);
      end
      if (allow) begin hist.push_back(now); g++; end
      gate = 1;
      @(posedge clk);
    end
    checks++;
    if (g < (cycles / t) * n) begin failures++; $display("FAIL T=%0d n=%0d only %0d grants", t, n, g); end
  endtask

  always @(posedge clk) now <= now + 1;

  initial begin
    now = 0; cfg_en = 0; cfg_t = 0; cfg_n = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (10) begin @(negedge clk); checks++; if (!allow) failures++; end
    run(32, 1, 400);  run(61, 2, 600);  run(45, 1, 400);
    run(93, 2, 800);  run(57, 1, 500);  run(113, 2, 900);
    run(4, 3, 200);   run(10, 4, 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
