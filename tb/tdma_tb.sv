// Testbench for the TDMA link pair (tdma_tx -> tdma_rx).
// Programs the slot table with the schedule 1-2-1-2-1 (stream 0 owns three of
// five slots, stream 1 two), keeps both streams' FIFOs filled with numbered
// words and checks: every slot carries the stream the table names, the start
// mark sits on slot 0, each stream receives its words in order and complete,
// and over 50 schedule periods the words per stream are exactly 3:2. Then
// stream 1 is starved and its slots must go out idle.
module tdma_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0]  s_valid, s_ready, m_valid;
  logic [63:0] s_data [2];
  logic [63:0] m_data [2];
  logic        sched_we;
  logic [2:0]  sched_addr;
  logic        sched_sid;
  logic [3:0]  sched_len;
  logic [63:0] link_data;
  logic        link_valid, link_sid, link_sof;

  tdma_tx #(.NSTREAMS(2), .DW(64), .SLOTS(8), .FIFO_DEPTH(4)) dut_tx (.*);
  tdma_rx #(.NSTREAMS(2), .DW(64)) dut_rx (.clk, .rst_n, .link_data, .link_valid, .link_sid, .m_valid, .m_data);

  int sent [2], rcvd [2], slot, starve;
  logic exp_sid [5] = '{0, 1, 0, 1, 0};

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  // producers: keep FIFOs filled with numbered words
  always_comb for (int s = 0; s < 2; s++) s_data[s] = {32'(s), 32'(sent[s])};
  always_ff @(posedge clk) if (rst_n) for (int s = 0; s < 2; s++) if (s_valid[s] && s_ready[s]) sent[s] <= sent[s] + 1;

  // consumers: in-order check
  always_ff @(posedge clk) if (rst_n) for (int s = 0; s < 2; s++) if (m_valid[s]) begin
    chk(m_data[s] == {32'(s), 32'(rcvd[s])}, $sformatf("stream %0d word %0d got %h", s, rcvd[s], m_data[s]));
    rcvd[s] <= rcvd[s] + 1;
  end

  initial begin
    sent = '{0, 0}; rcvd = '{0, 0};
    s_valid = '0; sched_we = 0; sched_addr = 0; sched_sid = 0; sched_len = 4'd5; starve = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5; k++) begin
      @(negedge clk); sched_we = 1; sched_addr = 3'(k); sched_sid = exp_sid[k];
    end
    @(negedge clk); sched_we = 0;
    // wait for a schedule start, then fill
    s_valid = 2'b11;
    repeat (20) @(posedge clk);
    // observe 50 periods aligned on sof
    while (!link_sof) @(posedge clk);
    begin
      int cnt [2];
      cnt = '{0, 0};
      for (int p = 0; p < 50; p++) for (int k = 0; k < 5; k++) begin
        chk(link_sof == (k == 0), "sof position");
        chk(link_sid == exp_sid[k], $sformatf("slot %0d sid %0d", k, link_sid));
        chk(link_valid, "slot idle although stream has data");
        if (link_valid) cnt[link_sid]++;
        @(posedge clk);
      end
      chk(cnt[0] == 150 && cnt[1] == 100, $sformatf("bandwidth split %0d:%0d", cnt[0], cnt[1]));
    end
    // starve stream 1: its slots must be idle, stream 0 keeps its slots
    @(negedge clk); s_valid = 2'b01;
    repeat (20) @(posedge clk);
    for (int k = 0; k < 25; k++) begin
      if (link_sid == 1'b1) begin chk(!link_valid, "starved stream slot not idle"); starve++; end
      else chk(link_valid, "stream 0 slot lost");
      @(posedge clk);
    end
    @(negedge clk); s_valid = 2'b00;
    repeat (20) @(posedge clk);
    chk(starve == 10, "starved slot count");
    chk(rcvd[0] == sent[0] && rcvd[1] == sent[1], $sformatf("all words delivered %0d/%0d %0d/%0d", rcvd[0], sent[0], rcvd[1], sent[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
