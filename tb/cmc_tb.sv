// Testbench for the scheduling memory controller (cmc) with a DDR SDRAM model.
// Phase 1: random writes from all three ports, then reads of the same bursts;
//          every read beat must match a reference copy (with beat masks).
// Phase 2: 64 linear reads on one port must finish near the bus limit
//          (bank interleaving hides ACTIVATE and precharge).
// Phase 3: a read port and a write port both saturated: direction switches
//          must come about every MAX_BUNDLE bursts (bundling), neither starves.
// Phase 4: CPU port plus saturated data ports, once without and once with
//          priority: with priority the CPU's mean wait must drop; with the
//          traffic shaper at T=32, n=1 two CPU grants are never closer than 32.
// Throughout: no SDRAM protocol violation, refreshes at the set interval.
module cmc_tb;
  import flexfilm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [2:0]   req_valid, req_ready, req_we;
  logic [21:0]  req_addr [3];
  logic [127:0] req_wdata [3][4];
  logic [3:0]   req_wmask [3];
  logic         rd_valid, rd_last;
  logic [1:0]   rd_port;
  logic [127:0] rd_data;
  logic         cfg_prio, cfg_shape_en;
  logic [7:0]   cfg_shape_t;
  logic [2:0]   cfg_shape_n;
  sd_cmd_e      sd_cmd;
  logic [1:0]   sd_bank;
  logic [12:0]  sd_addr;
  logic [127:0] sd_dq_o, sd_dq_i;
  logic         sd_dq_oe;
  logic [3:0]   sd_dm;
  int violations, n_ref, n_act, n_cas, n_turn;

  cmc #(.NPORTS(3), .AW(22), .DW(128), .BEATS(4), .T_REFI(975)) dut (.*);
  ddr_sdram_model #(.CL(3), .T_RCD(3), .T_RP(3), .T_WR(3), .T_RFC(10), .BEATS(4)) mem (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", msg); end
  endtask

  // reference memory and expected read queue per port
  logic [127:0] ref_m [int];
  int  exp_addr [3][$];
  int  rbeat [3];
  int  n_rd_beats = 0;
  logic [127:0] key_data;

  function automatic logic [127:0] pattern(int a, int k);
    return {4{32'(a * 4 + k) ^ 32'hA5C3_0000}};
  endfunction
  function automatic int keyof(int a);
    return a * 4;   // model stores bursts at (row,col,bank) order = address * BEATS
  endfunction

  always @(posedge clk) if (rd_valid) begin
    int a, k;
    k = rbeat[rd_port];
    chk(exp_addr[rd_port].size() > 0, "unexpected read data");
    if (exp_addr[rd_port].size() > 0) begin
      a = exp_addr[rd_port][0];
      key_data = ref_m.exists(keyof(a) + k) ? ref_m[keyof(a) + k] : 128'(keyof(a) + k);
      chk(rd_data == key_data, $sformatf("port %0d addr %0d beat %0d data %h exp %h", rd_port, a, k, rd_data, key_data));
      chk(rd_last == (k == 3), "rd_last");
      if (k == 3) begin void'(exp_addr[rd_port].pop_front()); rbeat[rd_port] = 0; end
      else rbeat[rd_port] = k + 1;
    end
    n_rd_beats++;
  end

  // issue one request on a port and wait for acceptance
  task automatic issue(input int p, input bit we, input int a, input logic [3:0] mask);
    @(negedge clk);
    req_valid[p] = 1; req_we[p] = we; req_addr[p] = 22'(a); req_wmask[p] = mask;
    for (int k = 0; k < 4; k++) req_wdata[p][k] = pattern(a, k) ^ 128'($urandom);
    do @(posedge clk); while (!req_ready[p]);
    if (we) begin
      for (int k = 0; k < 4; k++) if (mask[k]) ref_m[keyof(a) + k] = req_wdata[p][k];
    end else exp_addr[p].push_back(a);
    #1 req_valid[p] = 0;
  endtask

  int addrs [64];
  int cpu_wait_noprio, cpu_wait_prio;
  int last_cpu_grant;

  // background saturating traffic on ports 1 (read) and 2 (write)
  bit bg_on = 0;
  int bg_a1 = 5000, bg_a2 = 9000, bg_grants [3];
  always @(posedge clk) if (bg_on) begin
    if (req_ready[1]) begin exp_addr[1].push_back(bg_a1); bg_a1 <= bg_a1 + 1; bg_grants[1]++; end
    if (req_ready[2]) begin
      for (int k = 0; k < 4; k++) ref_m[keyof(bg_a2) + k] = req_wdata[2][k];
      bg_a2 <= bg_a2 + 1; bg_grants[2]++;
    end
  end
  always_comb if (bg_on) begin
    req_addr[1] = 22'(bg_a1); req_addr[2] = 22'(bg_a2);
    for (int k = 0; k < 4; k++) req_wdata[2][k] = pattern(bg_a2, k);
  end

  task automatic cpu_run(input int n, output int total_wait);
    total_wait = 0;
    for (int i = 0; i < n; i++) begin
      longint t0;
      @(negedge clk);
      req_valid[0] = 1; req_we[0] = 0; req_addr[0] = 22'(20000 + i * 7); t0 = cyc;
      do @(posedge clk); while (!req_ready[0]);
      exp_addr[0].push_back(20000 + i * 7);
      if (cfg_shape_en) begin
        chk(last_cpu_grant < 0 || int'(cyc) - last_cpu_grant >= 32, $sformatf("shaper: grants %0d apart", int'(cyc) - last_cpu_grant));
        last_cpu_grant = int'(cyc);
      end
      total_wait += int'(cyc - t0);
      #1 req_valid[0] = 0;
      repeat (3) @(posedge clk);
    end
  endtask

  initial begin
    req_valid = 0; req_we = 0; cfg_prio = 0; cfg_shape_en = 0; cfg_shape_t = 32; cfg_shape_n = 1;
    for (int p = 0; p < 3; p++) begin req_addr[p] = 0; req_wmask[p] = '1; rbeat[p] = 0; for (int k = 0; k < 4; k++) req_wdata[p][k] = 0; end
    bg_grants = '{0, 0, 0};
    repeat (4) @(posedge clk); rst_n = 1;

    // ---- phase 1: write / read back
    for (int i = 0; i < 64; i++) addrs[i] = int'($urandom_range(0, 4000));
    fork
      for (int i = 0; i < 64; i += 3) issue(0, 1, addrs[i], 4'(i % 2 ? 4'b0011 : 4'b1111));
      for (int i = 1; i < 64; i += 3) issue(1, 1, addrs[i], 4'b1111);
      for (int i = 2; i < 64; i += 3) issue(2, 1, addrs[i], 4'b1100);
    join
    repeat (30) @(posedge clk);
    fork
      for (int i = 0; i < 64; i += 3) issue(0, 0, addrs[i], '1);
      for (int i = 1; i < 64; i += 3) issue(1, 0, addrs[i], '1);
      for (int i = 2; i < 64; i += 3) issue(2, 0, addrs[i], '1);
    join
    repeat (40) @(posedge clk);
    chk(exp_addr[0].size() == 0 && exp_addr[1].size() == 0 && exp_addr[2].size() == 0, "reads outstanding");

    // ---- phase 2: linear reads, bank interleaving
    begin
      longint t0;
      int beats0;
      beats0 = n_rd_beats;
      t0 = cyc;
      for (int i = 0; i < 64; i++) issue(1, 0, 3000 + i, '1);
      while (n_rd_beats - beats0 < 256 && cyc - t0 < 2000) @(posedge clk);
      $display("64 linear reads in %0d clocks", cyc - t0);
      chk(cyc - t0 <= 64 * 4 * 5 / 4 + 40, $sformatf("linear reads too slow: %0d clocks", cyc - t0));
    end

    // ---- phase 3: read/write bundling
    begin
      int t0, c0;
      t0 = n_turn; c0 = n_cas;
      bg_on = 1; req_we[1] = 0; req_we[2] = 1; req_valid[1] = 1; req_valid[2] = 1;
      repeat (800) @(posedge clk);
      $display("bundling: %0d column commands, %0d turnarounds, grants rd %0d wr %0d", n_cas - c0, n_turn - t0, bg_grants[1], bg_grants[2]);
      chk((n_turn - t0) * 3 <= (n_cas - c0) && (n_turn - t0) * 6 >= (n_cas - c0), "bundle length not about MAX_BUNDLE");
      chk(bg_grants[1] > 50 && bg_grants[2] > 50, "a direction starves");
    end

    // ---- phase 4: CPU priority and traffic shaping under load
    last_cpu_grant = -1;
    cpu_run(20, cpu_wait_noprio);
    cfg_prio = 1;
    cpu_run(20, cpu_wait_prio);
    $display("CPU wait without priority %0d, with priority %0d", cpu_wait_noprio, cpu_wait_prio);
    chk(cpu_wait_prio < cpu_wait_noprio, "priority does not reduce CPU wait");
    cfg_shape_en = 1;
    begin int w; cpu_run(20, w); end
    @(negedge clk); req_valid[1] = 0; req_valid[2] = 0;
    repeat (2) @(posedge clk); bg_on = 0;
    repeat (60) @(posedge clk);
    chk(exp_addr[0].size() == 0 && exp_addr[1].size() == 0, "reads outstanding at end");
    chk(violations == 0, $sformatf("%0d SDRAM protocol violations", violations));
    chk(n_ref >= int'(cyc / 975) - 1 && n_ref <= int'(cyc / 975) + 1, $sformatf("refresh count %0d over %0d clocks", n_ref, cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (40000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
