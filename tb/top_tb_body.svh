// Shared body of the end-to-end testbenches of flexfilm_top. The including
// module declares localparams W, H (image size), NFR (frames of the exact
// reconstruction test), QOS_CYCLES, and instantiates the top as 'dut' with
// the signals declared here. The test:
//  1. loads a microprogram into the algorithm controller that sets the TDMA
//     schedule 1-2, zero wavelet thresholds and an LMC pattern, starts the
//     LMC and waits for its done flag;
//  2. runs two motion-estimation blocks whose best match lies in the previous
//     and then in the next image, checks vectors, SADs and the selection, and
//     fetches the motion-compensated group (aligned and unaligned case);
//  3. streams NFR frames of original and compensated pixels over the TDMA
//     link loop; with zero thresholds the noise-reduced output must equal the
//     original image exactly; then one frame with thresholds set must change
//     some pixels (coring active);
//  4. runs the memory QoS environment: CPU line reads against two load
//     generators, with priority and traffic shaping at period 16/16 (nothing
//     lost, CPU data correct, line-buffer hits) and then priority without
//     shaping at period 9/9 (requests lost).
// Every mechanism is counted and a failure is counted for any that never
// occurred.
  import flexfilm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", msg); end
  endtask

  logic me_win_we_prev, me_win_we_next, me_start, ref_valid, ref_ready, mv_valid, mv_sel_next;
  logic [4:0] me_win_col;
  logic [9:0] me_win_data [31];
  logic [9:0] ref_pix;
  logic signed [4:0] mv_x, mv_y;
  logic [18:0] mv_sad;
  logic [11:0] mc_blk_x;
  logic [7:0] mc_mem_blk;
  logic mc_mem_second;
  logic [31:0] mc_mem_blk0 [16], mc_mem_blk1 [16], mc_group [16];
  logic orig_valid, mcp_valid;
  logic [29:0] orig_pix, mcp_pix;
  logic [63:0] link_tx_data, link_rx_data;
  logic link_tx_valid, link_tx_sid, link_tx_sof, link_rx_valid, link_rx_sid;
  logic nr_flush, out_valid;
  logic [29:0] out_pix [2][2];
  logic cpu_req, cpu_we, cpu_ack, cpu_hit;
  logic [22:0] cpu_addr;
  logic [127:0] cpu_wdata [2], cpu_rdata [2];
  logic cfg_prio, cfg_shape_en, lg_en;
  logic [7:0] cfg_shape_t, lg_rd_period, lg_wr_period;
  logic [2:0] cfg_shape_n;
  logic [31:0] lg_rd_lost, lg_wr_lost;
  sd_cmd_e sd_cmd;
  logic [1:0] sd_bank;
  logic [12:0] sd_addr;
  logic [127:0] sd_dq_o, sd_dq_i;
  logic sd_dq_oe;
  logic [3:0] sd_dm;
  logic prog_we, ctrl_start, ctrl_busy, lmc_run, lmc_addr_valid;
  logic [3:0] prog_addr;
  logic [49:0] prog_data;
  logic [15:0] lmc_addr;
  int violations, n_ref, n_act, n_cas, n_turn;

  // link PHY stand-in: the wires are looped back
  assign link_rx_data = link_tx_data;
  assign link_rx_valid = link_tx_valid;
  assign link_rx_sid = link_tx_sid;

  ddr_sdram_model #(.CL(3), .T_RCD(3), .T_RP(3), .T_WR(3), .T_RFC(10), .BEATS(4)) u_mem (.*);

  // ---------------- mechanism counters ----------------
  int m_idle_slot = 0, m_sof = 0, m_sel_prev = 0, m_sel_next = 0, m_second = 0, m_aligned = 0;
  int m_flush_out = 0, m_coring = 0, m_prio_grant = 0, m_shaped = 0, m_turn = 0, m_ref = 0;
  int m_lost = 0, m_hit = 0, m_lmc_done = 0, m_wait = 0, m_interleave = 0;
  always @(posedge clk) if (rst_n) begin
    if (link_tx_sof) m_sof++;
    if (!link_tx_valid && dut.u_tx.slot_q != 0 && orig_valid) m_idle_slot++;
    if (nr_flush && out_valid) m_flush_out++;
    if (dut.u_cmc.req_valid[0] && dut.u_cmc.cfg_shape_en && !dut.u_cmc.shape_allow) m_shaped++;
    if (dut.u_cmc.req_ready[0] && dut.u_cmc.cfg_prio && (dut.u_cmc.req_valid[1] || dut.u_cmc.req_valid[2])) m_prio_grant++;
    if (sd_cmd == SD_ACT && dut.u_cmc.sd_dq_oe) m_interleave++;
    if (sd_cmd == SD_ACT && dut.u_cmc.rd_ok_cnt != 0) m_interleave++;
    if (dut.u_lmc.done) m_lmc_done++;
    if (ctrl_busy && dut.u_ctrl.op == 2'd1) m_wait++;
  end

  // ---------------- pixel functions ----------------
  function automatic logic [29:0] opix(int f, int r, int c);
    logic [31:0] h;
    h = 32'(f * 7919 + r * 131 + c * 17) * 32'h9E37_79B9;
    return {h[29:20], h[19:10] ^ h[31:22], 10'(r * 37 + c * 5 + f * 11)};
  endfunction
  function automatic logic [29:0] mpix(int f, int r, int c);
    logic [29:0] o; o = opix(f, r, c);
    return {o[29:20] ^ 10'(c & 7), o[19:10] ^ 10'(r & 3), o[9:0] ^ 10'(c + r & 15)};
  endfunction

  // ---------------- output checker ----------------
  int of = 0, ok_ = 0, om = 0, n_out = 0, n_diff = 0;
  bit coring_frame = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    for (int rr = 0; rr < 2; rr++) for (int p = 0; p < 2; p++) begin
      logic [29:0] e;
      e = opix(of, 2 * ok_ + rr, 2 * om + p);
      if (!coring_frame) chk(out_pix[rr][p] == e, $sformatf("frame %0d row %0d col %0d: %h exp %h", of, 2 * ok_ + rr, 2 * om + p, out_pix[rr][p], e));
      else if (out_pix[rr][p] != e) n_diff++;
    end
    n_out++;
    om++;
    if (om == W / 2) begin om = 0; ok_++; if (ok_ == H / 2) begin ok_ = 0; of++; end end
  end

  // ---------------- helpers ----------------
  function automatic logic [49:0] ins(input int op, input int a, input int b);
    return {2'(op), 16'(a), 32'(b)};
  endfunction
  task automatic run_program(input int thr);
    logic [49:0] p [16];
    int n;
    n = 0;
    p[n++] = ins(0, 16'h0300, 0); p[n++] = ins(0, 16'h0301, 1); p[n++] = ins(0, 16'h03FF, 2);
    p[n++] = ins(0, 16'h0200, thr); p[n++] = ins(0, 16'h0201, thr); p[n++] = ins(0, 16'h0202, thr);
    p[n++] = ins(0, 16'h0100, 64); p[n++] = ins(0, 16'h0101, 16); p[n++] = ins(0, 16'h0102, 1);
    p[n++] = ins(0, 16'h0103, 16); p[n++] = ins(0, 16'h0104, 16); p[n++] = ins(0, 16'h0105, 1);
    p[n++] = ins(1, 0, 0); p[n++] = ins(3, 0, 0);
    for (int i = 0; i < n; i++) begin @(negedge clk); prog_we = 1; prog_addr = 4'(i); prog_data = p[i]; end
    @(negedge clk); prog_we = 0; ctrl_start = 1;
    @(negedge clk); ctrl_start = 0;
    while (ctrl_busy) @(negedge clk);
  endtask

  int P_OK = 16, P_LOSS = 9;
  initial begin void'($value$plusargs("pok=%d", P_OK)); void'($value$plusargs("ploss=%d", P_LOSS)); end
  int win_p [31][31], win_n [31][31], blk [16][16];
  task automatic me_block(input bit match_next, input int dx, input int dy);
    int exp_sad, sp, sn;
    for (int r = 0; r < 31; r++) for (int c = 0; c < 31; c++) begin
      win_p[r][c] = int'($urandom_range(0, 1023)); win_n[r][c] = int'($urandom_range(0, 1023));
    end
    for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++)
      blk[i][j] = match_next ? win_n[i + dy + 8][j + dx + 8] : win_p[i + dy + 8][j + dx + 8];
    for (int c = 0; c < 31; c++) begin
      @(negedge clk); me_win_col = 5'(c);
      me_win_we_prev = 1; me_win_we_next = 0; for (int r = 0; r < 31; r++) me_win_data[r] = 10'(win_p[r][c]);
      @(negedge clk);
      me_win_we_prev = 0; me_win_we_next = 1; for (int r = 0; r < 31; r++) me_win_data[r] = 10'(win_n[r][c]);
    end
    @(negedge clk); me_win_we_next = 0; me_start = 1;
    @(negedge clk); me_start = 0;
    for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++) begin
      ref_valid = 1; ref_pix = 10'(blk[i][j]);
      @(negedge clk);
    end
    ref_valid = 0;
    while (!mv_valid) @(negedge clk);
    chk(mv_x == 5'(dx) && mv_y == 5'(dy) && mv_sad == 0 && mv_sel_next == match_next,
        $sformatf("ME result (%0d,%0d) sad %0d next %0d", mv_x, mv_y, mv_sad, mv_sel_next));
    if (mv_sel_next) m_sel_next++; else m_sel_prev++;
    // motion-compensated fetch: block column 160 plus the vector
    mc_blk_x = 12'(160);
    for (int k = 0; k < 16; k++) begin mc_mem_blk0[k] = 32'(1000 + k); mc_mem_blk1[k] = 32'(2000 + k); end
    #1;
    chk(mc_mem_blk == 8'((160 + dx) / 16) && mc_mem_second == ((160 + dx) % 16 != 0), "MC block address");
    for (int k = 0; k < 16; k++) begin
      int o; o = (160 + dx) % 16 + k;
      chk(mc_group[k] == (o < 16 ? 32'(1000 + o) : 32'(2000 + o - 16)), "MC group");
    end
    if (mc_mem_second) m_second++; else m_aligned++;
  endtask

  task automatic stream_frames(input int f0, input int nf);
    for (int f = f0; f < f0 + nf; f++) for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
      @(negedge clk);
      orig_valid = 1; mcp_valid = 1; orig_pix = opix(f, r, c); mcp_pix = mpix(f, r, c);
    end
    @(negedge clk); orig_valid = 0; mcp_valid = 0;
    // a short pause: the TDMA slots go out idle
    repeat (20) @(negedge clk);
    nr_flush = 1;
    repeat (W / 2 + 20) @(negedge clk);
    nr_flush = 0;
  endtask

  logic [127:0] cpu_exp;
  task automatic cpu_reads(input int n);
    for (int i = 0; i < n; i++) begin
      int la;
      la = 40000 + int'($urandom_range(0, 63));
      @(negedge clk); cpu_req = 1; cpu_we = 0; cpu_addr = 23'(la);
      @(posedge clk); while (!cpu_ack) @(posedge clk);
      for (int k = 0; k < 2; k++) begin
        int key; key = (la / 2) * 4 + (la % 2) * 2 + k;
        chk(cpu_rdata[k] == 128'(key), $sformatf("CPU line %0d beat %0d", la, k));
      end
      if (cpu_hit) m_hit++;
      @(negedge clk); cpu_req = 0;
      repeat (int'($urandom_range(2, 30))) @(negedge clk);
    end
  endtask

  initial begin
    me_win_we_prev = 0; me_win_we_next = 0; me_start = 0; ref_valid = 0; ref_pix = 0; me_win_col = 0;
    foreach (me_win_data[i]) me_win_data[i] = 0;
    mc_blk_x = 0; foreach (mc_mem_blk0[i]) begin mc_mem_blk0[i] = 0; mc_mem_blk1[i] = 0; end
    orig_valid = 0; mcp_valid = 0; orig_pix = 0; mcp_pix = 0; nr_flush = 0;
    cpu_req = 0; cpu_we = 0; cpu_addr = 0; cpu_wdata = '{0, 0};
    cfg_prio = 0; cfg_shape_en = 0; cfg_shape_t = 57; cfg_shape_n = 1; lg_en = 0; lg_rd_period = 12; lg_wr_period = 12;
    prog_we = 0; prog_addr = 0; prog_data = 0; ctrl_start = 0; lmc_run = 1;
    repeat (4) @(posedge clk); rst_n = 1;

    // 1. weak programming
    run_program(0);
    chk(m_lmc_done == 1, "LMC sequence did not complete once");
    chk(dut.thr_q[0] == 0 && dut.sched_len_q == 2, "registers not programmed");

    // 2. motion estimation / compensation
    me_block(0, 3, -2);
    me_block(1, -5, 6);
    me_block(1, 0, 0);

    // 3. link and noise reduction: exact reconstruction
    stream_frames(0, NFR);
    chk(of == NFR && n_out == NFR * W * H / 4, $sformatf("output frames %0d, words %0d", of, n_out));
    //    coring active
    run_program(60);
    coring_frame = 1;
    stream_frames(NFR, 1);
    coring_frame = 0;
    m_coring = n_diff;
    chk(of == NFR + 1, "coring frame incomplete");

    // 4. memory QoS
    lg_rd_period = 8'(P_OK); lg_wr_period = 8'(P_OK);
    lg_en = 1; cfg_prio = 1; cfg_shape_en = 1;
    cpu_reads(QOS_CYCLES / 40);
    chk(lg_rd_lost == 0 && lg_wr_lost == 0, $sformatf("lost with shaping at %0d/%0d: %0d/%0d", P_OK, P_OK, lg_rd_lost, lg_wr_lost));
    @(negedge clk); lg_en = 0;
    @(negedge clk); lg_en = 1; cfg_shape_en = 0; lg_rd_period = 8'(P_LOSS); lg_wr_period = 8'(P_LOSS);
    cpu_reads(QOS_CYCLES / 40);
    m_lost = int'(lg_rd_lost + lg_wr_lost);
    @(negedge clk); lg_en = 0;
    repeat (50) @(negedge clk);
    m_ref = n_ref; m_turn = n_turn;
    chk(violations == 0, $sformatf("%0d SDRAM protocol violations", violations));

    $display("mechanisms: idle_slot=%0d sof=%0d sel_prev=%0d sel_next=%0d mc_second=%0d mc_aligned=%0d flush_out=%0d coring=%0d",
             m_idle_slot, m_sof, m_sel_prev, m_sel_next, m_second, m_aligned, m_flush_out, m_coring);
    $display("            prio_grant=%0d shaped=%0d rw_turn=%0d refresh=%0d lost=%0d line_hit=%0d lmc_done=%0d ctrl_wait=%0d interleave=%0d",
             m_prio_grant, m_shaped, m_turn, m_ref, m_lost, m_hit, m_lmc_done, m_wait, m_interleave);
    chk(m_idle_slot > 0, "no idle TDMA slot");      chk(m_sof > 0, "no schedule start");
    chk(m_sel_prev > 0, "never chose previous");    chk(m_sel_next > 0, "never chose next");
    chk(m_second > 0, "never unaligned MC fetch");  chk(m_aligned > 0, "never aligned MC fetch");
    chk(m_flush_out > 0, "no flushed output");      chk(m_coring > 0, "coring never changed a pixel");
    chk(m_prio_grant > 0, "no CPU priority grant"); chk(m_shaped > 0, "shaper never held the CPU");
    chk(m_turn > 0, "no bus turnaround");           chk(m_ref > 0, "no refresh");
    chk(m_lost > 0, "no lost request");             chk(m_hit > 0, "no line-buffer hit");
    chk(m_lmc_done > 0, "LMC never done");          chk(m_wait > 0, "controller never waited");
    chk(m_interleave > 0, "no bank interleaving");
    $display("simulated %0d clocks", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
