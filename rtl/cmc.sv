// Scheduling SDRAM memory controller ("CMC") with quality of service.
// Requests always cover one full SDRAM burst (BEATS clocks of DW bits, here
// 8 words of 64 bit moved two per clock) and every access uses auto precharge,
// so a request is exactly ACTIVATE, then READ-AP or WRITE-AP.
//
// Scheduling happens in two stages. Stage 1 looks at the head request of every
// port and keeps those whose bank can be activated now (bank interleaving: a
// request for an idle bank is activated while another bank is still bursting
// or precharging). Stage 2 picks one of them: port 0, the CPU port, first when
// cfg_prio is set; otherwise a request of the same direction as the last
// activated request (read/write bundling, which saves bus turnaround clocks)
// until MAX_BUNDLE such requests in a row, after which the other direction is
// preferred so that neither starves; round robin within each choice. Port 0 is also subject to the traffic shaper
// (cfg_shape_*: at most n requests in any T clocks) so that prioritised CPU
// traffic cannot starve the data path.
//
// The command engine issues at most one command per clock: a pending column
// command first, then a refresh when due and all banks are idle, then an
// ACTIVATE of the stage-2 winner. One activated request waits tRCD in a
// holding register while the previous burst is still on the bus. Read data
// arrive CL clocks after READ-AP and are returned on rd_* one clock later,
// tagged with the port. Write data leave one clock after WRITE-AP.
// A request is accepted (req_ready) in the clock its ACTIVATE is issued.
//
// The QoS rules, auto precharge, full bursts and bank interleaving follow the
// source. Timing values, command encoding, the holding register and the
// stage details are this design's choices; the DDR I/O registers are outside,
// so sd_dq_* carry one 128-bit word per controller clock.
module cmc
  import flexfilm_pkg::*;
#(
  parameter int unsigned NPORTS = 3,
  parameter int unsigned AW     = 22,
  parameter int unsigned DW     = 128,
  parameter int unsigned BEATS  = 4,
  parameter int unsigned BANK_W = 2,
  parameter int unsigned COL_W  = 7,
  parameter int unsigned T_RCD  = 3,
  parameter int unsigned T_RP   = 3,
  parameter int unsigned T_WR   = 3,
  parameter int unsigned T_WTR  = 2,
  parameter int unsigned CL     = 3,
  parameter int unsigned T_REFI = 975,
  parameter int unsigned T_RFC  = 10,
  parameter int unsigned MAX_BUNDLE = 4,
  localparam int unsigned PW    = (NPORTS > 1) ? $clog2(NPORTS) : 1,
  localparam int unsigned ROW_W = AW - BANK_W - COL_W,
  localparam int unsigned NB    = 1 << BANK_W
) (
  input  logic                clk,
  input  logic                rst_n,
  // request ports (port 0 = CPU)
  input  logic [NPORTS-1:0]   req_valid,
  output logic [NPORTS-1:0]   req_ready,
  input  logic [NPORTS-1:0]   req_we,
  input  logic [AW-1:0]       req_addr  [NPORTS],
  input  logic [DW-1:0]       req_wdata [NPORTS][BEATS],
  input  logic [BEATS-1:0]    req_wmask [NPORTS],
  // read return
  output logic                rd_valid,
  output logic [PW-1:0]       rd_port,
  output logic [DW-1:0]       rd_data,
  output logic                rd_last,
  // QoS configuration
  input  logic                cfg_prio,
  input  logic                cfg_shape_en,
  input  logic [7:0]          cfg_shape_t,
  input  logic [2:0]          cfg_shape_n,
  // SDRAM side
  output sd_cmd_e             sd_cmd,
  output logic [BANK_W-1:0]   sd_bank,
  output logic [ROW_W-1:0]    sd_addr,
  output logic [DW-1:0]       sd_dq_o,
  output logic                sd_dq_oe,
  output logic [BEATS-1:0]    sd_dm,
  input  logic [DW-1:0]       sd_dq_i
);
  localparam int unsigned WL   = 1;
  localparam logic [7:0]  BUSY = 8'hFF;
  localparam int unsigned RD_BANK_GAP = BEATS + T_RP;
  localparam int unsigned WR_BANK_GAP = WL + BEATS + T_WR + T_RP;
  localparam int unsigned R2W_GAP = CL + BEATS + 1 - WL;
  localparam int unsigned W2R_GAP = WL + BEATS + T_WTR;
  localparam int unsigned PIPE = CL + BEATS;

  // ---------------- address translation per port ----------------
  logic [BANK_W-1:0] p_bank [NPORTS];
  logic [COL_W-1:0]  p_col  [NPORTS];
  logic [ROW_W-1:0]  p_row  [NPORTS];
  for (genvar p = 0; p < NPORTS; p++) begin : g_map
    cmc_addr_map #(.AW(AW), .BANK_W(BANK_W), .COL_W(COL_W)) u_map (
      .addr(req_addr[p]), .bank(p_bank[p]), .col(p_col[p]), .row(p_row[p]));
  end

  // ---------------- state ----------------
  logic [7:0]  bank_cnt [NB];
  logic        slot_v;
  logic [PW-1:0] slot_port;
  logic        slot_we;
  logic [BANK_W-1:0] slot_bank;
  logic [COL_W-1:0]  slot_col;
  logic [DW-1:0]     slot_wdata [BEATS];
  logic [BEATS-1:0]  slot_wmask;
  logic [7:0]  rcd_cnt, rd_ok_cnt, wr_ok_cnt;
  logic        last_we;
  logic [3:0]  bundle_q;
  logic        pref_we;
  logic [PW-1:0] rr_ptr;
  logic [15:0] ref_cnt;
  logic        ref_pend;
  logic [DW-1:0]    wbuf [BEATS];
  logic [BEATS-1:0] wbuf_mask;
  logic [3:0]  wcnt;
  logic        pipe_v [PIPE];
  logic        pipe_l [PIPE];
  logic [PW-1:0] pipe_p [PIPE];

  // ---------------- stage 1 / stage 2 selection ----------------
  logic [NPORTS-1:0] elig;
  logic              shape_allow;
  logic              pick_v;
  logic [PW-1:0]     pick;
  logic              do_cas, do_ref, do_act;
  logic              all_idle;

  traffic_shaper #(.NMAX(4), .TW(8)) u_shaper (
    .clk, .rst_n, .cfg_en(cfg_shape_en), .cfg_t(cfg_shape_t), .cfg_n(cfg_shape_n),
    .grant(do_act && pick == '0), .allow(shape_allow));

  always_comb begin
    for (int p = 0; p < NPORTS; p++)
      elig[p] = req_valid[p] && (bank_cnt[p_bank[p]] == 8'd0);
    if (!shape_allow) elig[0] = 1'b0;
    pick_v = 1'b0;
    pick   = '0;
    pref_we = (bundle_q >= 4'(MAX_BUNDLE)) ? !last_we : last_we;
    if (cfg_prio && elig[0]) begin
      pick_v = 1'b1;
      pick   = '0;
    end else begin
      // round robin among same-direction requests first, then any
      for (int k = NPORTS - 1; k >= 0; k--) begin
        automatic int p = (int'(rr_ptr) + k) % NPORTS;
        if (elig[p] && (req_we[p] == pref_we)) begin
          pick_v = 1'b1;
          pick   = PW'(p);
        end
      end
      if (!pick_v) begin
        for (int k = NPORTS - 1; k >= 0; k--) begin
          automatic int p = (int'(rr_ptr) + k) % NPORTS;
          if (elig[p]) begin
            pick_v = 1'b1;
            pick   = PW'(p);
          end
        end
      end
    end
  end

  always_comb begin
    all_idle = 1'b1;
    for (int b = 0; b < NB; b++) if (bank_cnt[b] != 8'd0) all_idle = 1'b0;
  end

  assign do_cas = slot_v && (rcd_cnt == 8'd0) &&
                  (slot_we ? (wr_ok_cnt == 8'd0) : (rd_ok_cnt == 8'd0));
  assign do_ref = !do_cas && ref_pend && !slot_v && all_idle;
  assign do_act = !do_cas && !ref_pend && !slot_v && pick_v;

  always_comb begin
    req_ready = '0;
    if (do_act) req_ready[pick] = 1'b1;
  end

  // ---------------- command bus ----------------
  always_comb begin
    sd_cmd  = SD_NOP;
    sd_bank = '0;
    sd_addr = '0;
    if (do_cas) begin
      sd_cmd  = slot_we ? SD_WRA : SD_RDA;
      sd_bank = slot_bank;
      sd_addr = ROW_W'(slot_col);
    end else if (do_ref) begin
      sd_cmd  = SD_REF;
    end else if (do_act) begin
      sd_cmd  = SD_ACT;
      sd_bank = p_bank[pick];
      sd_addr = p_row[pick];
    end
  end

  // ---------------- write data ----------------
  always_comb begin
    sd_dq_oe = (wcnt >= 4'(WL)) && (wcnt < 4'(WL + BEATS));
    sd_dq_o  = '0;
    sd_dm    = '1;
    if (sd_dq_oe) begin
      sd_dq_o = wbuf[$clog2(BEATS)'(wcnt - 4'(WL))];
      sd_dm   = ~wbuf_mask;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NB; b++) bank_cnt[b] <= '0;
      slot_v <= 1'b0; slot_port <= '0; slot_we <= 1'b0; slot_bank <= '0; slot_col <= '0;
      slot_wmask <= '0;
      for (int i = 0; i < BEATS; i++) begin slot_wdata[i] <= '0; wbuf[i] <= '0; end
      rcd_cnt <= '0; rd_ok_cnt <= '0; wr_ok_cnt <= '0;
      last_we <= 1'b0; bundle_q <= '0; rr_ptr <= '0;
      ref_cnt <= '0; ref_pend <= 1'b0;
      wbuf_mask <= '0; wcnt <= 4'(WL + BEATS);
      for (int i = 0; i < PIPE; i++) begin pipe_v[i] <= 1'b0; pipe_l[i] <= 1'b0; pipe_p[i] <= '0; end
      rd_valid <= 1'b0; rd_port <= '0; rd_data <= '0; rd_last <= 1'b0;
    end else begin
      // counters
      for (int b = 0; b < NB; b++)
        if (bank_cnt[b] != 8'd0 && bank_cnt[b] != BUSY) bank_cnt[b] <= bank_cnt[b] - 1'b1;
      if (rcd_cnt   != 0) rcd_cnt   <= rcd_cnt - 1'b1;
      if (rd_ok_cnt != 0) rd_ok_cnt <= rd_ok_cnt - 1'b1;
      if (wr_ok_cnt != 0) wr_ok_cnt <= wr_ok_cnt - 1'b1;
      if (wcnt < 4'(WL + BEATS)) wcnt <= wcnt + 1'b1;
      if (ref_cnt == 16'(T_REFI - 1)) begin
        ref_cnt  <= '0;
        ref_pend <= 1'b1;
      end else begin
        ref_cnt <= ref_cnt + 1'b1;
      end

      // read return pipeline
      for (int i = 0; i < PIPE - 1; i++) begin
        pipe_v[i] <= pipe_v[i+1]; pipe_l[i] <= pipe_l[i+1]; pipe_p[i] <= pipe_p[i+1];
      end
      pipe_v[PIPE-1] <= 1'b0;
      rd_valid <= pipe_v[0];
      rd_last  <= pipe_l[0];
      rd_port  <= pipe_p[0];
      if (pipe_v[0]) rd_data <= sd_dq_i;

      if (do_cas) begin
        slot_v  <= 1'b0;
        if (slot_we) begin
          bank_cnt[slot_bank] <= 8'(WR_BANK_GAP - 1);
          wr_ok_cnt <= 8'(BEATS - 1);
          rd_ok_cnt <= 8'(W2R_GAP - 1);
          wbuf      <= slot_wdata;
          wbuf_mask <= slot_wmask;
          wcnt      <= 4'd1;
        end else begin
          bank_cnt[slot_bank] <= 8'(RD_BANK_GAP - 1);
          rd_ok_cnt <= 8'(BEATS - 1);
          if (wr_ok_cnt < 8'(R2W_GAP - 1)) wr_ok_cnt <= 8'(R2W_GAP - 1);
          for (int k = 0; k < BEATS; k++) begin
            pipe_v[CL - 1 + k] <= 1'b1;
            pipe_l[CL - 1 + k] <= (k == BEATS - 1);
            pipe_p[CL - 1 + k] <= slot_port;
          end
        end
      end else if (do_ref) begin
        ref_pend <= 1'b0;
        for (int b = 0; b < NB; b++) bank_cnt[b] <= 8'(T_RFC - 1);
      end else if (do_act) begin
        slot_v     <= 1'b1;
        slot_port  <= pick;
        slot_we    <= req_we[pick];
        slot_bank  <= p_bank[pick];
        slot_col   <= p_col[pick];
        slot_wdata <= req_wdata[pick];
        slot_wmask <= req_wmask[pick];
        rcd_cnt    <= 8'(T_RCD - 1);
        last_we    <= req_we[pick];
        bundle_q   <= (req_we[pick] == last_we) ? ((bundle_q == 4'hF) ? bundle_q : bundle_q + 1'b1) : 4'd1;
        bank_cnt[p_bank[pick]] <= BUSY;
        rr_ptr     <= (int'(pick) == NPORTS - 1) ? '0 : pick + 1'b1;
      end
    end
  end

  // one command per clock, and never activate a bank that is not idle
  assert property (@(posedge clk) disable iff (!rst_n)
    (sd_cmd == SD_ACT) |-> (bank_cnt[sd_bank] == 8'd0))
    else $error("cmc: ACTIVATE to a busy bank");
endmodule
