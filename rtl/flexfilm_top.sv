// Film-processing platform: the noise-reduction application and the
// memory quality-of-service environment, wired as one design.
//
// 1. Motion estimation / compensation (first processing FPGA). Reference
//    pixels arrive row-major and are reordered to column-major 16x16 tiles
//    (lmc_transpose). Two full-search estimators match each block against the
//    previous and the next image; mc_select keeps the vector with the smaller
//    SAD, and mc_align turns it into the aligned frame-memory block(s) and the
//    shifted 16-pixel group. Search windows and frame-memory blocks come from
//    the frame memories, which are outside (ports).
// 2. Link to the second FPGA. The original and the motion-compensated pixel
//    streams (30-bit RGB) are packed two per 64-bit word and sent over one
//    TDMA link with the schedule 1-2 (tdma_tx/tdma_rx); the link wires are
//    brought out and looped back outside the top, where the link PHY sits.
// 3. Temporal/spatial noise reduction (second and third FPGA). The two
//    streams are re-paired, a temporal Haar filter forms low and high images,
//    each colour component of each image passes a 2D 5/3 wavelet noise
//    reducer, and the inverse Haar filter rebuilds the output image, two rows
//    and two pixels per clock (see dwt2d_nr).
// 4. Memory QoS environment: the scheduling SDRAM controller with the CPU
//    interface (line buffer) on its priority port and a read and a write load
//    generator on the data-path ports. SDRAM and CPU are outside (ports).
// 5. Weak programming: the central algorithm controller writes macro
//    registers over the control bus: page 1 = LMC address generator, page 2 =
//    wavelet thresholds (registers 0..2 = LH, HL, HH), page 3 = TDMA slot
//    table (register k = slot k, register 255 = schedule length).
//
// IMG_W x IMG_H is the image size of the wavelet path (2048 x 2048 by
// default). Subsystems that sit on separate FPGAs or boards stand side by side
// here; the PCI-Express router, link PHYs, CPU and SDRAM chips are outside.
module flexfilm_top
  import flexfilm_pkg::*;
#(
  parameter int unsigned IMG_W = 2048,
  parameter int unsigned IMG_H = 2048
) (
  input  logic                clk,
  input  logic                rst_n,
  // ---- motion estimation
  input  logic                me_win_we_prev,
  input  logic                me_win_we_next,
  input  logic [4:0]          me_win_col,
  input  logic [COMP_W-1:0]   me_win_data [31],
  input  logic                me_start,
  input  logic                ref_valid,
  output logic                ref_ready,
  input  logic [COMP_W-1:0]   ref_pix,
  output logic                mv_valid,
  output logic                mv_sel_next,
  output logic signed [4:0]   mv_x,
  output logic signed [4:0]   mv_y,
  output logic [18:0]         mv_sad,
  // ---- motion compensation fetch
  input  logic [11:0]         mc_blk_x,
  output logic [7:0]          mc_mem_blk,
  output logic                mc_mem_second,
  input  logic [31:0]         mc_mem_blk0 [16],
  input  logic [31:0]         mc_mem_blk1 [16],
  output logic [31:0]         mc_group [16],
  // ---- pixel streams onto the link
  input  logic                orig_valid,
  input  logic [RGB_W-1:0]    orig_pix,
  input  logic                mcp_valid,
  input  logic [RGB_W-1:0]    mcp_pix,
  output logic [LINK_W-1:0]   link_tx_data,
  output logic                link_tx_valid,
  output logic                link_tx_sid,
  output logic                link_tx_sof,
  input  logic [LINK_W-1:0]   link_rx_data,
  input  logic                link_rx_valid,
  input  logic                link_rx_sid,
  // ---- noise-reduced output
  input  logic                nr_flush,
  output logic                out_valid,
  output logic [RGB_W-1:0]    out_pix [2][2],
  // ---- memory QoS environment
  input  logic                cpu_req,
  input  logic                cpu_we,
  input  logic [MEM_AW:0]     cpu_addr,
  input  logic [MEM_DW-1:0]   cpu_wdata [2],
  output logic                cpu_ack,
  output logic                cpu_hit,
  output logic [MEM_DW-1:0]   cpu_rdata [2],
  input  logic                cfg_prio,
  input  logic                cfg_shape_en,
  input  logic [7:0]          cfg_shape_t,
  input  logic [2:0]          cfg_shape_n,
  input  logic                lg_en,
  input  logic [7:0]          lg_rd_period,
  input  logic [7:0]          lg_wr_period,
  output logic [31:0]         lg_rd_lost,
  output logic [31:0]         lg_wr_lost,
  output sd_cmd_e             sd_cmd,
  output logic [1:0]          sd_bank,
  output logic [12:0]         sd_addr,
  output logic [MEM_DW-1:0]   sd_dq_o,
  output logic                sd_dq_oe,
  output logic [3:0]          sd_dm,
  input  logic [MEM_DW-1:0]   sd_dq_i,
  // ---- algorithm controller and LMC
  input  logic                prog_we,
  input  logic [3:0]          prog_addr,
  input  logic [49:0]         prog_data,
  input  logic                ctrl_start,
  output logic                ctrl_busy,
  input  logic                lmc_run,
  output logic                lmc_addr_valid,
  output logic [15:0]         lmc_addr
);
  localparam int unsigned NRW = COMP_W + 1;          // Haar band width
  localparam int unsigned TCW = NRW + 4;             // column coefficient width

  // =============== 5. control bus ===============
  logic             cb_we;
  logic [CB_AW-1:0] cb_addr;
  logic [CB_DW-1:0] cb_wdata;
  logic             lmc_done;
  logic [TCW-2:0]   thr_q [3];
  logic             sched_we;
  logic [3:0]       sched_len_q;

  algo_ctrl #(.PROG_DEPTH(16), .NDONE(4)) u_ctrl (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data, .start(ctrl_start),
    .done_in({3'b000, lmc_done}), .cb_we, .cb_addr, .cb_wdata, .busy(ctrl_busy));

  lmc_agen #(.AW(16), .BASE(8'h01)) u_lmc (
    .clk, .rst_n, .cb_we, .cb_addr, .cb_wdata, .run(lmc_run),
    .addr_valid(lmc_addr_valid), .addr(lmc_addr), .done(lmc_done));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 3; k++) thr_q[k] <= '0;
      sched_len_q <= 4'd2;
    end else if (cb_we) begin
      if (cb_addr[15:8] == 8'h02 && cb_addr[7:0] < 8'd3) thr_q[cb_addr[1:0]] <= (TCW-1)'(cb_wdata);
      if (cb_addr[15:8] == 8'h03 && cb_addr[7:0] == 8'hFF) sched_len_q <= cb_wdata[3:0];
    end
  end
  assign sched_we = cb_we && (cb_addr[15:8] == 8'h03) && (cb_addr[7:0] < 8'd8);

  // =============== 1. motion estimation / compensation ===============
  logic             tr_valid;
  logic [COMP_W-1:0] tr_pix;
  logic             mvp_v, mvn_v;
  logic signed [4:0] mvxp, mvyp, mvxn, mvyn;
  logic [18:0]      sadp, sadn;
  logic             busy_p, busy_n;

  lmc_transpose #(.TW(16), .TH(16), .PW(COMP_W)) u_tr (
    .clk, .rst_n, .in_valid(ref_valid), .in_ready(ref_ready), .in_pix(ref_pix),
    .out_valid(tr_valid), .out_pix(tr_pix));

  me_core #(.BLK(16), .SR(16), .PIX_W(COMP_W), .SAD_W(19)) u_me_prev (
    .clk, .rst_n, .win_we(me_win_we_prev), .win_col(me_win_col), .win_data(me_win_data),
    .start(me_start), .cur_valid(tr_valid), .cur_pix(tr_pix), .busy(busy_p),
    .mv_valid(mvp_v), .mv_x(mvxp), .mv_y(mvyp), .min_sad(sadp));
  me_core #(.BLK(16), .SR(16), .PIX_W(COMP_W), .SAD_W(19)) u_me_next (
    .clk, .rst_n, .win_we(me_win_we_next), .win_col(me_win_col), .win_data(me_win_data),
    .start(me_start), .cur_valid(tr_valid), .cur_pix(tr_pix), .busy(busy_n),
    .mv_valid(mvn_v), .mv_x(mvxn), .mv_y(mvyn), .min_sad(sadn));

  mc_select #(.SAD_W(19), .VW(5)) u_sel (
    .clk, .rst_n, .in_valid(mvp_v && mvn_v), .sad_prev(sadp), .sad_next(sadn),
    .mvx_prev(mvxp), .mvy_prev(mvyp), .mvx_next(mvxn), .mvy_next(mvyn),
    .out_valid(mv_valid), .sel_next(mv_sel_next), .mv_x, .mv_y, .sad(mv_sad));

  mc_align #(.N(16), .PW(32), .XW(12)) u_align (
    .x(mc_blk_x + 12'(mv_x)), .blk_addr(mc_mem_blk), .need_second(mc_mem_second),
    .blk0(mc_mem_blk0), .blk1(mc_mem_blk1), .group(mc_group));

  // =============== 2. TDMA link ===============
  logic             pk_v [2];
  logic [LINK_W-1:0] pk_w [2];
  logic [1:0]       tx_ready;
  logic [1:0]       rx_v;
  logic [LINK_W-1:0] rx_w [2];
  logic [1:0]       up_v;
  logic [RGB_W-1:0] up_p [2];

  word_pack #(.PW(RGB_W), .DW(LINK_W)) u_pack_o (
    .clk, .rst_n, .in_valid(orig_valid), .in_pix(orig_pix), .out_valid(pk_v[0]), .out_word(pk_w[0]));
  word_pack #(.PW(RGB_W), .DW(LINK_W)) u_pack_m (
    .clk, .rst_n, .in_valid(mcp_valid), .in_pix(mcp_pix), .out_valid(pk_v[1]), .out_word(pk_w[1]));

  tdma_tx #(.NSTREAMS(2), .DW(LINK_W), .SLOTS(8), .FIFO_DEPTH(4)) u_tx (
    .clk, .rst_n, .s_valid({pk_v[1], pk_v[0]}), .s_ready(tx_ready), .s_data(pk_w),
    .sched_we, .sched_addr(cb_addr[2:0]), .sched_sid(cb_wdata[0]), .sched_len(sched_len_q),
    .link_data(link_tx_data), .link_valid(link_tx_valid), .link_sid(link_tx_sid), .link_sof(link_tx_sof));

  tdma_rx #(.NSTREAMS(2), .DW(LINK_W)) u_rx (
    .clk, .rst_n, .link_data(link_rx_data), .link_valid(link_rx_valid), .link_sid(link_rx_sid),
    .m_valid(rx_v), .m_data(rx_w));

  word_unpack #(.PW(RGB_W), .DW(LINK_W)) u_unpack_o (
    .clk, .rst_n, .in_valid(rx_v[0]), .in_word(rx_w[0]), .out_valid(up_v[0]), .out_pix(up_p[0]));
  word_unpack #(.PW(RGB_W), .DW(LINK_W)) u_unpack_m (
    .clk, .rst_n, .in_valid(rx_v[1]), .in_word(rx_w[1]), .out_valid(up_v[1]), .out_pix(up_p[1]));

  // =============== 3. Haar + wavelet noise reduction ===============
  logic             j_v;
  logic [RGB_W-1:0] j_a, j_b;
  logic             hf_v [3];
  logic signed [NRW-1:0] hl [3];
  logic signed [NRW-1:0] hh [3];
  logic             nl_v [3];
  logic             nh_v [3];
  logic signed [NRW-1:0] nl [3][2][2];
  logic signed [NRW-1:0] nh [3][2][2];
  logic             hi_v [3][2][2];
  logic [COMP_W-1:0] oa [3][2][2];
  logic [COMP_W-1:0] ob_unused [3][2][2];

  pair_join #(.PW(RGB_W), .DEPTH(4)) u_join (
    .clk, .rst_n, .a_valid(up_v[0]), .a_pix(up_p[0]), .b_valid(up_v[1]), .b_pix(up_p[1]),
    .out_valid(j_v), .out_a(j_a), .out_b(j_b));

  for (genvar c = 0; c < 3; c++) begin : g_comp
    haar_fwd #(.W(COMP_W)) u_haar (
      .clk, .in_valid(j_v), .a(j_a[c*COMP_W +: COMP_W]), .b(j_b[c*COMP_W +: COMP_W]),
      .out_valid(hf_v[c]), .l(hl[c]), .h(hh[c]));

    dwt2d_nr #(.W(IMG_W), .H(IMG_H), .IW(NRW)) u_nr_low (
      .clk, .rst_n, .in_valid(hf_v[c]), .in_pix(hl[c]), .thr(thr_q), .flush(nr_flush),
      .out_valid(nl_v[c]), .out_pix(nl[c]));
    dwt2d_nr #(.W(IMG_W), .H(IMG_H), .IW(NRW)) u_nr_high (
      .clk, .rst_n, .in_valid(hf_v[c]), .in_pix(hh[c]), .thr(thr_q), .flush(nr_flush),
      .out_valid(nh_v[c]), .out_pix(nh[c]));

    for (genvar r = 0; r < 2; r++) begin : g_r
      for (genvar p = 0; p < 2; p++) begin : g_p
        haar_inv #(.W(COMP_W), .IW(NRW)) u_ihaar (
          .clk, .in_valid(nl_v[c]), .l(nl[c][r][p]), .h(nh[c][r][p]),
          .out_valid(hi_v[c][r][p]), .a(oa[c][r][p]), .b(ob_unused[c][r][p]));
        assign out_pix[r][p][c*COMP_W +: COMP_W] = oa[c][r][p];
      end
    end
  end
  assign out_valid = hi_v[0][0][0];

  // =============== 4. memory QoS environment ===============
  logic [2:0]       m_valid, m_ready, m_we;
  logic [MEM_AW-1:0] m_addr [3];
  logic [MEM_DW-1:0] m_wdata [3][MEM_BEATS];
  logic [MEM_BEATS-1:0] m_wmask [3];
  logic             rd_valid, rd_last;
  logic [1:0]       rd_port;
  logic [MEM_DW-1:0] rd_data;
  logic [31:0]      lg_rd_issued, lg_wr_issued;

  ppc_line_buffer #(.AW(MEM_AW), .DW(MEM_DW), .BEATS(MEM_BEATS), .LINE_BEATS(2)) u_cpu_if (
    .clk, .rst_n, .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_ack, .cpu_rdata, .cpu_hit,
    .mem_valid(m_valid[0]), .mem_ready(m_ready[0]), .mem_we(m_we[0]), .mem_addr(m_addr[0]),
    .mem_wdata(m_wdata[0]), .mem_wmask(m_wmask[0]),
    .rd_valid, .rd_mine(rd_port == 2'd0), .rd_data);

  load_gen #(.AW(MEM_AW), .DW(MEM_DW), .BEATS(MEM_BEATS), .PW(8)) u_lg_rd (
    .clk, .rst_n, .cfg_en(lg_en), .cfg_we(1'b0), .cfg_period(lg_rd_period), .cfg_base(22'h100000),
    .req_valid(m_valid[1]), .req_ready(m_ready[1]), .req_we(m_we[1]), .req_addr(m_addr[1]),
    .req_wdata(m_wdata[1]), .lost(lg_rd_lost), .issued(lg_rd_issued));
  load_gen #(.AW(MEM_AW), .DW(MEM_DW), .BEATS(MEM_BEATS), .PW(8)) u_lg_wr (
    .clk, .rst_n, .cfg_en(lg_en), .cfg_we(1'b1), .cfg_period(lg_wr_period), .cfg_base(22'h200000),
    .req_valid(m_valid[2]), .req_ready(m_ready[2]), .req_we(m_we[2]), .req_addr(m_addr[2]),
    .req_wdata(m_wdata[2]), .lost(lg_wr_lost), .issued(lg_wr_issued));
  assign m_wmask[1] = '1;
  assign m_wmask[2] = '1;

  cmc #(.NPORTS(3), .AW(MEM_AW), .DW(MEM_DW), .BEATS(MEM_BEATS)) u_cmc (
    .clk, .rst_n, .req_valid(m_valid), .req_ready(m_ready), .req_we(m_we), .req_addr(m_addr),
    .req_wdata(m_wdata), .req_wmask(m_wmask),
    .rd_valid, .rd_port, .rd_data, .rd_last,
    .cfg_prio, .cfg_shape_en, .cfg_shape_t, .cfg_shape_n,
    .sd_cmd, .sd_bank, .sd_addr, .sd_dq_o, .sd_dq_oe, .sd_dm, .sd_dq_i);
endmodule
