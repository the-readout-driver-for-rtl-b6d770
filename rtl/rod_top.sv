// rod_top: readout driver (ROD) for one octant of the muon endcap trigger chambers.
//
// Data path, in order:
//   fe_link_input x N_LINKS  frame each link's fragments in its own clock
//                            and hand them over as records (data words +
//                            a control word {N, flags}) through dual-clock pipes
//   ttc_l1a_queue            queues {L1ID, BCID} of every level-1 accept
//   dispatcher + fp_pool     give each link fragment of each expected event
//                            to one of N_FP fragment processors, on the fly
//   fp_link_mux              routes the chosen link's pipes to that FP
//   fragment_processor x N_FP check the event ID, expand hit bitmaps and
//                            write one output record pipe each
//   event_builder            gathers the fragments of each event in
//                            dispatch order into the event record pipe
//   rob_formatter            adds ROD header, status and trailer words
//   slink_output             crosses to the S-Link clock, obeys LFF_N
// Control and monitoring: monitor_sampler fills the sampled-event, hit
// and tracklet pipes read by the host; msg_arbiter fills the message
// pipe; svc_controller raises service calls; rodbusy_gen drives RODBUSY;
// vme_regs gives the host its registers and pipe read ports.
// Clocks: one per link (40 MHz deserializer clock), ttc_clk (40 MHz), the
// main clock clk and slink_clk (up to 32 MHz); each has its own reset,
// asserted asynchronously and released in step with its clock. The host
// bus is synchronous to clk.
// Service call types (SVCID = index + 1): 1..4 message, sampled-event,
// hit and tracklet pipe not empty; 5..8 the same pipes almost full (for
// the sampled-event pipe: too full for an event of the largest size); 9 a link
// input pipe almost full; 10 loss of event synchronisation (sticky);
// 11 L1A queue overflow. The SVCID thus names the pipe that needs service.
// Thirteen links and four FPs, the clock domains and the pipe pairs
// follow the description; FIFO depths, word formats, the register map and
// the service-call list are this design's choice. At the default sizes
// the memories total about 63 KiB, within the 70 KB of block RAM of the
// FPGA the original board used. Any N_LINKS up to 16 and N_FP from 1 up
// are supported. Each link's input FIFO can be given its own depth
// (LINK_DEPTH_LOG2), so links reading busier chambers can buffer more, as
// the description foresees; RODBUSY and the almost-full service call
// scale with each link's depth.
module rod_top
  import rod_pkg::*;
#(
  parameter int unsigned N_LINKS    = 13,
  parameter int unsigned N_FP       = 4,
  parameter int unsigned LINK_LOG2  = 9,      // deepest link data pipe: 2**LINK_LOG2 words
  // per-link data pipe depth 2**LINK_DEPTH_LOG2[l], each at most LINK_LOG2
  parameter int unsigned LINK_DEPTH_LOG2 [N_LINKS] = '{default: 9},
  parameter int unsigned FP_DEPTH   = 512,    // FP output data pipe depth
  parameter int unsigned EV_DEPTH   = 1024,   // event data pipe depth
  parameter int unsigned HOST_DEPTH = 2048,   // sampled-event pipe depth
  parameter int unsigned HIT_DEPTH  = 1024,   // hit / tracklet pipe depth
  parameter int unsigned MSG_DEPTH  = 256
) (
  // front-end links
  input  logic                 link_clk   [N_LINKS],
  input  logic                 link_rst_n [N_LINKS],
  input  logic [N_LINKS-1:0]   in_valid,
  input  logic [N_LINKS-1:0]   in_sof,
  input  logic [N_LINKS-1:0]   in_eof,
  input  logic [31:0]          in_data    [N_LINKS],
  input  logic [N_LINKS-1:0]   link_err,
  // TTC
  input  logic                 ttc_clk,
  input  logic                 ttc_rst_n,
  input  logic                 l1a,
  input  logic                 bcr,
  input  logic                 ecr,
  // main clock
  input  logic                 clk,
  input  logic                 rst_n,
  // S-Link to the ROB
  input  logic                 slink_clk,
  input  logic                 slink_rst_n,
  output logic [31:0]          ud,
  output logic                 uctrl_n,
  output logic                 uwen_n,
  input  logic                 lff_n,
  input  logic                 ldown_n,
  // central trigger
  output logic                 rodbusy,
  // host
  input  logic [7:0]           vme_addr,
  input  logic                 vme_we,
  input  logic                 vme_re,
  input  logic [31:0]          vme_wdata,
  output logic [31:0]          vme_rdata,
  output logic                 svc_irq
);
  localparam int unsigned FW     = (N_FP > 1) ? $clog2(N_FP) : 1;
  localparam int unsigned N_SRC  = N_FP + 1;
  localparam int unsigned N_MON  = N_LINKS + 2;
  localparam int unsigned N_OCC  = 2 * N_LINKS + 2 * N_FP + 10;   // every FIFO, at most 64
  localparam int unsigned N_STAT = 10;
  localparam int unsigned TTC_AW = 6;

  // ---------------- control registers ----------------
  logic [N_LINKS-1:0] link_en;
  logic [15:0]        prescale;
  logic [31:0]        run_number;
  logic               force_busy, clr_sync, sync_err;

  // ---------------- link inputs ----------------
  link_ctrl_t         l_c_rdata [N_LINKS];
  logic [31:0]        l_d_rdata [N_LINKS];
  logic [N_LINKS-1:0] l_c_empty, l_d_empty, l_c_rd, l_d_rd, l_af;
  logic [LINK_LOG2:0] l_count   [N_LINKS];
  localparam int unsigned L_CTRL_LOG2 = 7;     // link control pipes: 128 records
  logic [L_CTRL_LOG2:0] l_c_count [N_LINKS];  // link control pipe occupancy
  logic [15:0]        l_orphan  [N_LINKS];
  logic [15:0]        l_lost    [N_LINKS];
  logic [15:0]        l_hi      [N_LINKS];   // RODBUSY watermarks of each link pipe
  logic [15:0]        l_lo      [N_LINKS];

  for (genvar l = 0; l < int'(N_LINKS); l++) begin : g_link
    localparam int unsigned LD = 2**LINK_DEPTH_LOG2[l];
    logic [LINK_DEPTH_LOG2[l]:0] cnt;
    fe_link_input #(.DEPTH_LOG2(LINK_DEPTH_LOG2[l]), .CTRL_LOG2(L_CTRL_LOG2)) u_in (
      .link_clk(link_clk[l]), .link_rst_n(link_rst_n[l]),
      .in_valid(in_valid[l]), .in_sof(in_sof[l]), .in_eof(in_eof[l]),
      .in_data(in_data[l]), .link_err(link_err[l]),
      .orphan_cnt(l_orphan[l]), .lost_cnt(l_lost[l]),
      .clk, .rst_n,
      .c_rd(l_c_rd[l]), .c_rdata(l_c_rdata[l]), .c_empty(l_c_empty[l]),
      .d_rd(l_d_rd[l]), .d_rdata(l_d_rdata[l]), .d_empty(l_d_empty[l]),
      .d_count(cnt), .c_count(l_c_count[l]));
    assign l_count[l] = (LINK_LOG2+1)'(cnt);
    assign l_af[l]    = (32'(cnt) >= LD - LD/8);
    assign l_hi[l]    = 16'(LD * 3 / 4);
    assign l_lo[l]    = 16'(LD / 4);
  end

  // ---------------- TTC ----------------
  ttc_ev_t           ttc_ev;
  logic              ttc_empty, ttc_rd, ttc_ovf;
  logic [TTC_AW:0]   ttc_count;

  ttc_l1a_queue #(.AW(TTC_AW)) u_ttc (
    .ttc_clk, .ttc_rst_n, .l1a, .bcr, .ecr, .overflow(ttc_ovf),
    .clk, .rst_n, .rd(ttc_rd), .ev(ttc_ev), .empty(ttc_empty), .rcount(ttc_count));

  // ---------------- dispatcher, free list, bookkeeping pipes ----------------
  logic                 free_valid, alloc;
  logic [FW-1:0]        free_fp;
  logic [N_FP-1:0]      fp_busy, fp_req, fp_ack, fp_act;
  logic [N_LINKS-1:0]   link_busy;
  logic [LINK_ID_W-1:0] alloc_link, disp_link;
  logic [23:0]          disp_l1id;
  logic                 ord_wr, ord_rd, ord_full, ord_empty, evi_wr, evi_rd, evi_full, evi_empty;
  logic [FW+1:0]        ord_wdata, ord_rdata;
  ttc_ev_t              evi_wdata, evi_rdata;
  logic                 disp_active;

  fp_pool #(.N_FP(N_FP), .N_LINKS(N_LINKS)) u_pool (
    .clk, .rst_n, .alloc, .alloc_link, .ack(fp_ack),
    .free_valid, .free_fp, .fp_busy, .link_busy);

  dispatcher #(.N_FP(N_FP), .N_LINKS(N_LINKS)) u_disp (
    .clk, .rst_n, .link_en,
    .ev_empty(ttc_empty), .ev(ttc_ev), .ev_rd(ttc_rd),
    .free_valid, .free_fp, .link_busy, .alloc, .alloc_link,
    .fp_req, .fp_link(disp_link), .fp_l1id(disp_l1id),
    .ord_full, .ord_wr, .ord_wdata, .evi_full, .evi_wr, .evi_wdata,
    .active(disp_active));

  logic ord_af, ord_ae, evi_af, evi_ae;
  logic [$clog2(64+1)-1:0] ord_count;
  logic [$clog2(16+1)-1:0] evi_count;
  pipe #(.W(FW+2), .DEPTH(64)) u_ord (
    .clk, .rst_n, .wr(ord_wr), .wdata(ord_wdata), .rd(ord_rd), .rdata(ord_rdata),
    .empty(ord_empty), .full(ord_full), .almost_full(ord_af), .almost_empty(ord_ae), .count(ord_count));
  pipe #(.W(36), .DEPTH(16)) u_evi (
    .clk, .rst_n, .wr(evi_wr), .wdata(evi_wdata), .rd(evi_rd), .rdata(evi_rdata),
    .empty(evi_empty), .full(evi_full), .almost_full(evi_af), .almost_empty(evi_ae), .count(evi_count));

  // ---------------- fragment farm ----------------
  logic [LINK_ID_W-1:0] fp_sel [N_FP];
  logic [N_FP-1:0]      fp_c_rd, fp_d_rd, fp_c_empty, fp_d_empty;
  link_ctrl_t           fp_c_rdata [N_FP];
  logic [31:0]          fp_d_rdata [N_FP];

  fp_link_mux #(.N_FP(N_FP), .N_LINKS(N_LINKS)) u_mux (
    .clk, .rst_n, .fp_sel, .fp_act, .fp_c_rd, .fp_d_rd,
    .fp_c_rdata, .fp_c_empty, .fp_d_rdata, .fp_d_empty,
    .l_c_rdata, .l_c_empty, .l_d_rdata, .l_d_empty, .l_c_rd, .l_d_rd);

  // FP output record pipes
  logic [N_FP-1:0] o_d_wr, o_d_full, o_c_wr, o_c_full;
  logic [31:0]     o_d_wdata [N_FP];
  fp_ctrl_t        o_c_wdata [N_FP];
  fp_ctrl_t        b_c_rdata [N_FP];
  logic [31:0]     b_d_rdata [N_FP];
  logic [N_FP-1:0] b_c_empty, b_d_empty, b_c_rd, b_d_rd;
  logic [$clog2(FP_DEPTH+1)-1:0] o_d_count [N_FP];
  logic [$clog2(32+1)-1:0]       o_c_count [N_FP];
  logic [N_FP-1:0] fp_sync_miss;
  logic [N_SRC-1:0] m_req, m_gnt;
  msg_t            m_msg [N_SRC];
  logic [31:0]     fp_hits [N_FP];
  logic [31:0]     fp_frags [N_FP];

  for (genvar f = 0; f < int'(N_FP); f++) begin : g_fp
    logic [31:0] c_raw;

    fragment_processor #(.OUT_MAX(FP_DEPTH - 1)) u_fp (
      .clk, .rst_n,
      .req(fp_req[f]), .req_link(disp_link), .req_l1id(disp_l1id),
      .ack(fp_ack[f]), .act(fp_act[f]), .sel(fp_sel[f]),
      .c_rdata(fp_c_rdata[f]), .c_empty(fp_c_empty[f]), .c_rd(fp_c_rd[f]),
      .d_rdata(fp_d_rdata[f]), .d_empty(fp_d_empty[f]), .d_rd(fp_d_rd[f]),
      .o_d_full(o_d_full[f]), .o_d_wr(o_d_wr[f]), .o_d_wdata(o_d_wdata[f]),
      .o_c_full(o_c_full[f]), .o_c_wr(o_c_wr[f]), .o_c_wdata(o_c_wdata[f]),
      .msg_req(m_req[f]), .msg(m_msg[f]), .msg_gnt(m_gnt[f]),
      .n_hits(fp_hits[f]), .n_frags(fp_frags[f]));

    record_pipe #(.DW(32), .CW(32), .DDEPTH(FP_DEPTH), .CDEPTH(32)) u_out (
      .clk, .rst_n,
      .d_wr(o_d_wr[f]), .d_wdata(o_d_wdata[f]), .d_rd(b_d_rd[f]), .d_rdata(b_d_rdata[f]),
      .d_empty(b_d_empty[f]), .d_full(o_d_full[f]), .d_count(o_d_count[f]),
      .c_wr(o_c_wr[f]), .c_wdata(o_c_wdata[f]), .c_rd(b_c_rd[f]), .c_rdata(c_raw),
      .c_empty(b_c_empty[f]), .c_full(o_c_full[f]), .c_count(o_c_count[f]));
    assign b_c_rdata[f]    = fp_ctrl_t'(c_raw);
    assign fp_sync_miss[f] = o_c_wr[f] && o_c_wdata[f].flags[F_L1ID_MISS];
  end

  // ---------------- event builder and event record pipe ----------------
  logic        ev_d_wr, ev_d_full, ev_c_wr, ev_c_full, ev_d_rd, ev_c_rd, ev_d_empty, ev_c_empty;
  logic [31:0] ev_d_wdata, ev_d_rdata;
  ev_ctrl_t    ev_c_wdata, ev_c_rdata;
  logic [67:0] ev_c_raw;
  logic [$clog2(EV_DEPTH+1)-1:0] ev_d_count;
  logic [$clog2(16+1)-1:0]       ev_c_count;
  logic [31:0] n_events, n_dropped;

  event_builder #(.N_FP(N_FP), .EV_MAX(EV_DEPTH - 1)) u_eb (
    .clk, .rst_n,
    .evi_empty, .evi_rdata, .evi_rd, .ord_empty, .ord_rdata, .ord_rd,
    .fp_c_rdata(b_c_rdata), .fp_c_empty(b_c_empty), .fp_c_rd(b_c_rd),
    .fp_d_rdata(b_d_rdata), .fp_d_empty(b_d_empty), .fp_d_rd(b_d_rd),
    .ev_d_full, .ev_d_wr, .ev_d_wdata, .ev_c_full, .ev_c_wr, .ev_c_wdata,
    .msg_req(m_req[N_FP]), .msg(m_msg[N_FP]), .msg_gnt(m_gnt[N_FP]),
    .n_events, .n_dropped);

  record_pipe #(.DW(32), .CW(68), .DDEPTH(EV_DEPTH), .CDEPTH(16)) u_evp (
    .clk, .rst_n,
    .d_wr(ev_d_wr), .d_wdata(ev_d_wdata), .d_rd(ev_d_rd), .d_rdata(ev_d_rdata),
    .d_empty(ev_d_empty), .d_full(ev_d_full), .d_count(ev_d_count),
    .c_wr(ev_c_wr), .c_wdata(ev_c_wdata), .c_rd(ev_c_rd), .c_rdata(ev_c_raw),
    .c_empty(ev_c_empty), .c_full(ev_c_full), .c_count(ev_c_count));
  assign ev_c_rdata = ev_ctrl_t'(ev_c_raw);

  // ---------------- formatter and S-Link ----------------
  logic        f_valid, f_ctrl, f_payload, f_sof, f_ready;
  logic [15:0] f_len;
  logic [31:0] f_data;
  logic [9:0]  sl_count;

  rob_formatter u_fmt (
    .clk, .rst_n, .run_number,
    .c_rdata(ev_c_rdata), .c_empty(ev_c_empty), .c_rd(ev_c_rd),
    .d_rdata(ev_d_rdata), .d_empty(ev_d_empty), .d_rd(ev_d_rd),
    .o_valid(f_valid), .o_ctrl(f_ctrl), .o_payload(f_payload), .o_sof(f_sof), .o_len(f_len),
    .o_data(f_data), .o_ready(f_ready));

  slink_output #(.AW(9)) u_slink (
    .clk, .rst_n, .in_valid(f_valid), .in_ctrl(f_ctrl), .in_data(f_data),
    .in_ready(f_ready), .count(sl_count),
    .slink_clk, .slink_rst_n, .ud, .uctrl_n, .uwen_n, .lff_n, .ldown_n);

  // ---------------- monitoring pipes ----------------
  localparam int unsigned HCW = $clog2(HOST_DEPTH+1);
  logic           s_ev_wr, s_hit_wr, s_trk_wr, sampling;
  logic [31:0]    s_wdata, n_sampled, n_skipped;
  logic [31:0]    hp_rdata [4];
  logic [3:0]     hp_empty, hp_full, hp_af, hp_ae, hp_rd;
  logic [HCW-1:0] hp_count [1:3];
  logic [$clog2(HIT_DEPTH+1)-1:0] hk_count [2:3];
  logic [$clog2(MSG_DEPTH+1)-1:0] msg_count;
  logic           m_wr;
  msg_t           m_wdata;

  monitor_sampler u_samp (
    .clk, .rst_n, .prescale,
    .fire(f_valid && f_ready), .t_ctrl(f_ctrl), .t_payload(f_payload), .t_sof(f_sof), .t_data(f_data), .t_len(f_len),
    .ev_free(16'(HOST_DEPTH - 32'(hp_count[1]))),
    .hit_free(16'(HIT_DEPTH - 32'(hk_count[2]))),
    .trk_free(16'(HIT_DEPTH - 32'(hk_count[3]))),
    .ev_wr(s_ev_wr), .hit_wr(s_hit_wr), .trk_wr(s_trk_wr), .wdata(s_wdata),
    .sampling, .n_sampled, .n_skipped);

  msg_arbiter #(.N_SRC(N_SRC)) u_arb (
    .clk, .rst_n, .req(m_req), .msg(m_msg), .gnt(m_gnt),
    .full(hp_full[0]), .wr(m_wr), .wdata(m_wdata));

  pipe #(.W(32), .DEPTH(MSG_DEPTH)) u_msgp (
    .clk, .rst_n, .wr(m_wr), .wdata(m_wdata), .rd(hp_rd[0]), .rdata(hp_rdata[0]),
    .empty(hp_empty[0]), .full(hp_full[0]), .almost_full(hp_af[0]), .almost_empty(hp_ae[0]),
    .count(msg_count));
  // almost full = no room left for a worst-case sampled event
  pipe #(.W(32), .DEPTH(HOST_DEPTH), .AF_LEVEL(HOST_DEPTH - (EV_DEPTH + 13))) u_sevp (
    .clk, .rst_n, .wr(s_ev_wr), .wdata(s_wdata), .rd(hp_rd[1]), .rdata(hp_rdata[1]),
    .empty(hp_empty[1]), .full(hp_full[1]), .almost_full(hp_af[1]), .almost_empty(hp_ae[1]),
    .count(hp_count[1]));
  pipe #(.W(32), .DEPTH(HIT_DEPTH)) u_hitp (
    .clk, .rst_n, .wr(s_hit_wr), .wdata(s_wdata), .rd(hp_rd[2]), .rdata(hp_rdata[2]),
    .empty(hp_empty[2]), .full(hp_full[2]), .almost_full(hp_af[2]), .almost_empty(hp_ae[2]),
    .count(hk_count[2]));
  assign hp_count[2] = HCW'(hk_count[2]);
  pipe #(.W(32), .DEPTH(HIT_DEPTH)) u_trkp (
    .clk, .rst_n, .wr(s_trk_wr), .wdata(s_wdata), .rd(hp_rd[3]), .rdata(hp_rdata[3]),
    .empty(hp_empty[3]), .full(hp_full[3]), .almost_full(hp_af[3]), .almost_empty(hp_ae[3]),
    .count(hk_count[3]));
  assign hp_count[3] = HCW'(hk_count[3]);

  // ---------------- synchronisation error, service calls, busy ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 sync_err <= 1'b0;
    else if (|fp_sync_miss)     sync_err <= 1'b1;
    else if (clr_sync)          sync_err <= 1'b0;
  end

  localparam int unsigned N_SVC = 11;
  logic [7:0]       svcid, svcack_id;
  logic [N_SVC-1:0] svc_out, svc_cond;
  logic             clr_svcid, svcack_wr;
  assign svc_cond = {ttc_ovf, sync_err, |l_af, hp_af, ~hp_empty};

  svc_controller #(.N_SVC(N_SVC)) u_svc (
    .clk, .rst_n, .cond(svc_cond), .svcid, .irq(svc_irq), .outstanding(svc_out),
    .clr_svcid, .ack_wr(svcack_wr), .ack_id(svcack_id));

  logic [15:0] mon_level [N_MON];
  logic [15:0] mon_hi    [N_MON];
  logic [15:0] mon_lo    [N_MON];
  logic [31:0] n_busy, busy_cycles;
  always_comb begin
    for (int l = 0; l < int'(N_LINKS); l++) begin
      mon_level[l] = 16'(l_count[l]);
      mon_hi[l]    = l_hi[l];
      mon_lo[l]    = l_lo[l];
    end
    mon_level[N_LINKS]   = 16'(ttc_count);
    mon_hi[N_LINKS]      = 16'((2**TTC_AW) * 3 / 4);
    mon_lo[N_LINKS]      = 16'((2**TTC_AW) / 4);
    mon_level[N_LINKS+1] = 16'(ev_d_count);
    mon_hi[N_LINKS+1]    = 16'(EV_DEPTH * 3 / 4);
    mon_lo[N_LINKS+1]    = 16'(EV_DEPTH / 4);
  end

  rodbusy_gen #(.N_MON(N_MON)) u_busy (
    .clk, .rst_n, .level(mon_level), .hi(mon_hi), .lo(mon_lo), .force_busy,
    .rodbusy, .n_busy, .busy_cycles);

  // ---------------- host registers ----------------
  logic [15:0] occ  [N_OCC];
  logic [31:0] stat [N_STAT];
  logic [31:0] sum_hits, sum_frags, sum_orphan, sum_lost;
  always_comb begin
    sum_hits   = '0;
    sum_frags  = '0;
    sum_orphan = '0;
    sum_lost   = '0;
    for (int l = 0; l < int'(N_LINKS); l++) begin
      sum_orphan = sum_orphan + 32'(l_orphan[l]);
      sum_lost   = sum_lost + 32'(l_lost[l]);
    end
    for (int f = 0; f < int'(N_FP); f++) begin
      sum_hits  = sum_hits + fp_hits[f];
      sum_frags = sum_frags + fp_frags[f];
    end
    for (int l = 0; l < int'(N_LINKS); l++) occ[l] = 16'(l_count[l]);
    for (int f = 0; f < int'(N_FP); f++)    occ[N_LINKS + f] = 16'(o_d_count[f]);
    occ[N_LINKS + N_FP + 0] = 16'(ttc_count);
    occ[N_LINKS + N_FP + 1] = 16'(ev_d_count);
    occ[N_LINKS + N_FP + 2] = 16'(sl_count);
    occ[N_LINKS + N_FP + 3] = 16'(msg_count);
    occ[N_LINKS + N_FP + 4] = 16'(hp_count[1]);
    occ[N_LINKS + N_FP + 5] = 16'(hp_count[2]);
    occ[N_LINKS + N_FP + 6] = 16'(hp_count[3]);
    for (int l = 0; l < int'(N_LINKS); l++) occ[N_LINKS + N_FP + 7 + l] = 16'(l_c_count[l]);
    for (int f = 0; f < int'(N_FP); f++)    occ[2 * N_LINKS + N_FP + 7 + f] = 16'(o_c_count[f]);
    occ[2 * N_LINKS + 2 * N_FP + 7] = 16'(ord_count);
    occ[2 * N_LINKS + 2 * N_FP + 8] = 16'(evi_count);
    occ[2 * N_LINKS + 2 * N_FP + 9] = 16'(ev_c_count);
    stat[0] = n_events;
    stat[1] = n_dropped;
    stat[2] = n_sampled;
    stat[3] = n_skipped;
    stat[4] = n_busy;
    stat[5] = busy_cycles;
    stat[6] = sum_hits;
    stat[7] = sum_frags;
    stat[8] = sum_orphan;
    stat[9] = sum_lost;
  end

  vme_regs #(.N_OCC(N_OCC), .N_STAT(N_STAT), .N_LINKS(N_LINKS)) u_vme (
    .clk, .rst_n, .addr(vme_addr), .we(vme_we), .re(vme_re), .wdata(vme_wdata), .rdata(vme_rdata),
    .svcid, .clr_svcid, .svcack_wr, .svcack_id,
    .link_en, .prescale, .run_number, .force_busy, .clr_sync,
    .status({sync_err, ttc_ovf, rodbusy}),
    .hp_rdata, .hp_empty, .hp_rd, .occ, .stat);
endmodule
