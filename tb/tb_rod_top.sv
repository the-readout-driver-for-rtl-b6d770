// tb_rod_top: end-to-end run of the whole ROD at its default size
// (13 links, 4 fragment processors, all FIFO depths as built).
//
// Stimulus: a TTC source issues L1As (held back while RODBUSY is high,
// as the central trigger would); 12 link sources each send one fragment
// per L1A in their own 40 MHz clock (link 12 is disabled by the host and
// silent). Fragment contents come from a hash of (event, link, word), so
// the checker can rebuild them. A host model answers service calls over
// the register bus: it drains the message, sampled-event, hit and
// tracklet pipes, clears the sync-error flag and acknowledges each call.
// For a stretch of the run it leaves the sampled-event pipe alone with
// the prescale at 1, until the pipe raises its almost-full call and
// samples are skipped.
//
// Checking: every word on the S-Link (data and UCTRL_N) is compared with
// a reference that expands the hit bitmaps, applies the output limit of a
// fragment processor and the event size limit of the event builder, and
// wraps the event in the ROD format. Special events exercise a link
// error (event 5), a wrong L1ID (event 7) and an oversized event
// (event 9: one fragment over the FP output limit, later fragments
// dropped by the event builder), and a stray word between two fragments
// of link 1 must be dropped and counted. Phases: fast L1As with random S-Link
// flow control; a long LFF_N stall that must raise RODBUSY; then L1As at
// the 100 kHz design rate, which must never raise RODBUSY. Each named
// mechanism is counted and must have happened at least once.
module tb_rod_top;
  import rod_pkg::*;
  localparam int NL = 13, NF = 4, N_EV = 190;
  localparam logic [12:0] LINK_EN = 13'h0FFF;   // link 12 disabled

  logic link_clk [NL];
  logic link_rst_n [NL];
  logic [NL-1:0] in_valid = 0, in_sof = 0, in_eof = 0, link_err = 0;
  logic [31:0] in_data [NL];
  logic ttc_clk = 0, ttc_rst_n = 0, l1a = 0, bcr = 0, ecr = 0;
  logic clk = 0, rst_n = 0, slink_clk = 0, slink_rst_n = 0;
  logic [31:0] ud;
  logic uctrl_n, uwen_n, lff_n = 1, ldown_n = 1, rodbusy;
  logic [7:0] vme_addr = 0;
  logic vme_we = 0, vme_re = 0, svc_irq;
  logic [31:0] vme_wdata = 0, vme_rdata;

  int checks = 0, failures = 0;

  rod_top dut (.*);

  // ---------------- clocks ----------------
  always #12.5 ttc_clk = ~ttc_clk;
  always #10   clk = ~clk;                 // 50 MHz main clock
  always #15.6 slink_clk = ~slink_clk;     // 32 MHz S-Link
  for (genvar l = 0; l < NL; l++) begin : g_clk
    initial begin
      link_clk[l] = 0;
      link_rst_n[l] = 0;
      in_data[l] = 0;
      #(0.37 * l);
      forever #(12.5 + 0.01 * l) link_clk[l] = ~link_clk[l];
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  // ---------------- fragment model ----------------
  function automatic logic [31:0] hash(int e, int l, int i);
    logic [31:0] h;
    h = 32'(e) * 32'h9E3779B1 ^ 32'(l) * 32'h85EBCA77 ^ 32'(i) * 32'hC2B2AE3D;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    return h;
  endfunction

  function automatic int n_data(int e, int l);
    if (e == 9) return (l == 0) ? 40 : 12;
    return int'(hash(e, l, 999) % 6);
  endfunction

  function automatic logic [31:0] data_word(int e, int l, int i);
    logic [31:0] h;
    if (e == 9) return {2'b00, 14'(i), 16'hFFFF};
    h = hash(e, l, i);
    case (h % 3)
      0: return {2'b00, h[29:16], h[15:0] & 16'h2481};
      1: return {2'b01, h[29:0]};
      default: return {2'b10, h[29:0]};
    endcase
  endfunction

  int ev_bcid [N_EV];
  int n_l1a = 0;

  // ---------------- TTC and trigger ----------------
  int bc = 0, phase = 0, vetoed = 0;
  always @(posedge ttc_clk) if (ttc_rst_n) bc <= (bc == 3563) ? 0 : bc + 1;

  initial begin
    int gap;
    wait (rst_n);
    repeat (200) @(negedge ttc_clk);   // host setup first
    while (n_l1a < N_EV) begin
      phase = (n_l1a < 30) ? 0 : (n_l1a < 150) ? 1 : 2;
      gap = (phase == 0) ? 60 : (phase == 1) ? 30 : 400;   // phase 2: 100 kHz
      repeat (gap - 1) @(negedge ttc_clk);
      while (rodbusy) begin vetoed++; @(negedge ttc_clk); end
      @(negedge ttc_clk);
      l1a = 1;
      ev_bcid[n_l1a] = bc;
      @(negedge ttc_clk);
      l1a = 0;
      n_l1a++;
    end
  end

  // ---------------- link sources ----------------
  for (genvar l = 0; l < NL; l++) begin : g_src
    initial begin
      int e;
      e = 0;
      wait (link_rst_n[l]);
      while (LINK_EN[l] && e < N_EV) begin
        @(negedge link_clk[l]);
        if (e < n_l1a) begin
          int n;
          n = n_data(e, l);
          in_valid[l] = 1; in_sof[l] = 1; in_eof[l] = (n == 0);
          in_data[l] = {4'hA, 4'h0, 12'(ev_bcid[e]), 12'((e == 7 && l == 2) ? e + 1 : e)};
          for (int i = 0; i < n; i++) begin
            @(negedge link_clk[l]);
            in_sof[l] = 0;
            // a short idle gap now and then
            if (hash(e, l, i + 500) % 4 == 0) begin
              in_valid[l] = 0;
              @(negedge link_clk[l]);
            end
            in_valid[l] = 1;
            in_eof[l] = (i == n - 1);
            in_data[l] = data_word(e, l, i);
            link_err[l] = (e == 5 && l == 3 && i == 0);
          end
          @(negedge link_clk[l]);
          in_valid[l] = 0; in_sof[l] = 0; in_eof[l] = 0; link_err[l] = 0;
          e++;
          if (e == 12 && l == 1) begin     // one stray word between fragments
            @(negedge link_clk[l]);
            in_valid[l] = 1; in_data[l] = 32'h0BAD_0BAD;
            @(negedge link_clk[l]);
            in_valid[l] = 0;
          end
        end
      end
    end
  end

  // ---------------- reference S-Link stream ----------------
  logic [32:0] exp_q [$];     // {ctrl, word}
  int exp_ev = 0, ev_done = 0, n_drop_exp = 0, n_trunc_exp = 0, n_flagged = 0;

  task automatic build_event(int e);
    logic [31:0] body [$];
    logic [7:0] st;
    int wc;
    st = 0; wc = 0;
    for (int l = 0; l < NL; l++) if (LINK_EN[l]) begin
      logic [31:0] fw [$];
      logic [7:0] fl;
      fl = 0;
      if (e == 5 && l == 3) fl[F_LINK_ERR] = 1;
      if (e == 7 && l == 2) fl[F_L1ID_MISS] = 1;
      for (int i = 0; i < n_data(e, l); i++) begin
        logic [31:0] w;
        w = data_word(e, l, i);
        if (w[31:30] == 2'b00) begin
          for (int b = 0; b < 16; b++) if (w[b]) begin
            if (fw.size() < 511) fw.push_back({2'b00, 4'(l), w[29:16], 8'h0, 4'(b)});
            else fl[F_TRUNC_OUT] = 1;
          end
        end else begin
          if (fw.size() < 511) fw.push_back(w); else fl[F_TRUNC_OUT] = 1;
        end
      end
      if (fl[F_TRUNC_OUT]) n_trunc_exp++;
      if (fl != 0) n_flagged++;
      if (wc + fw.size() + 1 <= 1023) begin
        body.push_back({2'b11, 4'(l), 10'(fl), 16'(fw.size())});
        foreach (fw[i]) body.push_back(fw[i]);
        wc += fw.size() + 1;
        st |= fl;
      end else begin
        st[F_DROPPED] = 1;
        n_drop_exp++;
      end
    end
    exp_q.push_back({1'b1, SLINK_BOF});
    exp_q.push_back({1'b0, ROD_START_MARK});
    exp_q.push_back({1'b0, 32'd9});
    exp_q.push_back({1'b0, ROD_FMT_VER});
    exp_q.push_back({1'b0, 32'h0067_0000});
    exp_q.push_back({1'b0, 32'h0000_1234});
    exp_q.push_back({1'b0, 32'(e)});
    exp_q.push_back({1'b0, 32'(ev_bcid[e])});
    exp_q.push_back({1'b0, 32'd0});
    exp_q.push_back({1'b0, 32'd0});
    exp_q.push_back({1'b0, 32'(st)});
    foreach (body[i]) exp_q.push_back({1'b0, body[i]});
    exp_q.push_back({1'b0, 32'd1});
    exp_q.push_back({1'b0, 32'(wc)});
    exp_q.push_back({1'b0, 32'd0});
    exp_q.push_back({1'b1, SLINK_EOF});
  endtask

  int words_rx = 0, stall_clocks = 0, lff_low = 0;
  time t_l1a [N_EV];
  time max_lat_p2 = 0;
  always @(posedge ttc_clk) if (l1a) t_l1a[n_l1a] = $time;

  always @(negedge slink_clk) if (slink_rst_n) begin
    if (!uwen_n) begin
      if (exp_q.size() == 0 && exp_ev < n_l1a) begin build_event(exp_ev); exp_ev++; end
      chk(exp_q.size() != 0 && {!uctrl_n, ud} == exp_q[0],
          $sformatf("S-Link word %0d of event %0d: got %0b/%h exp %h", words_rx, ev_done, !uctrl_n, ud, exp_q[0]));
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      words_rx++;
      if (!uctrl_n && ud == SLINK_EOF) begin
        if (ev_done >= 165 && $time - t_l1a[ev_done] > max_lat_p2) max_lat_p2 = $time - t_l1a[ev_done];
        ev_done++;
      end
    end
    if (!lff_n) lff_low++;
    if (!lff_n && dut.sl_count != 0) stall_clocks++;
  end

  // S-Link flow control: random in phase 0, a long stall early in phase 1,
  // always ready in phase 2
  int busy_rises = 0;
  logic busy_q = 0;
  always @(posedge clk) begin
    busy_q <= rodbusy;
    if (rodbusy && !busy_q) busy_rises++;
  end
  always @(posedge slink_clk) begin
    #2;
    if (phase == 0) lff_n = ($urandom_range(0, 9) > 1);
    else if (phase == 1) lff_n = !(n_l1a >= 35 && busy_rises == 0);
    else lff_n = 1;
  end

  // ---------------- host model ----------------
  int svc_served [12];
  int msgs_read = 0, sampled_words = 0, hit_words = 0, trk_words = 0, sync_cleared = 0;
  int msg_frag = 0, msg_drop = 0, sl_occ_max = 0;

  task automatic vme_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk); vme_addr = a; vme_wdata = d; vme_we = 1;
    @(negedge clk); vme_we = 0;
  endtask

  task automatic vme_read(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); vme_addr = a; vme_re = 1;
    @(negedge clk); vme_re = 0; d = vme_rdata;
  endtask

  task automatic drain(int which);
    logic [31:0] fl, d;
    vme_read(8'h0C, fl);
    while (!fl[which]) begin
      vme_read(8'(8 + which), d);
      case (which)
        0: begin
             msgs_read++;
             if (d[31:24] == MSG_FRAG_ERR) msg_frag++;
             if (d[31:24] == MSG_EV_DROP) msg_drop++;
           end
        1: sampled_words++;
        2: begin hit_words++; chk(d[31:30] == 2'b00, "hit pipe word type"); end
        3: begin trk_words++; chk(d[31:30] == 2'b01, "tracklet pipe word type"); end
        default: ;
      endcase
      vme_read(8'h0C, fl);
    end
  endtask

  initial begin
    logic [31:0] id, d;
    foreach (svc_served[i]) svc_served[i] = 0;
    #100;
    rst_n = 1; ttc_rst_n = 1; slink_rst_n = 1;
    for (int l = 0; l < NL; l++) link_rst_n[l] = 1;
    vme_write(8'h02, 32'(LINK_EN));
    vme_write(8'h03, 32'd4);          // sample one event in four
    vme_write(8'h04, 32'h1234);       // run number
    vme_read(8'h02, d);
    chk(d == 32'(LINK_EN), "link enable register");
    forever begin
      @(negedge clk);
      if (svc_irq) begin
        vme_read(8'h00, id);
        vme_write(8'h00, 0);          // clear SVCID: handler ready for another
        chk(id >= 1 && id <= 11, "valid SVCID");
        svc_served[id]++;
        case (id)
          // the sampled-event pipe is left alone for a while, with every
          // event sampled, until it is too full to take another sample
          2: if (n_l1a < 40 || n_l1a >= 100 || svc_served[6] > 0) begin
               vme_write(8'h03, 32'd4);
               drain(1);
             end else vme_write(8'h03, 32'd1);
          1, 3, 4: drain(int'(id) - 1);
          5, 6, 7, 8: drain(int'(id) - 5);
          10: begin vme_write(8'h06, 1); sync_cleared++; end
          default: ;
        endcase
        vme_write(8'h01, id);         // SVCACK
        vme_read(8'(32'h20 + NL + NF + 2), d);   // S-Link FIFO occupancy
        if (int'(d) > sl_occ_max) sl_occ_max = int'(d);
      end
    end
  end

  // ---------------- end of test ----------------
  int max_par = 0, n_skip = 0;
  always @(posedge clk) if ($countones(dut.fp_act) > max_par) max_par = $countones(dut.fp_act);
  logic busy_in_p2 = 0;
  always @(posedge clk) if (phase == 2 && n_l1a > 152 && rodbusy) busy_in_p2 = 1;

  initial begin
    logic [31:0] d;
    wait (ev_done == N_EV);
    repeat (4000) @(negedge clk);     // let the host drain the monitoring pipes
    chk(exp_q.size() == 0, "no words missing");
    for (int i = 0; i < 2 * NL + 2 * NF + 10; i++) begin   // every FIFO occupancy register
      vme_read(8'(8'h20 + i), d);
      chk(d == 0, $sformatf("FIFO %0d empty at the end (%0d)", i, d));
    end
    vme_read(8'h60, d); chk(d == N_EV, $sformatf("events built %0d", d));
    vme_read(8'h61, d); chk(d == 32'(n_drop_exp), "drop counter");
    vme_read(8'h67, d); chk(d == 32'(N_EV * 12), "fragments processed");
    vme_read(8'h68, d); chk(d == 1, "stray link word dropped and counted");
    vme_read(8'h69, d); chk(d == 0, "no link fragments lost");
    vme_read(8'h62, d);
    chk(d > 0 && sampled_words > 0, "events sampled");
    vme_read(8'h63, d);
    n_skip = int'(d);
    chk(n_skip > 0, "samples skipped while the sampled-event pipe was full");
    for (int f = 0; f < NF; f++) chk(dut.fp_frags[f] > 0, $sformatf("FP %0d used", f));
    chk(msg_frag == n_flagged, $sformatf("FP messages %0d exp %0d", msg_frag, n_flagged));
    chk(msg_drop == n_drop_exp, "builder drop messages");
    // every mechanism must have happened
    chk(max_par >= 2,        "fragment processors in parallel");
    chk(stall_clocks > 0,    "S-Link flow control stall");
    chk(sl_occ_max > 0,      "S-Link FIFO occupancy seen by the host");
    chk(busy_rises > 0,      "RODBUSY raised");
    chk(vetoed > 0,          "L1As held back by RODBUSY");
    chk(!busy_in_p2,         "no RODBUSY at 100 kHz");
    chk(max_lat_p2 > 0 && max_lat_p2 < 10us, "L1A to end of event within one 100 kHz period");
    chk(n_drop_exp > 0,      "fragment dropped by event builder");
    chk(n_trunc_exp > 0,     "FP output limit");
    chk(svc_served[1] > 0,   "SVC message pipe");
    chk(svc_served[2] > 0,   "SVC sampled events");
    chk(svc_served[3] > 0 && hit_words > 0, "SVC hit pipe");
    chk(svc_served[4] > 0 && trk_words > 0, "SVC tracklet pipe");
    chk(svc_served[6] > 0,   "SVC sampled-event pipe almost full");
    chk(svc_served[10] > 0 && sync_cleared > 0, "SVC loss of synchronisation");
    $display("events %0d words %0d drops %0d trunc %0d busy %0d vetoed %0d stall %0d maxpar %0d skipped %0d max latency at 100 kHz %0t",
             ev_done, words_rx, n_drop_exp, n_trunc_exp, busy_rises, vetoed, stall_clocks, max_par,
             n_skip, max_lat_p2);
    for (int i = 1; i <= 11; i++) $display("SVC %0d served %0d times", i, svc_served[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog: events done %0d of %0d, L1As %0d", ev_done, N_EV, n_l1a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
