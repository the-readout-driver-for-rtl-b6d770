// tb_event_builder: model FP output pipes filled with random fragments,
// spread over the FPs in a random order given through the order pipe.
// The reference builds each expected event (fragment header word, then
// the fragment's words) and the expected control word; fragments that
// would pass EV_MAX must be dropped, flagged and reported by a message.
module tb_event_builder;
  import rod_pkg::*;
  localparam int N_FP = 3, EV_MAX = 30, N_EV = 60;
  logic clk = 0, rst_n = 0;
  logic evi_empty, evi_rd, ord_empty, ord_rd;
  ttc_ev_t evi_rdata;
  logic [3:0] ord_rdata;
  fp_ctrl_t fp_c_rdata [N_FP];
  logic [N_FP-1:0] fp_c_empty, fp_c_rd, fp_d_empty, fp_d_rd;
  logic [31:0] fp_d_rdata [N_FP];
  logic ev_d_full = 0, ev_d_wr, ev_c_full = 0, ev_c_wr;
  logic [31:0] ev_d_wdata;
  ev_ctrl_t ev_c_wdata;
  logic msg_req, msg_gnt = 0;
  msg_t msg;
  logic [31:0] n_events, n_dropped;
  int checks = 0, failures = 0;

  ttc_ev_t     evi_m [N_EV];
  logic [3:0]  ord_m [N_EV*5];
  int          eh = 0, et = 0, oh = 0, ot = 0;
  // per-FP pipes as arrays with head/tail indices
  fp_ctrl_t    c_m [N_FP][256];
  logic [31:0] d_m [N_FP][2048];
  int          ch [N_FP], ct [N_FP], dh [N_FP], dt [N_FP];
  logic [31:0] exp_d [$];
  ev_ctrl_t    exp_c [$];
  int exp_drops = 0, msgs = 0, gap;

  event_builder #(.N_FP(N_FP), .EV_MAX(EV_MAX)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  assign evi_empty = eh == et;
  assign evi_rdata = evi_m[eh % N_EV];
  assign ord_empty = oh == ot;
  assign ord_rdata = ord_m[oh % (N_EV*5)];
  for (genvar f = 0; f < N_FP; f++) begin : g
    assign fp_c_empty[f] = ch[f] == ct[f] || gap == f;
    assign fp_c_rdata[f] = c_m[f][ch[f]];
    assign fp_d_empty[f] = dh[f] == dt[f] || gap == f;
    assign fp_d_rdata[f] = d_m[f][dh[f]];
  end

  always @(posedge clk) if (rst_n) begin
    if (evi_rd) eh <= eh + 1;
    if (ord_rd) oh <= oh + 1;
    for (int f = 0; f < N_FP; f++) begin
      if (fp_c_rd[f]) ch[f] <= ch[f] + 1;
      if (fp_d_rd[f]) dh[f] <= dh[f] + 1;
    end
    if (ev_d_wr) begin
      chk(!ev_d_full, "data write while full");
      chk(exp_d.size() != 0 && ev_d_wdata == exp_d[0], $sformatf("event word %h exp %h", ev_d_wdata, exp_d[0]));
      void'(exp_d.pop_front());
    end
    if (ev_c_wr) begin
      chk(!ev_c_full, "ctrl write while full");
      chk(exp_c.size() != 0 && ev_c_wdata == exp_c[0], $sformatf("event control %h", ev_c_wdata));
      void'(exp_c.pop_front());
    end
    if (msg_req && msg_gnt) begin
      msgs++;
      chk(msg.code == MSG_EV_DROP, "drop message code");
    end
    #2;
    gap = $urandom_range(0, 5);
    ev_d_full = $urandom_range(0, 4) == 0;
    ev_c_full = $urandom_range(0, 4) == 0;
    msg_gnt = msg_req && $urandom_range(0, 1);
  end

  initial begin
    gap = 9;
    for (int f = 0; f < N_FP; f++) begin ch[f] = 0; ct[f] = 0; dh[f] = 0; dt[f] = 0; end
    for (int e = 0; e < N_EV; e++) begin
      int nf, wc;
      logic [7:0] st;
      nf = $urandom_range(0, 4);
      wc = 0; st = 0;
      evi_m[et] = '{l1id: 24'(e * 3), bcid: 12'(e)}; et++;
      if (nf == 0) begin ord_m[ot] = 4'b0100; ot++; end
      for (int k = 0; k < nf; k++) begin
        int f, n;
        fp_ctrl_t c;
        f = $urandom_range(0, N_FP - 1);
        n = $urandom_range(0, 12);
        c = '{flags: 8'($urandom_range(0, 3) == 0 ? 8'h10 : 8'h00), rsvd: 0, link: 4'(k), count: 16'(n)};
        ord_m[ot] = {1'b1, 1'(k == nf - 1), 2'(f)}; ot++;
        c_m[f][ct[f]] = c; ct[f]++;
        if (wc + n + 1 <= EV_MAX) begin
          exp_d.push_back({2'b11, 4'(k), 10'(c.flags), 16'(n)});
          st |= c.flags;
        end else begin
          st[F_DROPPED] = 1;
          exp_drops++;
        end
        for (int i = 0; i < n; i++) begin
          d_m[f][dt[f]] = {8'(e), 8'(k), 16'(i)}; dt[f]++;
          if (wc + n + 1 <= EV_MAX) exp_d.push_back({8'(e), 8'(k), 16'(i)});
        end
        if (wc + n + 1 <= EV_MAX) wc += n + 1;
      end
      exp_c.push_back('{l1id: 24'(e * 3), bcid: 12'(e), count: 16'(wc), status: 16'(st)});
    end
    #20 rst_n = 1;
    wait (n_events == N_EV);
    repeat (3) @(posedge clk);
    chk(exp_d.size() == 0 && exp_c.size() == 0, "all events built");
    chk(exp_drops > 0 && n_dropped == 32'(exp_drops), "drops counted");
    chk(msgs == exp_drops, "one message per drop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
