// tb_dispatcher: the dispatcher with its free list (fp_pool) and model
// FPs that finish after a random number of clocks. Checks that every
// enabled link of every event goes to an FP that was free, in ascending
// link order, with the event's L1ID; that the order pipe gets the same FP
// numbers; that the event-info word carries L1ID, BCID and the fragment
// count; and that no link is given to two FPs at once.
module tb_dispatcher;
  import rod_pkg::*;
  localparam int N_FP = 3, N_LINKS = 6;
  logic clk = 0, rst_n = 0;
  logic [N_LINKS-1:0] link_en;
  logic ev_empty, ev_rd;
  ttc_ev_t ev;
  logic free_valid, alloc;
  logic [1:0] free_fp;
  logic [N_LINKS-1:0] link_busy;
  logic [3:0] alloc_link, fp_link;
  logic [N_FP-1:0] fp_req, ack;
  logic [N_FP-1:0] fp_busy;
  logic [23:0] fp_l1id;
  logic ord_full = 0, ord_wr, evi_full = 0, evi_wr, active;
  logic [3:0] ord_wdata;
  ttc_ev_t evi_wdata;
  int last_en;
  int checks = 0, failures = 0;
  int timer [N_FP];
  int fp_lnk [N_FP];
  int n_ev = 0, next_link = 0, nfr = 0, ev_popped = 0;

  dispatcher #(.N_FP(N_FP), .N_LINKS(N_LINKS)) dut (.*);
  fp_pool #(.N_FP(N_FP), .N_LINKS(N_LINKS)) u_pool (.clk, .rst_n, .alloc, .alloc_link, .ack,
    .free_valid, .free_fp, .fp_busy, .link_busy);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  assign ev_empty = (ev_popped >= 40);
  assign ev = '{l1id: 24'(ev_popped + 100), bcid: 12'(ev_popped * 7)};
  assign link_en = (n_ev < 20) ? 6'b111111 : 6'b101101;

  initial begin
    #20 rst_n = 1;
  end

  always @(negedge clk) if (rst_n) begin
    ord_full = ($urandom_range(0, 7) == 0);
    ack = '0;
    for (int f = 0; f < N_FP; f++) if (timer[f] > 0) begin
      timer[f]--;
      if (timer[f] == 0) ack[f] = 1;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (|fp_req) begin
      int f;
      f = -1;
      for (int i = 0; i < N_FP; i++) if (fp_req[i]) f = i;
      chk($onehot(fp_req), "one request");
      chk(timer[f] == 0 && !fp_busy[f], "request to a free FP");
      while (next_link < N_LINKS && !link_en[next_link]) next_link++;
      chk(int'(fp_link) == next_link, $sformatf("link order got %0d exp %0d", fp_link, next_link));
      chk(fp_l1id == 24'(n_ev + 100), "L1ID on channel");
      last_en = 0;
      for (int i = 0; i < N_LINKS; i++) if (link_en[i]) last_en = i;
      chk(ord_wr && ord_wdata == {1'b1, 1'(next_link == last_en), 2'(f)}, "order pipe entry");
      if (next_link == last_en) begin
        chk(nfr + 1 == $countones(link_en), "fragments of the event");
        n_ev <= n_ev + 1;
        nfr = -1;
        next_link = -1;
      end
      for (int i = 0; i < N_FP; i++) if (timer[i] > 0) chk(fp_lnk[i] != int'(fp_link), "link not shared");
      next_link++;
      nfr++;
      timer[f] <= $urandom_range(1, 25);
      fp_lnk[f] = fp_link;
    end else chk(!ord_wr, "no order entry without a request");
    if (evi_wr) begin
      chk(evi_wdata == ev, "event info written when the event starts");
      chk(ev_rd, "TTC pop with event info");
      chk(ev_popped == n_ev, "one event at a time");
      ev_popped++;
    end
  end

  initial begin
    wait (n_ev == 40);
    repeat (5) @(posedge clk);
    chk(!active, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
