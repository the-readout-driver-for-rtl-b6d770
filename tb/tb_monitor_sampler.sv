// tb_monitor_sampler: a stream of formatted events with hit, tracklet and
// trigger payload words. Checks that exactly every prescale-th event is
// copied (without S-Link control words), that hits and tracklets go to
// their pipes, that a sample is skipped and counted when a pipe lacks
// room for that event (judged from its length), and that prescale 0
// turns sampling off.
module tb_monitor_sampler;
  logic clk = 0, rst_n = 0;
  logic [15:0] prescale = 3, ev_free = 2000, hit_free = 2000, trk_free = 2000;
  logic fire = 0, t_ctrl = 0, t_payload = 0, t_sof = 0;
  logic [31:0] t_data = 0, wdata, n_sampled, n_skipped;
  logic [15:0] t_len = 0;
  logic ev_wr, hit_wr, trk_wr, sampling;
  int checks = 0, failures = 0;
  int n_ev_w = 0, n_hit_w = 0, n_trk_w = 0;
  int e_ev_w = 0, e_hit_w = 0, e_trk_w = 0, e_samp = 0, e_skip = 0;

  monitor_sampler dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  always @(posedge clk) begin
    if (ev_wr) n_ev_w++;
    if (hit_wr) begin n_hit_w++; chk(wdata[31:30] == 2'b00, "hit word type"); end
    if (trk_wr) begin n_trk_w++; chk(wdata[31:30] == 2'b01, "tracklet word type"); end
  end

  task automatic xfer(logic c, logic p, logic s, logic [31:0] d);
    @(negedge clk);
    fire = 1; t_ctrl = c; t_payload = p; t_sof = s; t_data = d;
    @(negedge clk);
    fire = 0;
  endtask

  initial begin
    int cnt;
    #20 rst_n = 1;
    cnt = 0;
    for (int e = 0; e < 40; e++) begin
      int nh, nt, ng;
      bit samp;
      if (e == 30) prescale = 0;
      // windows with little room: the event fits or not by its length
      ev_free  = (e >= 5 && e < 12)  ? 16'(13 + 5) : 16'd2000;
      hit_free = (e >= 14 && e < 20) ? 16'd4 : 16'd2000;
      trk_free = (e >= 22 && e < 28) ? 16'd6 : 16'd2000;
      nh = $urandom_range(0, 6); nt = $urandom_range(0, 3); ng = $urandom_range(0, 2);
      t_len = 16'(nh + nt + ng + 1);
      samp = 0;
      if (prescale != 0) begin
        if (cnt + 1 >= prescale) begin
          cnt = 0;
          if (int'(ev_free) >= int'(t_len) + 13 && hit_free >= t_len && trk_free >= t_len) begin
            samp = 1; e_samp++;
          end else e_skip++;
        end else cnt++;
      end
      xfer(1, 0, 1, 32'hB0F00000);
      for (int i = 0; i < 10; i++) xfer(0, 0, 0, 32'hEE1234EE + i);   // header + status
      for (int i = 0; i < nh; i++) xfer(0, 1, 0, {2'b00, 30'(i)});
      for (int i = 0; i < nt; i++) xfer(0, 1, 0, {2'b01, 30'(i)});
      for (int i = 0; i < ng; i++) xfer(0, 1, 0, {2'b10, 30'(i)});
      xfer(0, 1, 0, {2'b11, 30'd5});                                  // fragment header
      for (int i = 0; i < 3; i++) xfer(0, 0, 0, 32'h0 + i);           // trailer
      xfer(1, 0, 0, 32'hE0F00000);
      if (samp) begin
        e_ev_w += 10 + nh + nt + ng + 1 + 3; e_hit_w += nh; e_trk_w += nt;
      end
    end
    repeat (3) @(negedge clk);
    chk(n_ev_w == e_ev_w, $sformatf("event words %0d exp %0d", n_ev_w, e_ev_w));
    chk(n_hit_w == e_hit_w, "hit words");
    chk(n_trk_w == e_trk_w, "tracklet words");
    chk(n_sampled == 32'(e_samp), "sampled count");
    chk(n_skipped == 32'(e_skip) && e_skip > 0, "skipped count");
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
