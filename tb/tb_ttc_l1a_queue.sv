// tb_ttc_l1a_queue: drives L1A, BCR and ECR on the TTC clock and reads the
// queue on the main clock. The testbench keeps its own bunch and event
// counters and checks each queued {L1ID, BCID}, the queue overflow flag
// and the main-side count.
module tb_ttc_l1a_queue;
  import rod_pkg::*;
  logic ttc_clk = 0, clk = 0, ttc_rst_n = 0, rst_n = 0;
  logic l1a = 0, bcr = 0, ecr = 0, overflow, rd = 0, empty;
  ttc_ev_t ev;
  logic [3:0] rcount;
  int checks = 0, failures = 0;
  ttc_ev_t expq [$];
  int bc = 0, evn = 0, ecrn = 0;

  ttc_l1a_queue #(.AW(3), .BC_MAX(99)) dut (.*);
  always #12.5 ttc_clk = ~ttc_clk;
  always #4 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  // reference counters, updated with the DUT's clock
  always @(posedge ttc_clk) if (ttc_rst_n) begin
    if (l1a && !ecr && !dut.full) expq.push_back('{l1id: {8'(ecrn), 16'(evn)}, bcid: 12'(bc)});
    bc <= (bcr || bc == 99) ? 0 : bc + 1;
    if (ecr) begin evn <= 0; ecrn <= ecrn + 1; end
    else if (l1a) evn <= evn + 1;
  end

  initial begin
    #50 ttc_rst_n = 1; rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge ttc_clk);
      l1a = ($urandom_range(0, 6) == 0);
      bcr = (i == 150);
      ecr = (i == 300 || i == 301);
    end
    @(negedge ttc_clk) l1a = 0;
  end

  int got = 0;
  initial begin
    #50;
    for (int i = 0; i < 9000; i++) begin
      @(negedge clk);
      chk(rcount <= 8, "count range");
      // read slowly at first so that the queue fills and overflows
      if (!empty && (i > 1500 || $urandom_range(0, 40) == 0)) begin
        chk(ev == expq[0], $sformatf("event %0d: got %h/%h exp %h/%h", got, ev.l1id, ev.bcid, expq[0].l1id, expq[0].bcid));
        void'(expq.pop_front());
        got++;
        rd = 1; @(negedge clk); rd = 0;
      end
    end
    chk(got > 30, "events read");
    chk(overflow, "overflow flagged");
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
