// tb_svc_controller: a model host answers interrupts: it reads SVCID,
// clears it, and acknowledges through SVCACK after a random service time,
// clearing the condition it served. Checks that only one call of each
// type is outstanding, that a type is not posted again before its SVCACK,
// that every raised condition is eventually served, that irq follows
// the SVCID register, and that calls are posted round robin (each post is
// the first eligible type after the previously posted one, checked
// against a model of the poll position).
module tb_svc_controller;
  localparam int N = 6;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] cond = 0, outstanding;
  logic [7:0] svcid, ack_id = 0;
  logic irq, clr_svcid = 0, ack_wr = 0;
  int checks = 0, failures = 0, served = 0, raised = 0;
  int pend_t [N];          // service timer per type, -1 = not taken by host
  logic [N-1:0] m_out = 0;
  int m_poll = 0, m_pick = -1;        // model of the round-robin position

  svc_controller #(.N_SVC(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  always @(negedge clk) if (rst_n) begin
    chk(irq == (svcid != 0), "irq follows SVCID");
    chk(outstanding == m_out, "outstanding mask");
    clr_svcid = 0; ack_wr = 0;
    if (svcid != 0) begin
      int t;
      t = int'(svcid) - 1;
      chk(pend_t[t] < 0, "type not posted twice");
      chk(cond[t], "posted condition is true");
      if ($changed(svcid)) chk(t == m_pick, "round-robin order");
      pend_t[t] = $urandom_range(3, 40);
      clr_svcid = 1;                       // handler read it and clears
    end else begin
      for (int t = 0; t < N; t++) if (pend_t[t] > 0) begin
        pend_t[t]--;
        if (pend_t[t] == 0 && !ack_wr) begin
          cond[t] = 0;                     // service done
          ack_wr = 1; ack_id = 8'(t + 1);
          pend_t[t] = -1;
          served++;
        end else if (pend_t[t] == 0) pend_t[t] = 1;
      end
    end
    for (int t = 0; t < N; t++) if (!cond[t] && pend_t[t] < 0 && raised < 200 && $urandom_range(0, 30) == 0) begin
      cond[t] = 1; raised++;
    end
  end

  // model of the outstanding mask, updated as the DUT registers are
  always @(posedge clk) if (rst_n) begin
    if (svcid == 0 && !clr_svcid) begin
      for (int k = 0; k < N; k++) begin
        int t;
        t = (m_poll + k) % N;
        if (cond[t] && !m_out[t]) begin
          m_out[t] <= 1;
          m_pick = t;
          m_poll = (t + 1) % N;
          break;
        end
      end
    end
    if (ack_wr) m_out[ack_id - 1] <= 0;
  end

  initial begin
    for (int t = 0; t < N; t++) pend_t[t] = -1;
    #20 rst_n = 1;
    wait (raised == 200 && cond == 0);
    repeat (5) @(negedge clk);
    chk(served == 200, "all served");
    chk(svcid == 0 && !irq, "quiet at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
