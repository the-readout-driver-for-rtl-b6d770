// tb_rodbusy_gen: random levels on three monitored FIFOs with different
// watermarks. A reference state machine checks that busy rises the clock
// after a level reaches its high mark, falls only when all levels are at
// or below their low marks, that force_busy works, and the counters.
module tb_rodbusy_gen;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  logic [15:0] level [N], hi [N], lo [N];
  logic force_busy = 0, rodbusy;
  logic [31:0] n_busy, busy_cycles;
  int checks = 0, failures = 0, m_state = 0, m_n = 0, m_cyc = 0;

  rodbusy_gen #(.N_MON(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    hi[0] = 100; lo[0] = 20; hi[1] = 10; lo[1] = 2; hi[2] = 1000; lo[2] = 500;
    for (int i = 0; i < N; i++) level[i] = 0;
    #20 rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      bit any_hi, all_lo;
      @(negedge clk);
      chk(rodbusy == (m_state != 0 || force_busy), "busy output");
      chk(n_busy == 32'(m_n), "assertion count");
      chk(busy_cycles == 32'(m_cyc), "busy clock count");
      // slow random walks
      level[0] = 16'($urandom_range(0, 120));
      if ($urandom_range(0, 3) == 0) level[1] = 16'($urandom_range(0, 12));
      level[2] = (cyc % 500 < 50) ? 16'd1000 : 16'd0;
      force_busy = (cyc > 2800);
      any_hi = 0; all_lo = 1;
      for (int i = 0; i < N; i++) begin
        if (level[i] >= hi[i]) any_hi = 1;
        if (level[i] > lo[i]) all_lo = 0;
      end
      if (m_state != 0 || force_busy) m_cyc++;
      if (m_state == 0 && any_hi) begin m_state = 1; m_n++; end
      else if (m_state != 0 && all_lo) m_state = 0;
    end
    chk(m_n > 3, "busy raised several times");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
