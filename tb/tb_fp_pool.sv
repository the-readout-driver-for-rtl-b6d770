// tb_fp_pool: random allocations and acknowledges against a model of the
// free list; checks the lowest free FP is offered, busy masks of FPs and
// links, and that an acknowledge frees both on the next clock.
module tb_fp_pool;
  localparam int N_FP = 4, N_LINKS = 13;
  logic clk = 0, rst_n = 0;
  logic alloc = 0;
  logic [3:0] alloc_link = 0;
  logic [N_FP-1:0] ack = 0, fp_busy;
  logic free_valid;
  logic [1:0] free_fp;
  logic [N_LINKS-1:0] link_busy;
  int checks = 0, failures = 0;
  logic [N_FP-1:0] m_busy = 0;
  logic [N_LINKS-1:0] m_link = 0;
  int m_map [N_FP];

  fp_pool #(.N_FP(N_FP), .N_LINKS(N_LINKS)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    int exp_free;
    #20 rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      exp_free = -1;
      for (int i = N_FP - 1; i >= 0; i--) if (!m_busy[i]) exp_free = i;
      chk(free_valid == (exp_free >= 0), "free_valid");
      if (exp_free >= 0) chk(free_fp == 2'(exp_free), "lowest free FP");
      chk(fp_busy == m_busy, "fp busy mask");
      chk(link_busy == m_link, "link busy mask");
      // random acknowledges of busy FPs
      ack = m_busy & 4'($urandom);
      // allocate a random idle link if an FP is free
      alloc = 0;
      alloc_link = 4'($urandom_range(0, N_LINKS - 1));
      if (free_valid && !m_link[alloc_link] && $urandom_range(0, 1)) alloc = 1;
      @(posedge clk); #1;
      for (int i = 0; i < N_FP; i++) if (ack[i]) begin m_busy[i] = 0; m_link[m_map[i]] = 0; end
      if (alloc) begin m_busy[exp_free] = 1; m_map[exp_free] = alloc_link; m_link[alloc_link] = 1; end
    end
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
