// tb_record_pipe: a writer puts random-length records (N data words, then
// the control word N) and a reader waits on the control pipe, then reads
// exactly N words. Checks every word and every length.
module tb_record_pipe;
  logic clk = 0, rst_n = 0;
  logic d_wr, d_rd, d_empty, d_full, c_wr, c_rd, c_empty, c_full;
  logic [31:0] d_wdata, d_rdata, c_wdata, c_rdata;
  logic [$clog2(64+1)-1:0] d_count;
  logic [$clog2(4+1)-1:0]  c_count;
  int checks = 0, failures = 0;
  int lens [$];
  logic [31:0] words [$];

  record_pipe #(.DW(32), .CW(32), .DDEPTH(64), .CDEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  // writer
  initial begin
    d_wr = 0; c_wr = 0; d_wdata = 0; c_wdata = 0;
    wait (rst_n);
    for (int r = 0; r < 60; r++) begin
      int n;
      n = $urandom_range(0, 12);
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        while (d_full) @(negedge clk);
        d_wr = 1; d_wdata = {r[15:0], 16'(i)};
        words.push_back(d_wdata);
        @(negedge clk); d_wr = 0;
      end
      @(negedge clk);
      while (c_full) @(negedge clk);
      c_wr = 1; c_wdata = n; lens.push_back(n);
      @(negedge clk); c_wr = 0;
    end
  end

  // reader
  initial begin
    int got;
    d_rd = 0; c_rd = 0; got = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (got < 60) begin
      @(negedge clk);
      if (!c_empty) begin
        int n;
        n = c_rdata;
        chk(n == lens[0], "record length"); void'(lens.pop_front());
        chk(d_count >= n, "data complete before control");
        c_rd = 1; @(negedge clk); c_rd = 0;
        for (int i = 0; i < n; i++) begin
          while (d_empty) @(negedge clk);
          chk(d_rdata == words[0], "record word"); void'(words.pop_front());
          d_rd = 1; @(negedge clk); d_rd = 0;
        end
        got++;
      end
    end
    chk(d_empty && c_empty, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
