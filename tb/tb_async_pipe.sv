// tb_async_pipe: writer at 40 MHz, reader at an unrelated slower clock
// and then a faster one; checks every word arrives once and in order,
// that full stops the writer and that both counts stay within the depth.
module tb_async_pipe;
  localparam int AW = 3;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr, rd, full, empty;
  logic [15:0] wdata, rdata;
  logic [AW:0] wcount, rcount;
  int checks = 0, failures = 0, sent = 0, got = 0, fulls = 0;
  real rhalf = 17.3;

  async_pipe #(.W(16), .AW(AW)) dut (.*);
  always #12.5 wclk = ~wclk;
  always #(rhalf) rclk = ~rclk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    wr = 0; wdata = 0;
    #40 wrst_n = 1; rrst_n = 1;
    while (sent < 400) begin
      @(negedge wclk);
      chk(wcount <= (1 << AW), "wcount range");
      if (full) fulls++;
      wr = !full && ($urandom_range(0, 3) != 0);
      wdata = 16'(sent);
      @(posedge wclk);
      if (wr) sent++;
    end
    @(negedge wclk) wr = 0;
  end

  initial begin
    rd = 0;
    #40;
    while (got < 400) begin
      @(negedge rclk);
      chk(rcount <= (1 << AW), "rcount range");
      rd = !empty && ($urandom_range(0, 4) != 0);
      if (rd) begin
        chk(rdata == 16'(got), "order");
        got++;
      end
      if (got == 200) rhalf = 6.1;
      @(posedge rclk);
      #0.1 rd = 0;
    end
    chk(fulls > 0, "full seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
