// tb_slink_output: words enter on the main clock (100 MHz) and leave on a
// 32 MHz S-Link clock. LFF_N and LDOWN_N are toggled; checks that the
// words arrive in order with the right UCTRL_N, that UWEN_N stays high
// while the link is full or down (a word is popped only on a clock where LFF_N is high),
// and that words wait instead of being lost.
module tb_slink_output;
  logic clk = 0, slink_clk = 0, rst_n = 0, slink_rst_n = 0;
  logic in_valid = 0, in_ctrl = 0, in_ready;
  logic [31:0] in_data = 0, ud;
  logic [4:0] count;
  logic uctrl_n, uwen_n, lff_n = 1, ldown_n = 1;
  int checks = 0, failures = 0, sent = 0, got = 0, lff_prev = 1, ldown_prev = 1, held = 0;

  slink_output #(.AW(4)) dut (.*);
  always #5 clk = ~clk;
  always #15.6 slink_clk = ~slink_clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #50 rst_n = 1; slink_rst_n = 1;
    while (sent < 300) begin
      @(negedge clk);
      in_valid = $urandom_range(0, 1);
      in_data  = sent;
      in_ctrl  = (sent % 7 == 0);
      @(posedge clk);
      if (in_valid && in_ready) sent++;
    end
    @(negedge clk) in_valid = 0;
  end

  always @(posedge slink_clk) if (slink_rst_n) begin
    if (!uwen_n) begin
      chk(ud == got, $sformatf("order got %0d exp %0d", ud, got));
      chk(uctrl_n == !(got % 7 == 0), "UCTRL_N");
      chk(lff_prev == 1, "no write while full");
      chk(ldown_prev, "no write while down");
      got++;
    end
    if (!lff_n || !ldown_n) held++;
    lff_prev   = lff_n;
    ldown_prev = ldown_n;
    #1;
    lff_n   = ($urandom_range(0, 9) > 2);
    ldown_n = !($time > 3000 && $time < 4000);
  end

  initial begin
    wait (got == 300);
    chk(held > 10, "flow control exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
