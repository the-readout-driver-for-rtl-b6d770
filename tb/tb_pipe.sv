// tb_pipe: random write/read traffic against a queue model of the pipe.
// Checks data order, empty/full/count and the almost flags every clock,
// and that a write filling the pipe completes on that clock.
module tb_pipe;
  localparam int W = 16, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic wr, rd, empty, full, af, ae;
  logic [W-1:0] wdata, rdata;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  pipe #(.W(W), .DEPTH(DEPTH), .AF_LEVEL(6), .AE_LEVEL(1)) dut (.*, .almost_full(af), .almost_empty(ae));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    wr = 0; rd = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      chk(count == model.size(), "count");
      chk(empty == (model.size() == 0), "empty");
      chk(full == (model.size() == DEPTH), "full");
      chk(af == (model.size() >= 6), "almost_full");
      chk(ae == (model.size() <= 1), "almost_empty");
      if (model.size() != 0) chk(rdata == model[0], "data order");
      // bias phases: fill, drain, mixed
      wr = !full && ($urandom_range(0, 99) < ((cyc / 300) % 2 ? 30 : 75));
      rd = !empty && ($urandom_range(0, 99) < ((cyc / 300) % 2 ? 75 : 30));
      wdata = W'($urandom);
      @(posedge clk);
      #1;
      if (rd) void'(model.pop_front());
      if (wr) model.push_back(wdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
