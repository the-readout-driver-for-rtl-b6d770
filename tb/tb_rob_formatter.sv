// tb_rob_formatter: event records of random length in model pipes; the
// downstream ready is random. Checks the whole output sequence of each
// event against the ROD layout (BOF, 9 header words, status, data,
// 3 trailer words, EOF), the ctrl/payload/sof markers, and that an
// event of N words takes N + 15 transfers.
module tb_rob_formatter;
  import rod_pkg::*;
  logic clk = 0, rst_n = 0;
  ev_ctrl_t c_rdata;
  logic c_empty, c_rd, d_empty, d_rd;
  logic [31:0] d_rdata, o_data;
  logic o_valid, o_ctrl, o_payload, o_sof, o_ready = 0;
  logic [15:0] o_len;
  int lens [64];
  int n_sof = 0;
  logic [31:0] run_number = 32'd4711;
  int checks = 0, failures = 0;
  ev_ctrl_t cm [64];
  logic [31:0] dm [4096];
  int ch = 0, ct = 0, dh = 0, dt = 0;
  logic [33:0] exp_q [$];   // {ctrl, payload, data}

  rob_formatter #(.SOURCE_ID(32'h0067_0001)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  assign c_empty = ch == ct;
  assign c_rdata = cm[ch % 64];
  assign d_empty = dh == dt;
  assign d_rdata = dm[dh % 4096];

  int n_xfer = 0;
  always @(posedge clk) if (rst_n) begin
    if (c_rd) ch <= ch + 1;
    if (d_rd) dh <= dh + 1;
    if (o_valid && o_ready) begin
      n_xfer++;
      chk(exp_q.size() != 0 && {o_ctrl, o_payload, o_data} == exp_q[0], $sformatf("word %h", o_data));
      chk(o_sof == (o_ctrl && o_data == SLINK_BOF), "sof marker");
      if (o_sof) begin
        chk(int'(o_len) == lens[n_sof % 64], "event length with the sof word");
        n_sof++;
      end
      void'(exp_q.pop_front());
    end
    #2 o_ready = $urandom_range(0, 3) != 0;
  end

  initial begin
    int total;
    total = 0;
    for (int e = 0; e < 30; e++) begin
      ev_ctrl_t c;
      int n;
      n = (e == 3) ? 0 : $urandom_range(1, 40);
      c = '{l1id: 24'(e + 5), bcid: 12'(e * 11), count: 16'(n), status: 16'(e % 4)};
      cm[ct] = c; lens[ct] = n; ct++;
      exp_q.push_back({2'b10, SLINK_BOF});
      exp_q.push_back({2'b00, 32'hEE1234EE});
      exp_q.push_back({2'b00, 32'd9});
      exp_q.push_back({2'b00, ROD_FMT_VER});
      exp_q.push_back({2'b00, 32'h0067_0001});
      exp_q.push_back({2'b00, 32'd4711});
      exp_q.push_back({2'b00, 32'(e + 5)});
      exp_q.push_back({2'b00, 32'(e * 11)});
      exp_q.push_back({2'b00, 32'd0});
      exp_q.push_back({2'b00, 32'd0});
      exp_q.push_back({2'b00, 32'(e % 4)});
      for (int i = 0; i < n; i++) begin
        dm[dt] = $urandom; exp_q.push_back({2'b01, dm[dt]}); dt++;
      end
      exp_q.push_back({2'b00, 32'd1});
      exp_q.push_back({2'b00, 32'(n)});
      exp_q.push_back({2'b00, 32'd0});
      exp_q.push_back({2'b10, SLINK_EOF});
      total += n + 15;
    end
    #20 rst_n = 1;
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    chk(n_xfer == total, "transfer count N+15 per event");
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
