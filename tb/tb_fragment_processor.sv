// tb_fragment_processor: feeds link records to one FP through model
// pipes (first-word fall-through, random empty gaps) and takes its output
// through a model pipe that is randomly full. For each fragment a
// reference written here gives the expected hit and trigger words, flags
// and count; the test covers clean fragments, an L1ID mismatch, an
// illegal word, an empty record, input flags and the OUT_MAX limit. It
// also checks the message (sent only when flags are set) and the
// acknowledge, and that the decode takes one clock per hit.
module tb_fragment_processor;
  import rod_pkg::*;
  localparam int OUT_MAX = 20;
  logic clk = 0, rst_n = 0;
  logic req = 0, ack, act, c_empty, c_rd, d_empty, d_rd;
  logic [3:0] req_link = 0, sel;
  logic [23:0] req_l1id = 0;
  link_ctrl_t c_rdata;
  logic [31:0] d_rdata;
  logic o_d_full = 0, o_d_wr, o_c_full = 0, o_c_wr;
  logic [31:0] o_d_wdata;
  fp_ctrl_t o_c_wdata;
  logic msg_req, msg_gnt = 0;
  msg_t msg;
  logic [31:0] n_hits, n_frags;
  int checks = 0, failures = 0;

  link_ctrl_t cq [$];
  logic [31:0] dq [$];
  logic [31:0] out_q [$];
  logic gap;
  int msgs_seen = 0;
  logic [23:0] msg_exp;

  fragment_processor #(.OUT_MAX(OUT_MAX)) dut (.*);
  always #5 clk = ~clk;

  assign c_empty = (cq.size() == 0) || gap;
  assign d_empty = (dq.size() == 0) || gap;
  assign c_rdata = (cq.size() != 0) ? cq[0] : '0;
  assign d_rdata = (dq.size() != 0) ? dq[0] : '0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  always @(posedge clk) begin
    if (c_rd) void'(cq.pop_front());
    if (d_rd) void'(dq.pop_front());
    if (msg_req && msg_gnt) begin
      msgs_seen++;
      chk(msg.code == MSG_FRAG_ERR && msg.data == msg_exp, "message word");
    end
    if (o_d_wr) begin
      chk(!o_d_full, "write while full");
      out_q.push_back(o_d_wdata);
    end
  end
  always @(posedge clk) begin
    #2;
    gap      = ($urandom_range(0, 4) == 0);
    o_d_full = ($urandom_range(0, 5) == 0);
    o_c_full = ($urandom_range(0, 5) == 0);
  end
  // message grant after a random delay
  always @(posedge clk) begin #3; msg_gnt = msg_req && ($urandom_range(0, 2) == 0); end

  // run one fragment and compare with the reference
  task automatic run(int link, int l1id, int hdr_l1, logic [7:0] in_flags, logic [31:0] words [$],
                     bit empty_rec = 0);
    logic [31:0] exp [$];
    logic [7:0] ef;
    int cyc, nhits, msgs;
    ef = in_flags;
    if (!empty_rec) begin
      cq.push_back('{flags: in_flags, rsvd: 0, count: 16'(words.size() + 1)});
      dq.push_back({FE_HDR_MARK, 4'h0, 12'h055, 12'(hdr_l1)});
      foreach (words[i]) dq.push_back(words[i]);
      if (hdr_l1 != (l1id & 'hfff)) ef[F_L1ID_MISS] = 1;
    end else begin
      cq.push_back('{flags: in_flags, rsvd: 0, count: 0});
      ef[F_NO_HDR] = 1;
    end
    nhits = 0;
    foreach (words[i]) begin
      case (words[i][31:30])
        2'b00: for (int b = 0; b < 16; b++) if (words[i][b]) begin
                 if (exp.size() < OUT_MAX) begin exp.push_back({2'b00, 4'(link), words[i][29:16], 8'h0, 4'(b)}); nhits++; end
                 else ef[F_TRUNC_OUT] = 1;
               end
        2'b01, 2'b10: if (exp.size() < OUT_MAX) exp.push_back(words[i]); else ef[F_TRUNC_OUT] = 1;
        default: ef[F_BAD_WORD] = 1;
      endcase
    end
    out_q = {};
    msg_exp = {4'(link), ef, 12'(l1id)};
    msgs = msgs_seen;
    @(negedge clk);
    req = 1; req_link = 4'(link); req_l1id = 24'(l1id);
    @(negedge clk);
    req = 0;
    cyc = 0;
    while (!ack && cyc < 2000) begin
      @(negedge clk); cyc++;
    end
    chk(ack, "acknowledged");
    chk(o_c_wr && o_c_wdata.count == 16'(exp.size()), $sformatf("count %0d exp %0d", o_c_wdata.count, exp.size()));
    chk(o_c_wdata.flags == ef, $sformatf("flags %h exp %h", o_c_wdata.flags, ef));
    chk(o_c_wdata.link == 4'(link), "link in control word");
    chk(msgs_seen - msgs == (ef != 0 ? 1 : 0), "one message iff flags");
    chk(cyc >= nhits, "at least one clock per hit");
    @(posedge clk); #1;
    chk(out_q.size() == exp.size(), "output length");
    foreach (exp[i]) if (i < out_q.size()) chk(out_q[i] == exp[i], $sformatf("word %0d", i));
    chk(!act, "idle after ack");
  endtask

  initial begin
    logic [31:0] w [$];
    #20 rst_n = 1;
    w = {32'h0001_8005, 32'h4000_0ABC, 32'h0002_0000, 32'h8012_3456, 32'h0003_0001};
    run(3, 24'h010203, 'h203, 8'h00, w);                       // clean
    run(5, 24'h000777, 'h776, 8'h00, w);                       // L1ID mismatch
    w = {32'h0004_0003, 32'hC000_0000, 32'h4000_0001};
    run(1, 24'h000010, 'h010, 8'h00, w);                       // illegal word
    run(2, 24'h000011, 'h011, 8'(1 << F_LINK_ERR), w[0:0]);    // input flag passed on
    w = {};
    run(7, 24'h000012, 'h012, 8'(1 << F_TRUNC_IN), w, 1);     // empty record
    w = {32'h0005_FFFF, 32'h4000_0002, 32'h0006_00FF};
    run(9, 24'h000013, 'h013, 8'h00, w);                       // output limit
    for (int k = 0; k < 20; k++) begin                         // random clean fragments
      w = {};
      for (int i = 0; i < $urandom_range(0, 4); i++) w.push_back({1'b0, 1'($urandom), 14'($urandom), 16'($urandom) & 16'h0841});
      run(k % 13, 100 + k, 100 + k, 8'h00, w);
    end
    chk(n_frags == 26, "fragment counter");
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
