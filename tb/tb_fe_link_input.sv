// tb_fe_link_input: sends fragments on the link clock (40 MHz) and reads
// records on the main clock. Covers a clean fragment, a link error, a
// header with front-end error bits, orphan words, a header inside a
// fragment and a fragment longer than MAX_WORDS. The expected record
// (count, flags, words) of each case is written down by the testbench.
module tb_fe_link_input;
  import rod_pkg::*;
  logic link_clk = 0, clk = 0, link_rst_n = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0, in_eof = 0, link_err = 0;
  logic [31:0] in_data = 0;
  logic [15:0] orphan_cnt, lost_cnt;
  logic c_rd = 0, c_empty, d_rd = 0, d_empty;
  link_ctrl_t c_rdata;
  logic [31:0] d_rdata;
  logic [5:0] d_count;
  logic [3:0] c_count;
  int checks = 0, failures = 0;

  typedef struct { int count; logic [7:0] flags; } rec_t;
  rec_t exp_rec [$];
  logic [31:0] exp_w [$];

  fe_link_input #(.DEPTH_LOG2(5), .CTRL_LOG2(3), .MAX_WORDS(8)) dut (.*);
  always #12.5 link_clk = ~link_clk;
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  task automatic word(logic sof, logic eof, logic [31:0] d, logic err = 0);
    @(negedge link_clk);
    in_valid = 1; in_sof = sof; in_eof = eof; in_data = d; link_err = err;
    @(negedge link_clk);
    in_valid = 0; in_sof = 0; in_eof = 0; link_err = 0;
  endtask

  function automatic logic [31:0] hdr(int l1, logic [3:0] fe = 0);
    return {FE_HDR_MARK, fe, 12'h123, 12'(l1)};
  endfunction

  // fragment with n data words; words expected kept up to MAX_WORDS
  task automatic frag(int l1, int n, logic [7:0] flags, logic [3:0] fe = 0, int err_at = -1);
    word(1, n == 0, hdr(l1, fe));
    exp_w.push_back(hdr(l1, fe));
    for (int i = 0; i < n; i++) begin
      word(0, i == n - 1, {2'b00, 14'(l1), 16'(i + 1)}, i == err_at);
      if (i + 1 < 8) exp_w.push_back({2'b00, 14'(l1), 16'(i + 1)});
    end
    exp_rec.push_back('{count: (n + 1 > 8) ? 8 : n + 1, flags: flags});
  endtask

  initial begin
    #60 link_rst_n = 1; rst_n = 1;
    frag(1, 3, 8'h00);                                  // clean
    frag(2, 2, 8'(1 << F_LINK_ERR), 0, 1);              // link error on a data word
    frag(3, 1, 8'(1 << F_FE_ERR), 4'h2);                // front-end error bits
    word(0, 0, 32'h1111); word(0, 1, 32'h2222);          // orphans: dropped
    // header inside a fragment: the first one is closed truncated
    word(1, 0, hdr(4)); word(0, 0, 32'h0004_0001);
    exp_w.push_back(hdr(4)); exp_w.push_back(32'h0004_0001);
    exp_rec.push_back('{count: 2, flags: 8'(1 << F_TRUNC_IN)});
    frag(5, 2, 8'h00);
    frag(6, 10, 8'(1 << F_TRUNC_IN));                   // too long: 8 kept
    frag(7, 0, 8'h00);                                   // header only
  end

  initial begin
    int nrec;
    nrec = 0;
    wait (rst_n);
    while (nrec < 7) begin
      @(negedge clk);
      if (!c_empty) begin
        chk(c_rdata.count == 16'(exp_rec[0].count), $sformatf("count rec %0d", nrec));
        chk(c_rdata.flags == exp_rec[0].flags, $sformatf("flags rec %0d (%h)", nrec, c_rdata.flags));
        chk(32'(d_count) >= 32'(c_rdata.count), "data before control");
        chk(c_count >= 1 && c_count <= 8, "control pipe occupancy");
        for (int i = 0; i < int'(c_rdata.count); i++) begin
          chk(!d_empty && d_rdata == exp_w[0], $sformatf("word rec %0d", nrec));
          void'(exp_w.pop_front());
          d_rd = 1; @(negedge clk); d_rd = 0;
        end
        c_rd = 1; @(negedge clk); c_rd = 0;
        void'(exp_rec.pop_front());
        nrec++;
      end
    end
    repeat (20) @(negedge clk);
    chk(orphan_cnt == 2, "orphan count");
    chk(lost_cnt == 0, "lost count");
    chk(c_empty && d_empty && c_count == 0 && d_count == 0, "drained");
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
