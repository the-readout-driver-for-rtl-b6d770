// tb_vme_regs: register writes and read-backs, SVC clear and SVCACK
// strobes, pipe reads that pop only when the pipe is not empty, and the
// occupancy and statistics windows.
module tb_vme_regs;
  localparam int N_OCC = 5, N_STAT = 3, N_LINKS = 13;
  logic clk = 0, rst_n = 0;
  logic [7:0] addr = 0;
  logic we = 0, re = 0;
  logic [31:0] wdata = 0, rdata;
  logic [7:0] svcid = 8'd5, svcack_id;
  logic clr_svcid, svcack_wr, force_busy, clr_sync;
  logic [N_LINKS-1:0] link_en;
  logic [15:0] prescale;
  logic [31:0] run_number;
  logic [2:0] status = 3'b101;
  logic [31:0] hp_rdata [4];
  logic [3:0] hp_empty = 4'b0100, hp_rd;
  logic [15:0] occ [N_OCC];
  logic [31:0] stat [N_STAT];
  int checks = 0, failures = 0;

  vme_regs #(.N_OCC(N_OCC), .N_STAT(N_STAT), .N_LINKS(N_LINKS)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  task automatic wr(logic [7:0] a, logic [31:0] d, output logic s1, output logic s2);
    @(negedge clk); addr = a; wdata = d; we = 1;
    #1 s1 = clr_svcid; s2 = svcack_wr;
    @(negedge clk); we = 0;
  endtask

  task automatic rd(logic [7:0] a, output logic [31:0] d, output logic [3:0] pops);
    @(negedge clk); addr = a; re = 1;
    #1 pops = hp_rd;
    @(negedge clk); re = 0; d = rdata;
  endtask

  initial begin
    logic s1, s2;
    logic [31:0] d;
    logic [3:0] p;
    for (int i = 0; i < 4; i++) hp_rdata[i] = 32'hA000_0000 + i;
    for (int i = 0; i < N_OCC; i++) occ[i] = 16'(100 + i);
    for (int i = 0; i < N_STAT; i++) stat[i] = 32'(7000 + i);
    #20 rst_n = 1;
    rd(8'h02, d, p); chk(d == 32'h1FFF, "links enabled after reset");
    wr(8'h02, 32'h0155, s1, s2); rd(8'h02, d, p); chk(d == 32'h0155 && link_en == 13'h155, "link enable");
    wr(8'h03, 32'd9, s1, s2);    rd(8'h03, d, p); chk(d == 9 && prescale == 9, "prescale");
    wr(8'h04, 32'hCAFE, s1, s2); rd(8'h04, d, p); chk(d == 32'hCAFE && run_number == 32'hCAFE, "run number");
    wr(8'h07, 32'd1, s1, s2);    chk(force_busy, "force busy");
    rd(8'h05, d, p); chk(d == 32'd5, "status");
    rd(8'h00, d, p); chk(d == 32'd5, "SVCID read");
    wr(8'h00, 32'd0, s1, s2); chk(s1 && !s2, "SVCID clear strobe");
    wr(8'h01, 32'd3, s1, s2); chk(!s1 && s2 && svcack_id == 3, "SVCACK strobe");
    for (int i = 0; i < 4; i++) begin
      rd(8'(8 + i), d, p);
      if (hp_empty[i]) chk(d == 0 && p == 0, "empty pipe read");
      else chk(d == 32'hA000_0000 + i && p == 4'(1 << i), "pipe read pops");
    end
    rd(8'h0C, d, p); chk(d == 32'h4, "empty flags");
    for (int i = 0; i < N_OCC; i++) begin rd(8'(8'h20 + i), d, p); chk(d == 32'(100 + i), "occupancy"); end
    for (int i = 0; i < N_STAT; i++) begin rd(8'(8'h60 + i), d, p); chk(d == 32'(7000 + i), "statistics"); end
    @(negedge clk); addr = 8'h06; wdata = 1; we = 1; #1 chk(clr_sync, "clear sync strobe"); @(negedge clk); we = 0;
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
