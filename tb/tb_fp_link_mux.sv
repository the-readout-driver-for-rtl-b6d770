// tb_fp_link_mux: random FP selections with distinct links; checks every
// FP sees its link's heads, idle FPs see empty pipes, and read strobes
// reach only the selected link.
module tb_fp_link_mux;
  import rod_pkg::*;
  localparam int N_FP = 4, N_LINKS = 13;
  logic clk = 0, rst_n = 0;
  logic [3:0] fp_sel [N_FP];
  logic [N_FP-1:0] fp_act, fp_c_rd, fp_d_rd, fp_c_empty, fp_d_empty;
  link_ctrl_t fp_c_rdata [N_FP];
  logic [31:0] fp_d_rdata [N_FP];
  link_ctrl_t l_c_rdata [N_LINKS];
  logic [N_LINKS-1:0] l_c_empty, l_d_empty, l_c_rd, l_d_rd;
  logic [31:0] l_d_rdata [N_LINKS];
  int checks = 0, failures = 0;

  fp_link_mux #(.N_FP(N_FP), .N_LINKS(N_LINKS)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    logic [N_LINKS-1:0] exp_c, exp_d;
    #20 rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      int perm [N_LINKS];
      @(negedge clk);
      for (int l = 0; l < N_LINKS; l++) begin
        perm[l] = l;
        l_c_rdata[l] = link_ctrl_t'($urandom);
        l_d_rdata[l] = $urandom;
      end
      l_c_empty = 13'($urandom); l_d_empty = 13'($urandom);
      perm.shuffle();
      for (int f = 0; f < N_FP; f++) fp_sel[f] = 4'(perm[f]);
      fp_act = 4'($urandom); fp_c_rd = 4'($urandom); fp_d_rd = 4'($urandom);
      #1;
      exp_c = '0; exp_d = '0;
      for (int f = 0; f < N_FP; f++) begin
        if (fp_act[f]) begin
          chk(fp_c_rdata[f] == l_c_rdata[fp_sel[f]], "ctrl head");
          chk(fp_d_rdata[f] == l_d_rdata[fp_sel[f]], "data head");
          chk(fp_c_empty[f] == l_c_empty[fp_sel[f]], "ctrl empty");
          chk(fp_d_empty[f] == l_d_empty[fp_sel[f]], "data empty");
          exp_c[fp_sel[f]] = fp_c_rd[f];
          exp_d[fp_sel[f]] = fp_d_rd[f];
        end else begin
          chk(fp_c_empty[f] && fp_d_empty[f], "idle FP sees empty");
        end
      end
      chk(l_c_rd == exp_c, "ctrl read routing");
      chk(l_d_rd == exp_d, "data read routing");
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
