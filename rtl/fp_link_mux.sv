// fp_link_mux: crossbar from the link input pipes to the fragment processors.
//
// Each fragment processor (FP) names the link it reads (fp_sel) and
// whether it is reading at all (fp_act). The mux gives every FP the
// control and data heads of its link, and routes the FP's read strobes
// back to that link only. The dispatcher never gives one link to two FPs
// at once, so each link has at most one reader; an assertion checks it.
// Purely combinational. Farming n < 13 FPs over 13 links, and the need
// for this input multiplexing, follow the description.
module fp_link_mux
  import rod_pkg::*;
#(
  parameter int unsigned N_FP    = 4,
  parameter int unsigned N_LINKS = 13
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // FP side
  input  logic [LINK_ID_W-1:0] fp_sel [N_FP],
  input  logic [N_FP-1:0]      fp_act,
  input  logic [N_FP-1:0]      fp_c_rd,
  input  logic [N_FP-1:0]      fp_d_rd,
  output link_ctrl_t           fp_c_rdata [N_FP],
  output logic [N_FP-1:0]      fp_c_empty,
  output logic [31:0]          fp_d_rdata [N_FP],
  output logic [N_FP-1:0]      fp_d_empty,
  // link side
  input  link_ctrl_t           l_c_rdata [N_LINKS],
  input  logic [N_LINKS-1:0]   l_c_empty,
  input  logic [31:0]          l_d_rdata [N_LINKS],
  input  logic [N_LINKS-1:0]   l_d_empty,
  output logic [N_LINKS-1:0]   l_c_rd,
  output logic [N_LINKS-1:0]   l_d_rd
);
  logic [N_LINKS-1:0] readers [N_FP];
  localparam int unsigned SW = (N_LINKS > 1) ? $clog2(N_LINKS) : 1;
  logic [SW-1:0] sel [N_FP];   // fp_sel cut to the width of a link index

  for (genvar f = 0; f < int'(N_FP); f++) begin : g_sel
    assign sel[f] = SW'(fp_sel[f]);
  end

  always_comb begin
    l_c_rd = '0;
    l_d_rd = '0;
    for (int f = 0; f < int'(N_FP); f++) begin
      readers[f] = '0;
      if (int'(fp_sel[f]) < int'(N_LINKS)) begin
        fp_c_rdata[f] = l_c_rdata[sel[f]];
        fp_c_empty[f] = l_c_empty[sel[f]] || !fp_act[f];
        fp_d_rdata[f] = l_d_rdata[sel[f]];
        fp_d_empty[f] = l_d_empty[sel[f]] || !fp_act[f];
        if (fp_act[f]) readers[f][sel[f]] = 1'b1;
      end else begin
        fp_c_rdata[f] = '0;
        fp_c_empty[f] = 1'b1;
        fp_d_rdata[f] = '0;
        fp_d_empty[f] = 1'b1;
      end
      if (fp_act[f] && int'(fp_sel[f]) < int'(N_LINKS)) begin
        l_c_rd[sel[f]] = l_c_rd[sel[f]] | fp_c_rd[f];
        l_d_rd[sel[f]] = l_d_rd[sel[f]] | fp_d_rd[f];
      end
    end
  end

  // at most one active FP per link
  for (genvar l = 0; l < int'(N_LINKS); l++) begin : g_chk
    logic [N_FP-1:0] who;
    for (genvar f = 0; f < int'(N_FP); f++) begin : g_f
      assign who[f] = readers[f][l];
    end
    a_one_reader: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(who))
      else $error("fp_link_mux: link %0d read by two FPs", l);
  end
endmodule
