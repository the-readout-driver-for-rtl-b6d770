// fp_pool: bookkeeping of free fragment processors and busy links.
//
// This is the thread that receives the completion acknowledges of the
// fragment processors (FPs) and keeps the list of free ones. free_fp is
// the lowest-numbered free FP, valid while free_valid is high. alloc
// marks free_fp busy on this clock and remembers which link it serves;
// that link is then marked busy until the FP acknowledges, so that no
// two FPs ever read the same link pipe. An acknowledge frees its FP and
// link on the next clock; an FP can be acknowledged and reallocated on
// the same clock only through separate cycles (the FP raises ack once).
// The free list follows the description; the link-busy mask is this
// design's addition, needed because every link pipe has a single reader.
module fp_pool
  import rod_pkg::*;
#(
  parameter int unsigned N_FP    = 4,
  parameter int unsigned N_LINKS = 13
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     alloc,
  input  logic [LINK_ID_W-1:0]     alloc_link,
  input  logic [N_FP-1:0]          ack,
  output logic                     free_valid,
  output logic [(N_FP > 1 ? $clog2(N_FP) : 1)-1:0]  free_fp,
  output logic [N_FP-1:0]          fp_busy,
  output logic [N_LINKS-1:0]       link_busy
);
  localparam int unsigned FW = (N_FP > 1) ? $clog2(N_FP) : 1;
  logic [LINK_ID_W-1:0] fp_link [N_FP];

  always_comb begin
    free_valid = 1'b0;
    free_fp    = '0;
    for (int i = int'(N_FP) - 1; i >= 0; i--) begin
      if (!fp_busy[i]) begin
        free_valid = 1'b1;
        free_fp    = FW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fp_busy   <= '0;
      link_busy <= '0;
      for (int i = 0; i < int'(N_FP); i++) fp_link[i] <= '0;
    end else begin
      for (int i = 0; i < int'(N_FP); i++) begin
        if (ack[i] && fp_busy[i]) begin
          fp_busy[i]            <= 1'b0;
          link_busy[fp_link[i]] <= 1'b0;
        end
      end
      if (alloc && free_valid) begin
        fp_busy[free_fp]     <= 1'b1;
        fp_link[free_fp]     <= alloc_link;
        link_busy[alloc_link] <= 1'b1;
      end
    end
  end

  a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n) alloc |-> free_valid)
    else $error("fp_pool: allocation with no free FP");
  a_link_free:  assert property (@(posedge clk) disable iff (!rst_n) alloc |-> !link_busy[alloc_link])
    else $error("fp_pool: link allocated twice");
endmodule
