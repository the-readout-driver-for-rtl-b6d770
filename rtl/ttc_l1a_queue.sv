// ttc_l1a_queue: TTC decoding and the queue of expected events.
//
// In the TTC clock domain a bunch counter runs from 0 to BC_MAX and is
// cleared by BCR; an event counter is cleared by ECR, which also steps an
// 8-bit ECR count. On every L1A the pair {extended L1ID, BCID} of the
// accepted bunch crossing is pushed into a dual-clock pipe, where the
// main-clock dispatcher picks it up as the next event it must collect.
// The extended L1ID is {ECR count[7:0], L1A count[15:0]}; the first L1A
// after reset or after an ECR gets L1A count 0. rcount is the queue
// occupancy on the main-clock side, for RODBUSY and monitoring.
// Queueing the expected L1A IDs follows the description; the counter
// formats are this design's choice after common LHC practice.
module ttc_l1a_queue
  import rod_pkg::*;
#(
  parameter int unsigned AW     = 6,     // queue depth 2**AW events
  parameter int unsigned BC_MAX = 3563   // last bunch crossing of an orbit
) (
  input  logic        ttc_clk,
  input  logic        ttc_rst_n,
  input  logic        l1a,
  input  logic        bcr,
  input  logic        ecr,
  output logic        overflow,     // an L1A met a full queue (sticky)
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rd,
  output ttc_ev_t     ev,
  output logic        empty,
  output logic [AW:0] rcount
);
  logic [11:0] bcid;
  logic [15:0] evcnt;
  logic [7:0]  ecrcnt;
  logic        full;
  logic [AW:0] wcount;
  ttc_ev_t     wev;

  assign wev.l1id = {ecrcnt, evcnt};
  assign wev.bcid = bcid;

  always_ff @(posedge ttc_clk or negedge ttc_rst_n) begin
    if (!ttc_rst_n) begin
      bcid     <= '0;
      evcnt    <= '0;
      ecrcnt   <= '0;
      overflow <= 1'b0;
    end else begin
      bcid <= (bcr || bcid == 12'(BC_MAX)) ? '0 : bcid + 12'd1;
      if (ecr) begin
        evcnt  <= '0;
        ecrcnt <= ecrcnt + 8'd1;
      end else if (l1a) begin
        evcnt <= evcnt + 16'd1;
      end
      if (l1a && full) overflow <= 1'b1;
    end
  end

  logic [35:0] rraw;
  async_pipe #(.W(36), .AW(AW)) u_q (
    .wclk(ttc_clk), .wrst_n(ttc_rst_n), .wr(l1a && !ecr && !full), .wdata(wev),
    .full(full), .wcount(wcount),
    .rclk(clk), .rrst_n(rst_n), .rd(rd), .rdata(rraw),
    .empty(empty), .rcount(rcount));
  assign ev = ttc_ev_t'(rraw);
endmodule
