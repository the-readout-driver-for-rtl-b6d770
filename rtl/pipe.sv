// pipe: synchronous FIFO used for the thread-to-thread pipes of the ROD.
//
// A pipe is read and written on every clock if needed. It has a
// first-word fall-through output: rdata shows the oldest word whenever
// empty is low, and rd removes it. A writer stalls while full is high, a
// reader while empty is high, so a blocked access simply waits. A write
// that fills the pipe still completes on that clock, and full rises after it.
// count gives the occupancy to one item (used for VME monitoring and for
// RODBUSY); almost_full and almost_empty serve the service-call logic.
// The behaviour follows the description of the pipe object; the storage
// is a plain memory array (block RAM when synthesised), and the almost
// thresholds are parameters of this design. Writing while full and
// reading while empty are ignored and flagged by assertions.
module pipe #(
  parameter int unsigned W        = 32,
  parameter int unsigned DEPTH    = 512,
  parameter int unsigned AF_LEVEL = DEPTH - DEPTH/8,
  parameter int unsigned AE_LEVEL = 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr,
  input  logic [W-1:0]               wdata,
  input  logic                       rd,
  output logic [W-1:0]               rdata,
  output logic                       empty,
  output logic                       full,
  output logic                       almost_full,
  output logic                       almost_empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  assign rdata        = mem[rptr];
  assign empty        = (count == '0);
  assign full         = (count == CW'(DEPTH));
  assign almost_full  = (count >= CW'(AF_LEVEL));
  assign almost_empty = (count <= CW'(AE_LEVEL));

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr && full))
    else $error("pipe: write while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd && empty))
    else $error("pipe: read while empty");
endmodule
