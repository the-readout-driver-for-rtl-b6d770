// msg_arbiter: serialises messages from several threads into the message pipe.
//
// Any thread may post a message word {exception code, three data bytes}
// by holding req high with its word on msg. The arbiter grants one
// requester per clock in round-robin order, starting after the last
// winner, and only while the message pipe is not full; the granted word
// is written on the same clock and the thread sees gnt for that one clock
// and drops req. Counting and logging each exception is left to the host,
// which reads the pipe. The message pipe and the need to serialise writes from
// different threads follow the description; round-robin is this design's
// choice.
module msg_arbiter
  import rod_pkg::*;
#(
  parameter int unsigned N_SRC = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_SRC-1:0] req,
  input  msg_t             msg [N_SRC],
  output logic [N_SRC-1:0] gnt,
  input  logic             full,
  output logic             wr,
  output msg_t             wdata
);
  localparam int unsigned SW = (N_SRC > 1) ? $clog2(N_SRC) : 1;
  logic [SW-1:0] last;
  logic [SW-1:0] win;
  logic          any;

  always_comb begin
    any = 1'b0;
    win = last;
    for (int k = 1; k <= int'(N_SRC); k++) begin
      int idx;
      idx = (int'(last) + k) % int'(N_SRC);
      if (!any && req[idx]) begin
        any = 1'b1;
        win = SW'(idx);
      end
    end
    gnt = '0;
    if (any && !full) gnt[win] = 1'b1;
    wr    = any && !full;
    wdata = msg[win];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= SW'(N_SRC - 1);
    else if (wr) last <= win;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt))
    else $error("msg_arbiter: more than one grant");
endmodule
