// svc_controller: service calls (SVCs) from the hardware to the host CPU.
//
// Each condition cond[i] that needs the host (a monitoring pipe to be
// emptied, a FIFO almost full, a loss of event synchronisation) is a
// service call type with SVCID i+1. A polling loop scans the conditions
// round robin: when the SVCID register is empty (0) it posts, in one
// clock, the first type at or after the poll position whose condition is
// true and which has no call outstanding, marks it outstanding, raises
// irq and moves the poll position past it. So every pending type is
// posted before any type is posted a second time, whatever the timing of
// the host's handler (a loop visiting one condition per clock can lock
// step with a handler whose length is a multiple of N_SVC clocks and
// starve the other types). Posting
// through the single register serialises the calls. The host's interrupt
// handler reads the SVCID and clears the register (clr_svcid), which drops
// irq and lets the loop post the next call; when the host process has
// done its service it writes the SVCID to the SVCACK register (ack_wr),
// after which that type can be posted again. Any number of calls can be
// outstanding, but only one of each type. This protocol follows the
// description; SVCID numbering from 1 with 0 meaning "empty" is this
// design's choice.
module svc_controller #(
  parameter int unsigned N_SVC = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_SVC-1:0] cond,
  output logic [7:0]       svcid,
  output logic             irq,
  output logic [N_SVC-1:0] outstanding,
  input  logic             clr_svcid,
  input  logic             ack_wr,
  input  logic [7:0]       ack_id
);
  localparam int unsigned PW = (N_SVC > 1) ? $clog2(N_SVC) : 1;
  logic [PW-1:0] poll, pick;
  logic          found;

  // first eligible type at or after poll, wrapping round
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 0; k < int'(N_SVC); k++) begin
      int unsigned t;
      t = (int'(poll) + k) % N_SVC;
      if (!found && cond[t] && !outstanding[t]) begin
        found = 1'b1;
        pick  = PW'(t);
      end
    end
  end

  assign irq = (svcid != 8'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      poll        <= '0;
      svcid       <= '0;
      outstanding <= '0;
    end else begin
      if (clr_svcid) begin
        svcid <= '0;
      end else if (svcid == 8'd0 && found) begin
        svcid             <= 8'(pick) + 8'd1;
        outstanding[pick] <= 1'b1;
        poll              <= (pick == PW'(N_SVC - 1)) ? '0 : pick + 1'b1;
      end
      if (ack_wr && ack_id != 8'd0 && ack_id <= 8'(N_SVC))
        outstanding[PW'(ack_id - 8'd1)] <= 1'b0;
    end
  end

  a_one_per_type: assert property (@(posedge clk) disable iff (!rst_n)
    (svcid != 0 && $changed(svcid)) |-> $past(!outstanding[PW'(svcid - 8'd1)]))
    else $error("svc_controller: SVC type posted twice");
endmodule
