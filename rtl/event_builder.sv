// event_builder: collects the fragments of each event into one event record.
//
// For every event the dispatcher writes {L1ID, BCID} into the event-info
// pipe and one entry {fragment, last, FP number} per fragment into the
// order pipe (an event with no enabled link has a single entry with
// fragment = 0). The builder takes an event, then for each entry reads
// the FP number, waits for that FP's output control word {flags, link, N},
// writes a fragment header word {W_HEADER, link, flags, N} and copies the N
// data words into the event data pipe. When all fragments are in it writes
// the event control word {L1ID, BCID, word count, status} where status is
// the OR of all fragment flags. Reading in dispatch order keeps events and
// fragments in order however the FPs interleave.
// An event may hold at most EV_MAX words, the capacity of the event data
// pipe, so that the formatter can wait for a complete record. A fragment
// that would not fit is read and discarded, F_DROPPED is set in the event
// status and a message is sent. One word moves per clock.
// Collecting the fragments of each L1A is the description's; the order
// pipes, the limit and the drop policy are this design's choice.
module event_builder
  import rod_pkg::*;
#(
  parameter int unsigned N_FP   = 4,
  parameter int unsigned EV_MAX = 1023
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // event info and order pipes from the dispatcher
  input  logic                     evi_empty,
  input  ttc_ev_t                  evi_rdata,
  output logic                     evi_rd,
  input  logic                     ord_empty,
  input  logic [(N_FP > 1 ? $clog2(N_FP) : 1)+1:0]  ord_rdata,   // {fragment, last, FP number}
  output logic                     ord_rd,
  // FP output record pipes
  input  fp_ctrl_t                 fp_c_rdata [N_FP],
  input  logic [N_FP-1:0]          fp_c_empty,
  output logic [N_FP-1:0]          fp_c_rd,
  input  logic [31:0]              fp_d_rdata [N_FP],
  input  logic [N_FP-1:0]          fp_d_empty,
  output logic [N_FP-1:0]          fp_d_rd,
  // event record pipe
  input  logic                     ev_d_full,
  output logic                     ev_d_wr,
  output logic [31:0]              ev_d_wdata,
  input  logic                     ev_c_full,
  output logic                     ev_c_wr,
  output ev_ctrl_t                 ev_c_wdata,
  // message
  output logic                     msg_req,
  output msg_t                     msg,
  input  logic                     msg_gnt,
  output logic [31:0]              n_events,
  output logic [31:0]              n_dropped
);
  localparam int unsigned FW = (N_FP > 1) ? $clog2(N_FP) : 1;
  typedef enum logic [2:0] {S_IDLE, S_NEXT, S_CTRL, S_FHDR, S_MSG, S_COPY, S_CLOSE} state_e;
  state_e      state;
  ttc_ev_t     ev;
  logic [15:0] wcnt, remain;
  logic        last;
  logic [7:0]  status;
  logic [FW-1:0] fp;
  fp_ctrl_t    ctl;
  logic        drop;
  logic        fits;

  assign fits = (32'(wcnt) + 32'(fp_c_rdata[fp].count) + 32'd1) <= 32'(EV_MAX);

  always_comb begin
    evi_rd  = (state == S_IDLE) && !evi_empty;
    ord_rd  = (state == S_NEXT) && !ord_empty;
    fp_c_rd = '0;
    fp_d_rd = '0;
    if (state == S_CTRL && !fp_c_empty[fp]) fp_c_rd[fp] = 1'b1;
    ev_d_wr    = 1'b0;
    ev_d_wdata = fp_d_rdata[fp];
    if (state == S_FHDR) begin
      ev_d_wr    = !ev_d_full;
      ev_d_wdata = frag_hdr_t'{wtype: W_HEADER, link: ctl.link, flags: 10'(ctl.flags), count: ctl.count};
    end
    if (state == S_COPY && remain != 0 && !fp_d_empty[fp] && (drop || !ev_d_full)) begin
      fp_d_rd[fp] = 1'b1;
      ev_d_wr     = !drop;
    end
    ev_c_wr           = (state == S_CLOSE) && !ev_c_full;
    ev_c_wdata.l1id   = ev.l1id;
    ev_c_wdata.bcid   = ev.bcid;
    ev_c_wdata.count  = wcnt;
    ev_c_wdata.status = 16'(status);
    msg_req  = (state == S_MSG);
    msg.code = MSG_EV_DROP;
    msg.data = {ctl.link, ctl.count[7:0], ev.l1id[11:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      ev        <= '0;
      last      <= 1'b0;
      wcnt      <= '0;
      remain    <= '0;
      status    <= '0;
      fp        <= '0;
      ctl       <= '0;
      drop      <= 1'b0;
      n_events  <= '0;
      n_dropped <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (evi_rd) begin
          ev     <= evi_rdata;
          wcnt   <= '0;
          status <= '0;
          state  <= S_NEXT;
        end
        S_NEXT: if (ord_rd) begin
          fp    <= ord_rdata[FW-1:0];
          last  <= ord_rdata[FW];
          state <= ord_rdata[FW+1] ? S_CTRL : S_CLOSE;
        end
        S_CTRL: if (fp_c_rd[fp]) begin
          ctl    <= fp_c_rdata[fp];
          remain <= fp_c_rdata[fp].count;
          drop   <= !fits;
          if (fits) begin
            status <= status | fp_c_rdata[fp].flags;
            state  <= S_FHDR;
          end else begin
            status[F_DROPPED] <= 1'b1;
            n_dropped <= n_dropped + 32'd1;
            state  <= S_MSG;
          end
        end
        S_FHDR: if (ev_d_wr) begin
          wcnt  <= wcnt + 16'd1;
          state <= S_COPY;
        end
        S_MSG: if (msg_gnt) state <= S_COPY;
        S_COPY: begin
          if (remain == 0) begin
            state <= last ? S_CLOSE : S_NEXT;
          end else if (fp_d_rd[fp]) begin
            remain <= remain - 16'd1;
            if (!drop) wcnt <= wcnt + 16'd1;
          end
        end
        S_CLOSE: if (ev_c_wr) begin
          n_events <= n_events + 32'd1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
