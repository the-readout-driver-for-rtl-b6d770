// dispatcher: hands each link fragment of each event to a free fragment processor.
//
// The dispatcher takes the next expected event from the TTC queue and
// walks the links in ascending order, skipping those disabled in link_en
// (latched at the start of the event). For each enabled link it waits
// until an FP is free, the link is not still being read by another FP and
// the order pipe has room; then, in one clock, it sends {link, L1ID} over
// that FP's channel (fp_req is a one-clock strobe, the FP is idle and
// takes it at once), tells fp_pool about the allocation and writes an
// order entry {fragment, last, FP number} into the order pipe.
// The event-info word {L1ID, BCID} is written when the event is taken
// from the TTC queue, so the event builder can start on the first
// fragments while later links are still being dispatched (otherwise a
// large event could fill the FP output pipes before the builder starts).
// The entry of the highest enabled link carries last = 1; an event with no
// enabled link gets one entry {fragment = 0, last = 1}. The event builder
// reads both pipes, so fragments leave in dispatch order although the FPs
// finish in any order. A link is examined per clock.
// Dispatch on the fly over one channel per FP follows the description;
// the link order and the two bookkeeping pipes are this design's choice.
module dispatcher
  import rod_pkg::*;
#(
  parameter int unsigned N_FP    = 4,
  parameter int unsigned N_LINKS = 13
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N_LINKS-1:0]         link_en,
  // expected events from the TTC queue
  input  logic                       ev_empty,
  input  ttc_ev_t                    ev,
  output logic                       ev_rd,
  // free list
  input  logic                       free_valid,
  input  logic [(N_FP > 1 ? $clog2(N_FP) : 1)-1:0]    free_fp,
  input  logic [N_LINKS-1:0]         link_busy,
  output logic                       alloc,
  output logic [LINK_ID_W-1:0]       alloc_link,
  // channels to the FPs
  output logic [N_FP-1:0]            fp_req,
  output logic [LINK_ID_W-1:0]       fp_link,
  output logic [23:0]                fp_l1id,
  // order pipe (FP number per fragment) and event-info pipe
  input  logic                       ord_full,
  output logic                       ord_wr,
  output logic [(N_FP > 1 ? $clog2(N_FP) : 1)+1:0]    ord_wdata,   // {fragment, last, FP number}
  input  logic                       evi_full,
  output logic                       evi_wr,
  output ttc_ev_t                    evi_wdata,
  output logic                       active
);
  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_NONE} state_e;
  state_e               state;
  ttc_ev_t              cur;
  logic [N_LINKS-1:0]   en_l;
  logic [LINK_ID_W-1:0] link, last_link;
  logic                 send;

  assign alloc_link = link;
  assign fp_link    = link;
  assign fp_l1id    = cur.l1id;
  assign evi_wdata  = ev;
  assign active     = (state != S_IDLE);

  // highest enabled link of the event being started
  logic [LINK_ID_W-1:0] hi_en;
  always_comb begin
    hi_en = '0;
    for (int l = 0; l < int'(N_LINKS); l++) if (link_en[l]) hi_en = LINK_ID_W'(l);
  end

  always_comb begin
    send   = (state == S_SCAN) && en_l[link] && free_valid && !link_busy[link] && !ord_full;
    alloc  = send;
    fp_req = '0;
    if (send) fp_req[free_fp] = 1'b1;
    ord_wr    = send || (state == S_NONE && !ord_full);
    ord_wdata = {send, (state == S_NONE) || (link == last_link), free_fp};
    evi_wr    = (state == S_IDLE) && !ev_empty && !evi_full;
    ev_rd     = evi_wr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cur   <= '0;
      en_l  <= '0;
      link      <= '0;
      last_link <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (evi_wr) begin
          cur       <= ev;
          en_l      <= link_en;
          link      <= '0;
          last_link <= hi_en;
          state     <= (link_en == '0) ? S_NONE : S_SCAN;
        end
        S_SCAN: if (!en_l[link] || send) begin
          if (link == last_link) state <= S_IDLE;
          else link <= link + 1'b1;
        end
        S_NONE: if (ord_wr) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
