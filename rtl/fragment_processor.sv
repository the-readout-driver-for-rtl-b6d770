// fragment_processor: decodes one link fragment at a time.
//
// One thread of the fragment farm. When the dispatcher strobes req with a
// link number and the expected L1ID, the FP raises act (which routes that
// link's pipes to it through fp_link_mux) and then:
//   1. waits for the link's control word {flags, N};
//   2. reads the header word and compares its 12 L1ID bits with the
//      expected L1ID (mismatch: F_L1ID_MISS, a loss of synchronisation);
//   3. for each of the N-1 data words: a hit bitmap is expanded into one
//      hit word per set bit, lowest channel first, one hit per clock;
//      tracklet and trigger words are copied; a word of header type is
//      an error (F_BAD_WORD) and dropped;
//   4. if any flag is set, sends a message {code, link, flags, L1ID} and
//      waits for the message arbiter's grant;
//   5. writes its control word {flags, link, count} to its output record
//      pipe, pulses ack and drops act.
// Every pipe access waits while the pipe is empty or full, so the FP's
// latency varies with the content, as in the description of the farm.
// At most OUT_MAX words are written per fragment (the output pipe must
// hold a whole fragment before the event builder reads it); the rest is
// dropped and flagged F_TRUNC_OUT. Hit extraction from the bitmap, the
// check of the event ID and the per-FP output FIFO follow the
// description; word formats and the one-hit-per-clock expansion are this
// design's choice.
module fragment_processor
  import rod_pkg::*;
#(
  parameter int unsigned OUT_MAX = 511
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // dispatch channel and acknowledge
  input  logic                 req,
  input  logic [LINK_ID_W-1:0] req_link,
  input  logic [23:0]          req_l1id,
  output logic                 ack,
  output logic                 act,
  output logic [LINK_ID_W-1:0] sel,
  // link pipes (through the mux)
  input  link_ctrl_t           c_rdata,
  input  logic                 c_empty,
  output logic                 c_rd,
  input  logic [31:0]          d_rdata,
  input  logic                 d_empty,
  output logic                 d_rd,
  // output record pipe
  input  logic                 o_d_full,
  output logic                 o_d_wr,
  output logic [31:0]          o_d_wdata,
  input  logic                 o_c_full,
  output logic                 o_c_wr,
  output fp_ctrl_t             o_c_wdata,
  // message
  output logic                 msg_req,
  output msg_t                 msg,
  input  logic                 msg_gnt,
  // statistics
  output logic [31:0]          n_hits,
  output logic [31:0]          n_frags
);
  typedef enum logic [2:0] {S_IDLE, S_CTRL, S_HDR, S_DATA, S_EXPAND, S_MSG, S_DONE} state_e;
  state_e      state;
  logic [23:0] l1id;
  logic [15:0] remain, ocnt;
  logic [7:0]  flags;
  logic [15:0] bm;
  logic [13:0] addr;
  logic [3:0]  lowbit;
  fe_hdr_t     hdr;
  word_type_e  wt;
  logic        room;

  assign hdr  = fe_hdr_t'(d_rdata);
  assign wt   = word_type_e'(d_rdata[31:30]);
  assign room = (ocnt < 16'(OUT_MAX));

  always_comb begin
    lowbit = '0;
    for (int i = 15; i >= 0; i--) if (bm[i]) lowbit = 4'(i);
  end

  always_comb begin
    c_rd      = (state == S_CTRL) && !c_empty;
    d_rd      = 1'b0;
    o_d_wr    = 1'b0;
    o_d_wdata = d_rdata;
    case (state)
      S_HDR:  d_rd = !d_empty;
      S_DATA: if (remain != 0 && !d_empty) begin
        if (wt == W_TRACKLET || wt == W_TRIGGER) begin
          d_rd   = !o_d_full || !room;
          o_d_wr = !o_d_full && room;
        end else begin
          d_rd = 1'b1;                      // bitmap is loaded, header type dropped
        end
      end
      S_EXPAND: if (bm != 0) begin
        o_d_wr    = !o_d_full && room;
        o_d_wdata = hit_t'{wtype: W_HITMAP, link: sel, addr: addr, zero: '0, chan: lowbit};
      end
      default: ;
    endcase
    o_c_wr          = (state == S_DONE) && !o_c_full;
    o_c_wdata       = '0;
    o_c_wdata.flags = flags;
    o_c_wdata.link  = sel;
    o_c_wdata.count = ocnt;
    ack             = o_c_wr;
    act             = (state != S_IDLE);
    msg_req         = (state == S_MSG);
    msg.code        = MSG_FRAG_ERR;
    msg.data        = {sel, flags, l1id[11:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      l1id    <= '0;
      sel     <= '0;
      remain  <= '0;
      ocnt    <= '0;
      flags   <= '0;
      bm      <= '0;
      addr    <= '0;
      n_hits  <= '0;
      n_frags <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (req) begin
          sel   <= req_link;
          l1id  <= req_l1id;
          ocnt  <= '0;
          flags <= '0;
          state <= S_CTRL;
        end
        S_CTRL: if (!c_empty) begin
          flags  <= c_rdata.flags;
          remain <= c_rdata.count;
          if (c_rdata.count == 0) begin
            flags[F_NO_HDR] <= 1'b1;
            state <= S_MSG;
          end else begin
            state <= S_HDR;
          end
        end
        S_HDR: if (!d_empty) begin
          remain <= remain - 16'd1;
          if (hdr.mark != FE_HDR_MARK) flags[F_NO_HDR] <= 1'b1;
          if (hdr.l1id != l1id[11:0]) flags[F_L1ID_MISS] <= 1'b1;
          state <= S_DATA;
        end
        S_DATA: begin
          if (remain == 0) begin
            state <= (flags != 0) ? S_MSG : S_DONE;
          end else if (d_rd) begin
            remain <= remain - 16'd1;
            if (wt == W_TRACKLET || wt == W_TRIGGER) begin
              if (o_d_wr) ocnt <= ocnt + 16'd1;
              else flags[F_TRUNC_OUT] <= 1'b1;
            end else if (wt == W_HITMAP) begin
              bm   <= d_rdata[15:0];
              addr <= d_rdata[29:16];
              if (d_rdata[15:0] != 0) state <= S_EXPAND;
            end else begin
              flags[F_BAD_WORD] <= 1'b1;
            end
          end
        end
        S_EXPAND: begin
          if (bm == 0) begin
            state <= S_DATA;
          end else if (!room) begin
            flags[F_TRUNC_OUT] <= 1'b1;
            bm <= '0;
          end else if (o_d_wr) begin
            bm[lowbit] <= 1'b0;
            ocnt   <= ocnt + 16'd1;
            n_hits <= n_hits + 32'd1;
          end
        end
        S_MSG: if (msg_gnt) state <= S_DONE;
        S_DONE: if (o_c_wr) begin
          n_frags <= n_frags + 32'd1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_req_idle: assert property (@(posedge clk) disable iff (!rst_n) req |-> state == S_IDLE)
    else $error("fragment_processor: request while busy");
endmodule
