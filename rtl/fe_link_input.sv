// fe_link_input: receiver and input pipe pair of one front-end link.
//
// Runs in the link's own deserializer clock. It frames the incoming
// words into fragments (in_sof marks the header word, in_eof the last
// word), writes every accepted word into a dual-clock data pipe and, when
// the fragment ends, one control word {flags, N} into a dual-clock control
// pipe. The main-clock side therefore sees whole records only: a reader
// waits for a control word and then takes exactly N data words.
// Errors are detected and recovered here, not propagated as bad framing:
//   - link_err from the deserializer during a fragment sets F_LINK_ERR;
//   - a new header inside a fragment closes the old one with F_TRUNC_IN;
//   - a fragment longer than MAX_WORDS, or one that meets a full data
//     pipe, keeps what fit and is flagged F_TRUNC_IN;
//   - a header whose front-end error bits are set gets F_FE_ERR;
//   - data words outside any fragment are dropped (counted in orphan_cnt);
//   - a fragment that starts while the control pipe is full is dropped
//     whole (counted in lost_cnt); RODBUSY is meant to prevent this.
//   The two counters are kept in the link clock and handed to the main
//   clock in Gray code, so orphan_cnt and lost_cnt belong to clk and lag
//   the events by a few clocks.
// Latency: a word is written the clock after it arrives; the control word
// is written on the clock of the eof word. Collecting fragments, detecting
// link and data errors and crossing the clock domain through FIFOs follow
// the description; the word framing and flag set are this design's own.
module fe_link_input
  import rod_pkg::*;
#(
  parameter int unsigned DEPTH_LOG2 = 9,    // data pipe depth 2**DEPTH_LOG2
  parameter int unsigned CTRL_LOG2  = 7,    // control pipe depth: more fragments than the L1A queue holds
  parameter int unsigned MAX_WORDS  = 255   // longest fragment kept, header included
) (
  // link clock domain
  input  logic                link_clk,
  input  logic                link_rst_n,
  input  logic                in_valid,
  input  logic                in_sof,
  input  logic                in_eof,
  input  logic [31:0]         in_data,
  input  logic                link_err,
  // main clock domain
  input  logic                clk,
  input  logic                rst_n,
  input  logic                c_rd,
  output link_ctrl_t          c_rdata,
  output logic                c_empty,
  input  logic                d_rd,
  output logic [31:0]         d_rdata,
  output logic                d_empty,
  output logic [DEPTH_LOG2:0] d_count,
  output logic [CTRL_LOG2:0]  c_count,     // control pipe occupancy (records)
  output logic [15:0]         orphan_cnt,  // error counters, taken over into clk
  output logic [15:0]         lost_cnt
);
  logic        in_frag, skipping;
  logic [15:0] orphan_b, lost_b;           // link clock, binary
  logic [15:0] orphan_g, lost_g;           // link clock, Gray copies
  logic [15:0] orphan_s1, orphan_s2, lost_s1, lost_s2;   // main clock
  logic [15:0] cnt;
  logic [7:0]  flags;

  logic        d_wr, d_full, c_wr, c_full;
  link_ctrl_t  c_wdata;
  logic [DEPTH_LOG2:0] d_wcount;
  logic [CTRL_LOG2:0]  c_wcount, c_rcount;
  fe_hdr_t     hdr;

  assign hdr = fe_hdr_t'(in_data);

  // next-state values for the word arriving now
  logic        start, cont, close_old;
  logic [7:0]  new_flags;
  logic [15:0] new_cnt;

  always_comb begin
    start     = in_valid && in_sof;
    cont      = in_valid && !in_sof && in_frag;
    close_old = start && in_frag;          // header inside a fragment
    d_wr      = 1'b0;
    new_flags = flags;
    new_cnt   = cnt;
    if (start) begin
      new_flags = '0;
      new_flags[F_LINK_ERR] = link_err;
      new_flags[F_FE_ERR]   = (hdr.fe_err != '0);
      new_flags[F_NO_HDR]   = (hdr.mark != FE_HDR_MARK);
      new_cnt   = '0;
      if (!c_full && !d_full) begin
        d_wr    = 1'b1;
        new_cnt = 16'd1;
      end else if (!c_full) begin
        new_flags[F_TRUNC_IN] = 1'b1;      // header lost, record kept empty
      end
    end else if (cont) begin
      if (link_err) new_flags[F_LINK_ERR] = 1'b1;
      if (!d_full && cnt < 16'(MAX_WORDS)) begin
        d_wr    = 1'b1;
        new_cnt = cnt + 16'd1;
      end else begin
        new_flags[F_TRUNC_IN] = 1'b1;
      end
    end
  end

  // Control word. Closing an old fragment takes priority; a one-word
  // fragment (sof and eof together) that arrives on that same clock is
  // left open and is closed, flagged F_TRUNC_IN, by the next header.
  always_comb begin
    c_wr    = 1'b0;
    c_wdata = '0;
    if (close_old) begin
      c_wr          = 1'b1;
      c_wdata.count = cnt;
      c_wdata.flags = flags | 8'(1 << F_TRUNC_IN);
    end else if (in_valid && in_eof && (cont || (start && !c_full))) begin
      c_wr          = 1'b1;
      c_wdata.count = new_cnt;
      c_wdata.flags = new_flags;
    end
  end

  always_ff @(posedge link_clk or negedge link_rst_n) begin
    if (!link_rst_n) begin
      in_frag    <= 1'b0;
      skipping   <= 1'b0;
      cnt        <= '0;
      flags      <= '0;
      orphan_b   <= '0;
      lost_b     <= '0;
    end else if (in_valid) begin
      if (start) begin
        if (c_full) begin
          // no room for the record: drop the whole fragment
          in_frag  <= 1'b0;
          skipping <= !in_eof;
          lost_b   <= lost_b + 16'd1;
        end else begin
          // a one-word fragment closed together with an old one stays open
          in_frag  <= !in_eof || close_old;
          skipping <= 1'b0;
          cnt      <= new_cnt;
          flags    <= new_flags;
        end
      end else if (in_frag) begin
        in_frag <= !in_eof;
        cnt     <= new_cnt;
        flags   <= new_flags;
      end else if (skipping) begin
        skipping <= !in_eof;
      end else begin
        orphan_b <= orphan_b + 16'd1;
      end
    end
  end

  // The error counters cross to the main clock in Gray code: each
  // registered Gray copy changes in one bit per count, so the two-flop
  // synchronisers always deliver a count that is either old or new.
  always_ff @(posedge link_clk or negedge link_rst_n) begin
    if (!link_rst_n) begin
      orphan_g <= '0;
      lost_g   <= '0;
    end else begin
      orphan_g <= orphan_b ^ (orphan_b >> 1);
      lost_g   <= lost_b ^ (lost_b >> 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      orphan_s1 <= '0; orphan_s2 <= '0;
      lost_s1   <= '0; lost_s2   <= '0;
    end else begin
      orphan_s1 <= orphan_g; orphan_s2 <= orphan_s1;
      lost_s1   <= lost_g;   lost_s2   <= lost_s1;
    end
  end

  always_comb begin
    for (int k = 0; k < 16; k++) begin    // Gray to binary
      orphan_cnt[k] = ^(orphan_s2 >> k);
      lost_cnt[k]   = ^(lost_s2 >> k);
    end
  end

  async_pipe #(.W(32), .AW(DEPTH_LOG2)) u_data (
    .wclk(link_clk), .wrst_n(link_rst_n), .wr(d_wr), .wdata(in_data),
    .full(d_full), .wcount(d_wcount),
    .rclk(clk), .rrst_n(rst_n), .rd(d_rd), .rdata(d_rdata),
    .empty(d_empty), .rcount(d_count));

  logic [31:0] c_rraw;
  async_pipe #(.W(32), .AW(CTRL_LOG2)) u_ctrl (
    .wclk(link_clk), .wrst_n(link_rst_n), .wr(c_wr), .wdata(c_wdata),
    .full(c_full), .wcount(c_wcount),
    .rclk(clk), .rrst_n(rst_n), .rd(c_rd), .rdata(c_rraw),
    .empty(c_empty), .rcount(c_rcount));
  assign c_count = c_rcount;
  assign c_rdata = link_ctrl_t'(c_rraw);
endmodule
