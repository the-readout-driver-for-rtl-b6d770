// monitor_sampler: feeds the monitoring pipes read by the host over VME.
//
// It watches the formatted event stream on its way to the S-Link (it
// never stalls it) and samples one event in every `prescale` (0 turns
// sampling off). At the begin-of-fragment word of an event due for
// sampling it checks, from the event's data word count t_len given with
// that word, that the sampled-event pipe has room for the whole event
// (t_len + 13 words) and the hit and tracklet pipes for t_len words each
// (an event cannot hold more hits or tracklets than data words); if any
// has not, the sample is skipped and
// counted, so the host can never slow the readout. A sampled event is
// copied whole (header to trailer, without the two S-Link control words)
// into the sampled-event pipe; its hit words go also to the hit pipe and
// its tracklet words to the tracklet pipe. Writes happen on the clock the
// word is transferred downstream.
// Providing sampled events, hits and tracklets to the host is the
// description's; the prescale and skip rule are this design's choice.
module monitor_sampler
  import rod_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] prescale,
  // tap of the formatted stream (valid only when fire is high)
  input  logic        fire,
  input  logic        t_ctrl,
  input  logic        t_payload,
  input  logic        t_sof,
  input  logic [31:0] t_data,
  input  logic [15:0] t_len,      // data words of the event, with t_sof
  // free space in the three pipes
  input  logic [15:0] ev_free,
  input  logic [15:0] hit_free,
  input  logic [15:0] trk_free,
  output logic        ev_wr,
  output logic        hit_wr,
  output logic        trk_wr,
  output logic [31:0] wdata,
  output logic        sampling,
  output logic [31:0] n_sampled,
  output logic [31:0] n_skipped
);
  logic [15:0] evcnt;
  logic        due, room;

  assign due   = (prescale != 0) && (evcnt + 16'd1 >= prescale);
  assign room  = (32'(ev_free) >= 32'(t_len) + 32'd13) && (hit_free >= t_len) && (trk_free >= t_len);
  assign wdata = t_data;

  always_comb begin
    ev_wr  = fire && sampling && !t_ctrl;
    hit_wr = ev_wr && t_payload && (t_data[31:30] == W_HITMAP);
    trk_wr = ev_wr && t_payload && (t_data[31:30] == W_TRACKLET);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      evcnt     <= '0;
      sampling  <= 1'b0;
      n_sampled <= '0;
      n_skipped <= '0;
    end else if (fire && t_ctrl) begin
      if (t_sof) begin
        if (due) begin
          evcnt <= '0;
          if (room) begin
            sampling  <= 1'b1;
            n_sampled <= n_sampled + 32'd1;
          end else begin
            n_skipped <= n_skipped + 32'd1;
          end
        end else begin
          evcnt <= evcnt + 16'd1;
        end
      end else begin
        sampling <= 1'b0;                 // end-of-fragment word
      end
    end
  end
endmodule
