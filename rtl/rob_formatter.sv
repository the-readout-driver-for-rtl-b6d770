// rob_formatter: wraps each event record in the ATLAS ROD/ROB format.
//
// It waits for an event control word {L1ID, BCID, N, status}, then emits,
// one word per accepted clock (o_valid/o_ready handshake):
//   S-Link begin-of-fragment control word (o_ctrl = 1)
//   9 header words: start marker 0xEE1234EE, header size 9, format
//     version, source identifier, run number, extended L1ID, BCID,
//     trigger type, detector event type
//   1 status word (the event status)
//   N data words (o_payload = 1): fragment headers, hits and trigger words
//   3 trailer words: number of status words (1), number of data words
//     (N), status block position (0 = before the data)
//   S-Link end-of-fragment control word (o_ctrl = 1)
// An event therefore takes N + 15 words. o_sof marks the begin-of-
// fragment word, and o_len gives N throughout the event, so a tap can
// judge the size of an event from its first word. The description only asks for
// the ATLAS standard ROB format; the word layout used here is the
// common ATLAS ROD fragment layout, and the trigger and detector event
// type words are sent as zero.
module rob_formatter
  import rod_pkg::*;
#(
  parameter logic [31:0] SOURCE_ID = 32'h0067_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] run_number,
  // event record pipe
  input  ev_ctrl_t    c_rdata,
  input  logic        c_empty,
  output logic        c_rd,
  input  logic [31:0] d_rdata,
  input  logic        d_empty,
  output logic        d_rd,
  // formatted stream
  output logic        o_valid,
  output logic        o_ctrl,
  output logic        o_payload,
  output logic        o_sof,       // first word of an event (the BOF word)
  output logic [15:0] o_len,       // data words N of the event being sent
  output logic [31:0] o_data,
  input  logic        o_ready
);
  typedef enum logic [2:0] {S_IDLE, S_BOF, S_HDR, S_DATA, S_TRL, S_EOF} state_e;
  state_e      state;
  ev_ctrl_t    ev;
  logic [15:0] remain;
  logic [3:0]  idx;
  logic        fire;

  assign fire  = o_valid && o_ready;
  assign o_len = ev.count;

  always_comb begin
    o_valid   = 1'b0;
    o_ctrl    = 1'b0;
    o_payload = 1'b0;
    o_sof     = 1'b0;
    o_data    = '0;
    d_rd      = 1'b0;
    c_rd      = (state == S_IDLE) && !c_empty;
    unique case (state)
      S_BOF: begin
        o_valid = 1'b1; o_ctrl = 1'b1; o_sof = 1'b1; o_data = SLINK_BOF;
      end
      S_HDR: begin
        o_valid = 1'b1;
        unique case (idx)
          4'd0: o_data = ROD_START_MARK;
          4'd1: o_data = ROD_HDR_SIZE;
          4'd2: o_data = ROD_FMT_VER;
          4'd3: o_data = SOURCE_ID;
          4'd4: o_data = run_number;
          4'd5: o_data = 32'(ev.l1id);
          4'd6: o_data = 32'(ev.bcid);
          4'd7: o_data = 32'd0;                 // trigger type
          4'd8: o_data = 32'd0;                 // detector event type
          default: o_data = 32'(ev.status);     // status element
        endcase
      end
      S_DATA: begin
        o_valid   = !d_empty;
        o_payload = 1'b1;
        o_data    = d_rdata;
        d_rd      = o_valid && o_ready;
      end
      S_TRL: begin
        o_valid = 1'b1;
        unique case (idx)
          4'd0:    o_data = 32'd1;
          4'd1:    o_data = 32'(ev.count);
          default: o_data = 32'd0;
        endcase
      end
      S_EOF: begin
        o_valid = 1'b1; o_ctrl = 1'b1; o_data = SLINK_EOF;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      ev     <= '0;
      remain <= '0;
      idx    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (c_rd) begin
          ev     <= c_rdata;
          remain <= c_rdata.count;
          state  <= S_BOF;
        end
        S_BOF: if (fire) begin
          idx   <= '0;
          state <= S_HDR;
        end
        S_HDR: if (fire) begin
          if (idx == 4'd9) begin
            idx   <= '0;
            state <= (remain == 0) ? S_TRL : S_DATA;
          end else idx <= idx + 4'd1;
        end
        S_DATA: if (fire) begin
          remain <= remain - 16'd1;
          if (remain == 16'd1) state <= S_TRL;
        end
        S_TRL: if (fire) begin
          if (idx == 4'd2) state <= S_EOF;
          else idx <= idx + 4'd1;
        end
        S_EOF: if (fire) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
