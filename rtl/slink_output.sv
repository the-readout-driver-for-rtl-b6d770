// slink_output: S-Link transmit side towards the readout buffer (ROB).
//
// Formatted words enter in the main clock through a dual-clock pipe and
// leave in the S-Link clock (at most 32 MHz) on the link source card
// interface: UD carries the word, UCTRL_N is low for a control word
// (begin/end of fragment) and UWEN_N is low on every clock a word is
// written. The ROB throttles the link with LFF_N (low = link full) and
// LDOWN_N (low = link down); no word is written while either is low, and
// the word then waits in the pipe. Data appear on the clock after they
// are popped, so a word is popped only when LFF_N was high in the cycle
// before; the link card tolerates a few words after LFF_N falls.
// Sending to the ROB and obeying its flow control follow the description;
// the signal names follow the S-Link convention.
module slink_output #(
  parameter int unsigned AW = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_ctrl,
  input  logic [31:0] in_data,
  output logic        in_ready,
  output logic [AW:0] count,       // occupancy seen from the main clock
  input  logic        slink_clk,
  input  logic        slink_rst_n,
  output logic [31:0] ud,
  output logic        uctrl_n,
  output logic        uwen_n,
  input  logic        lff_n,
  input  logic        ldown_n
);
  logic        full, empty, rd;
  logic [32:0] rdata;
  logic [AW:0] rcount;

  assign in_ready = !full;
  assign rd       = !empty && lff_n && ldown_n;

  async_pipe #(.W(33), .AW(AW)) u_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr(in_valid && !full), .wdata({in_ctrl, in_data}),
    .full(full), .wcount(count),
    .rclk(slink_clk), .rrst_n(slink_rst_n), .rd(rd), .rdata(rdata),
    .empty(empty), .rcount(rcount));

  always_ff @(posedge slink_clk or negedge slink_rst_n) begin
    if (!slink_rst_n) begin
      ud      <= '0;
      uctrl_n <= 1'b1;
      uwen_n  <= 1'b1;
    end else begin
      uwen_n  <= !rd;
      uctrl_n <= !(rd && rdata[32]);
      if (rd) ud <= rdata[31:0];
    end
  end
endmodule
