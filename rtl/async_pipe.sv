// async_pipe: dual-clock FIFO between two clock domains of the ROD.
//
// The ROD has one clock per front-end link (deserializer clock, 40 MHz),
// a TTC clock, the main design clock and the S-Link clock, and all
// crossings go through FIFOs embedded in the FPGA. This one keeps binary
// read and write pointers in their own domains, passes them across in
// Gray code through two-flop synchronisers and compares them there.
// full is seen by the writer and empty by the reader; each side also gets
// the occupancy as it sees it (wcount, rcount), which lags the other side
// by the synchroniser delay and is therefore conservative. rdata is
// first-word fall-through. The need for the crossing is from the
// description; the Gray-pointer construction is this design's choice.
module async_pipe #(
  parameter int unsigned W  = 32,
  parameter int unsigned AW = 9      // depth = 2**AW
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wr,
  input  logic [W-1:0]  wdata,
  output logic          full,
  output logic [AW:0]   wcount,
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rd,
  output logic [W-1:0]  rdata,
  output logic          empty,
  output logic [AW:0]   rcount
);
  logic [W-1:0] mem [2**AW];
  logic [AW:0]  wbin, rbin, wgray, rgray;
  logic [AW:0]  rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0]  rbin_w, wbin_r;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write domain
  always_ff @(posedge wclk) begin
    if (wr && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  assign rbin_w = gray2bin(rgray_w2);
  assign wcount = wbin - rbin_w;
  assign full   = (wcount == (AW+1)'(2**AW));

  // read domain
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  assign wbin_r = gray2bin(wgray_r2);
  assign rcount = wbin_r - rbin;
  assign empty  = (rcount == '0);
  assign rdata  = mem[rbin[AW-1:0]];

  a_no_overflow:  assert property (@(posedge wclk) disable iff (!wrst_n) !(wr && full))
    else $error("async_pipe: write while full");
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) !(rd && empty))
    else $error("async_pipe: read while empty");
endmodule
