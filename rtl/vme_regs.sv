// vme_regs: register map seen by the host CPU over VME.
//
// A simple synchronous register bus (addr, we, re, wdata; rdata valid on
// the clock after re) stands for the VME slave in the main clock. Map
// (word addresses):
//   0x00 R SVCID            W any value: clear SVCID (interrupt handled)
//   0x01 W SVCACK           SVCID whose service is done
//   0x02 RW link enable mask
//   0x03 RW sampling prescale (0 = off)
//   0x04 RW run number
//   0x05 R  status {.., sync error, L1A queue overflow, RODBUSY}
//   0x06 W  bit 0: clear the sticky sync-error flag
//   0x07 RW bit 0: force RODBUSY
//   0x08 R  message pipe        (read pops one word; 0 when empty)
//   0x09 R  sampled-event pipe  (read pops)
//   0x0A R  hit pipe            (read pops)
//   0x0B R  tracklet pipe       (read pops)
//   0x0C R  empty flags of those four pipes, bit 0 = message pipe
//   0x20+i R occupancy of FIFO i, to one item (up to 64 FIFOs)
//   0x60+i R statistics counter i
// Readable occupancies and host-side pipe read ports follow the
// description; the address map and the bus are this design's choice.
module vme_regs #(
  parameter int unsigned N_OCC   = 24,
  parameter int unsigned N_STAT  = 8,
  parameter int unsigned N_LINKS = 13
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [7:0]         addr,
  input  logic               we,
  input  logic               re,
  input  logic [31:0]        wdata,
  output logic [31:0]        rdata,
  // SVC
  input  logic [7:0]         svcid,
  output logic               clr_svcid,
  output logic               svcack_wr,
  output logic [7:0]         svcack_id,
  // control
  output logic [N_LINKS-1:0] link_en,
  output logic [15:0]        prescale,
  output logic [31:0]        run_number,
  output logic               force_busy,
  output logic               clr_sync,
  input  logic [2:0]         status,
  // host pipes: 0 message, 1 sampled event, 2 hit, 3 tracklet
  input  logic [31:0]        hp_rdata [4],
  input  logic [3:0]         hp_empty,
  output logic [3:0]         hp_rd,
  // monitoring
  input  logic [15:0]        occ  [N_OCC],
  input  logic [31:0]        stat [N_STAT]
);
  localparam int unsigned SIW = (N_STAT > 1) ? $clog2(N_STAT) : 1;   // statistics index width
  localparam int unsigned OIW = (N_OCC > 1) ? $clog2(N_OCC) : 1;     // occupancy index width
  always_comb begin
    clr_svcid = we && addr == 8'h00;
    svcack_wr = we && addr == 8'h01;
    svcack_id = wdata[7:0];
    clr_sync  = we && addr == 8'h06 && wdata[0];
    hp_rd     = '0;
    for (int i = 0; i < 4; i++)
      if (re && addr == 8'(8 + i) && !hp_empty[i]) hp_rd[i] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      link_en    <= '1;
      prescale   <= '0;
      run_number <= '0;
      force_busy <= 1'b0;
      rdata      <= '0;
    end else begin
      if (we) begin
        unique case (addr)
          8'h02: link_en    <= wdata[N_LINKS-1:0];
          8'h03: prescale   <= wdata[15:0];
          8'h04: run_number <= wdata;
          8'h07: force_busy <= wdata[0];
          default: ;
        endcase
      end
      if (re) begin
        rdata <= '0;
        if (addr >= 8'h60 && int'(addr) < 'h60 + int'(N_STAT)) rdata <= stat[SIW'(addr - 8'h60)];
        else if (addr >= 8'h20 && int'(addr) < 'h20 + int'(N_OCC) && addr < 8'h60) rdata <= 32'(occ[OIW'(addr - 8'h20)]);
        else begin
          unique case (addr)
            8'h00: rdata <= 32'(svcid);
            8'h02: rdata <= 32'(link_en);
            8'h03: rdata <= 32'(prescale);
            8'h04: rdata <= run_number;
            8'h05: rdata <= 32'(status);
            8'h07: rdata <= 32'(force_busy);
            8'h08, 8'h09, 8'h0A, 8'h0B:
              rdata <= hp_empty[addr[1:0]] ? 32'd0 : hp_rdata[addr[1:0]];
            8'h0C: rdata <= 32'(hp_empty);
            default: rdata <= '0;
          endcase
        end
      end
    end
  end
endmodule
