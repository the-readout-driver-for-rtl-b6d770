// record_pipe: data pipe and control pipe pair for variable-length records.
//
// Zero suppression makes every fragment a different length, so each
// record travels as N words in the data pipe followed by one control word
// (holding N and the record's flags) in the control pipe. The writer puts
// the data words first and the control word last; a reader waits until
// the control pipe is not empty and then knows how many data words to
// take. Both halves are ordinary pipes with first-word fall-through.
// The pairing follows the description; depths and widths are parameters
// of this design.
module record_pipe #(
  parameter int unsigned DW     = 32,
  parameter int unsigned CW     = 32,
  parameter int unsigned DDEPTH = 512,
  parameter int unsigned CDEPTH = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // data half
  input  logic                        d_wr,
  input  logic [DW-1:0]               d_wdata,
  input  logic                        d_rd,
  output logic [DW-1:0]               d_rdata,
  output logic                        d_empty,
  output logic                        d_full,
  output logic [$clog2(DDEPTH+1)-1:0] d_count,
  // control half
  input  logic                        c_wr,
  input  logic [CW-1:0]               c_wdata,
  input  logic                        c_rd,
  output logic [CW-1:0]               c_rdata,
  output logic                        c_empty,
  output logic                        c_full,
  output logic [$clog2(CDEPTH+1)-1:0] c_count
);
  logic d_af, d_ae, c_af, c_ae;

  pipe #(.W(DW), .DEPTH(DDEPTH)) u_data (
    .clk, .rst_n, .wr(d_wr), .wdata(d_wdata), .rd(d_rd), .rdata(d_rdata),
    .empty(d_empty), .full(d_full), .almost_full(d_af), .almost_empty(d_ae), .count(d_count));

  pipe #(.W(CW), .DEPTH(CDEPTH)) u_ctrl (
    .clk, .rst_n, .wr(c_wr), .wdata(c_wdata), .rd(c_rd), .rdata(c_rdata),
    .empty(c_empty), .full(c_full), .almost_full(c_af), .almost_empty(c_ae), .count(c_count));
endmodule
