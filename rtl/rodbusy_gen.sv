// rodbusy_gen: RODBUSY towards the central trigger processor.
//
// RODBUSY stops new level-1 accepts, so it should be raised only when
// buffers are really at risk. Each monitored FIFO level has a high and a
// low watermark: busy is set on the clock after any level reaches its
// high mark and cleared only once every level is back at or below its low
// mark. The hysteresis keeps busy from toggling on every word and so keeps
// it as rare and as long-lived as the buffers allow. force_busy (a
// control register bit) raises busy directly. The module also counts
// busy assertions and busy clocks for monitoring. Raising RODBUSY only
// when necessary follows the description; the watermark scheme is this
// design's choice.
module rodbusy_gen #(
  parameter int unsigned N_MON = 15
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] level [N_MON],
  input  logic [15:0] hi    [N_MON],
  input  logic [15:0] lo    [N_MON],
  input  logic        force_busy,
  output logic        rodbusy,
  output logic [31:0] n_busy,
  output logic [31:0] busy_cycles
);
  logic any_hi, all_lo, state;

  always_comb begin
    any_hi = 1'b0;
    all_lo = 1'b1;
    for (int i = 0; i < int'(N_MON); i++) begin
      if (level[i] >= hi[i]) any_hi = 1'b1;
      if (level[i] >  lo[i]) all_lo = 1'b0;
    end
  end

  assign rodbusy = state || force_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= 1'b0;
      n_busy      <= '0;
      busy_cycles <= '0;
    end else begin
      if (!state && any_hi) begin
        state  <= 1'b1;
        n_busy <= n_busy + 32'd1;
      end else if (state && all_lo) begin
        state <= 1'b0;
      end
      if (rodbusy) busy_cycles <= busy_cycles + 32'd1;
    end
  end
endmodule
