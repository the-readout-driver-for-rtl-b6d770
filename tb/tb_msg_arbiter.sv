// tb_msg_arbiter: sources post messages at random and hold them until
// granted; the pipe is randomly full. Checks one grant per clock, no
// grant while full, that every message is written exactly once with its
// own word, and round-robin fairness (no source waits more than N_SRC
// grants while requesting).
module tb_msg_arbiter;
  import rod_pkg::*;
  localparam int N_SRC = 4;
  logic clk = 0, rst_n = 0;
  logic [N_SRC-1:0] req = 0, gnt;
  msg_t msg [N_SRC];
  logic full = 0, wr;
  msg_t wdata;
  int checks = 0, failures = 0, posted = 0, written = 0;
  int waitn [N_SRC];
  int seq [N_SRC];

  msg_arbiter #(.N_SRC(N_SRC)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  logic [N_SRC-1:0] g_seen = 0;
  // checks on the falling edge, where the grant is settled
  always @(negedge clk) if (rst_n) begin
    g_seen = gnt;
    chk($onehot0(gnt), "one grant");
    chk(!(full && |gnt), "no grant while full");
    chk(wr == |gnt, "write with grant");
    for (int s = 0; s < N_SRC; s++) begin
      if (gnt[s]) begin
        chk(wdata == msg[s], "granted word");
        written++;
        waitn[s] = 0;
      end else if (req[s] && |gnt) begin
        waitn[s]++;
        chk(waitn[s] < N_SRC, "round robin");
      end
    end
  end

  // new requests just after the rising edge
  always @(posedge clk) if (rst_n) begin
    #1;
    for (int s = 0; s < N_SRC; s++) begin
      if (g_seen[s]) req[s] = 0;
      if (!req[s] && posted < 400 && $urandom_range(0, 2) == 0) begin
        req[s] = 1;
        msg[s] = '{code: 8'(s + 1), data: 24'(seq[s])};
        seq[s]++;
        posted++;
      end
    end
    g_seen = 0;
    full = $urandom_range(0, 5) == 0;
  end

  initial begin
    for (int s = 0; s < N_SRC; s++) begin waitn[s] = 0; seq[s] = 0; msg[s] = '0; end
    #20 rst_n = 1;
    wait (posted == 400 && req == 0);
    chk(written == 400, "all written once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
