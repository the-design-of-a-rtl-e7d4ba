// tb_arbitration_network: every one of the eight cells sends a stream of
// instruction packets serially (A[3], MSB first) to randomly chosen
// functional units, with random gaps, while the functional units take
// packets at random. Each packet carries its source cell and sequence number
// in operand 1. Checks: every packet arrives at the unit its function field
// names, unchanged, exactly once, and packets from one cell to one unit keep
// their order (there is one path between them).
module tb_arbitration_network;
  import dfp_pkg::*;
  localparam int NC = N_CELLS;
  localparam int NP = 40;   // packets per cell

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NC-1:0]     in_valid, in_ready, in_last;
  logic [2:0]        in_data [NC];
  logic [NFU-1:0]    fu_valid, fu_ready;
  logic [IPKT_W-1:0] fu_data [NFU];

  arbitration_network dut (.*);

  int checks = 0, failures = 0;
  int received = 0;
  int next_seq [NC][NFU];
  ipkt_t pk [NC][NP];

  initial
    for (int c = 0; c < NC; c++)
      for (int p = 0; p < NP; p++) begin
        pk[c][p].instr = make_instr(2'($urandom), 2'($urandom), 1'b1, Q'($urandom), 1'b0, '0);
        pk[c][p].x     = M'({c[7:0], p[7:0]});
        pk[c][p].y     = M'($urandom);
      end

  // senders
  for (genvar c = 0; c < NC; c++) begin : g_src
    int p = 0, bitn = M - 1;
    logic gap;
    ipkt_t cur;
    assign cur         = pk[c][(p < NP) ? p : 0];
    assign in_valid[c] = (p < NP) && !gap;
    assign in_data[c]  = {cur.instr[bitn], cur.x[bitn], cur.y[bitn]};
    assign in_last[c]  = (bitn == 0);
    always @(posedge clk) begin
      gap <= ($urandom_range(0, 7) == 0);
      if (rst_n && in_valid[c] && in_ready[c]) begin
        if (bitn == 0) begin bitn <= M - 1; p <= p + 1; end
        else bitn <= bitn - 1;
      end
    end
  end

  // receivers
  always @(posedge clk) begin
    fu_ready <= NFU'($urandom);
    for (int f = 0; f < NFU; f++)
      if (fu_valid[f] && fu_ready[f]) begin
        ipkt_t got;
        int c, s;
        got = ipkt_t'(fu_data[f]);
        c = int'(got.x[15:8]); s = int'(got.x[7:0]);
        checks++;
        received++;
        if (c >= NC || s >= NP) begin
          failures++; $display("FAIL unknown packet %h", fu_data[f]);
        end else if (got != pk[c][s] || int'(got.instr.fu) != f) begin
          failures++; $display("FAIL unit %0d got wrong packet from cell %0d seq %0d", f, c, s);
        end else begin
          // all packets of this cell before s that go to unit f must have come
          for (int q = next_seq[c][f]; q < s; q++)
            if (int'(pk[c][q].instr.fu) == f) begin
              failures++; $display("FAIL order cell %0d unit %0d: %0d before %0d", c, f, s, q);
            end
          next_seq[c][f] = s + 1;
        end
      end
  end

  initial begin
    for (int c = 0; c < NC; c++) for (int f = 0; f < NFU; f++) next_seq[c][f] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (received == NC * NP);
    repeat (20) @(posedge clk);
    checks++;
    if (received != NC * NP) begin failures++; $display("FAIL extra packets"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d packets received", received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
