// tb_distribution_network: nine sources (as in the processor: two per
// functional unit and the controller) send result packets to random register
// addresses, including addresses above the last register, with random gaps;
// each register takes serial bits at random. Each value carries its source
// and sequence number. Checks: every packet for an existing register arrives
// there, bit-serial MSB first with last on the final bit, exactly once, and
// packets from one source to one register keep their order; packets for
// missing registers are absorbed without blocking the network.
module tb_distribution_network;
  import dfp_pkg::*;
  localparam int NSRC = 2 * NFU + 1;
  localparam int NR   = N_REGS;
  localparam int NP   = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NSRC-1:0] in_valid, in_ready;
  logic [Q-1:0]    in_addr [NSRC];
  logic [M-1:0]    in_value [NSRC];
  logic [NR-1:0]   out_valid, out_ready, out_bit, out_last;

  distribution_network dut (.*);

  int checks = 0, failures = 0;
  int expected = 0, received = 0, sent_all = 0;
  int next_seq [NSRC][NR];

  for (genvar s = 0; s < NSRC; s++) begin : g_src
    int sent = 0;
    logic gap;
    assign in_valid[s] = !gap && sent < NP;
    assign in_value[s] = M'({s[7:0], sent[7:0]});
    always @(posedge clk) begin
      gap <= ($urandom_range(0, 2) == 0);
      if (rst_n && in_valid[s] && in_ready[s]) begin
        if (int'(in_addr[s]) < NR) expected++;
        sent       <= sent + 1;
        in_addr[s] <= Q'($urandom);
        if (sent == NP - 1) sent_all++;
      end
    end
    initial in_addr[s] = Q'($urandom);
  end

  for (genvar r = 0; r < NR; r++) begin : g_reg
    logic [M-1:0] acc = '0;
    int nb = 0;
    always @(posedge clk) begin
      out_ready[r] <= ($urandom_range(0, 3) != 0);
      if (rst_n && out_valid[r] && out_ready[r]) begin
        logic [M-1:0] v;
        v = {acc[M-2:0], out_bit[r]};
        acc <= v;
        checks++;
        if (out_last[r] != (nb == M - 1)) begin failures++; $display("FAIL reg %0d last at bit %0d", r, nb); end
        if (out_last[r]) begin
          int s, q;
          nb <= 0;
          received++;
          s = int'(v[15:8]); q = int'(v[7:0]);
          checks++;
          if (s >= NSRC || q < next_seq[s][r]) begin
            failures++; $display("FAIL reg %0d: packet %h out of order or unknown", r, v);
          end else next_seq[s][r] = q + 1;
        end else nb <= nb + 1;
      end
    end
  end

  initial begin
    for (int s = 0; s < NSRC; s++) for (int r = 0; r < NR; r++) next_seq[s][r] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (sent_all == NSRC);
    repeat (1000) @(posedge clk);
    checks++;
    if (received != expected) begin
      failures++; $display("FAIL received %0d of %0d packets", received, expected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d of %0d received", received, expected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
