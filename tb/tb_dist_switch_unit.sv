// tb_dist_switch_unit: random result packets with five address bits, random
// gaps and random readiness on both outputs. Checks: each packet leaves on
// the output named by its top address bit, with that bit deleted and the
// value unchanged, in order; only one output is valid at a time; and a
// blocked output does not stop the unit from holding its packet.
module tb_dist_switch_unit;
  import dfp_pkg::*;
  localparam int NP = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           in_valid, in_ready;
  logic [Q-1:0]   in_addr;
  logic [M-1:0]   in_value;
  logic [1:0]     out_valid, out_ready;
  logic [Q-2:0]   out_addr;
  logic [M-1:0]   out_value;

  dist_switch_unit #(.H(Q)) dut (.*);

  int checks = 0, failures = 0, sent = 0, got = 0;
  logic [Q+M-1:0] expq [$];
  logic gap;

  assign in_valid = !gap && sent < NP;

  always @(posedge clk) begin
    gap       <= ($urandom_range(0, 3) == 0);
    out_ready <= 2'($urandom);
    if (rst_n && in_valid && in_ready) begin
      expq.push_back({in_addr, in_value});
      sent     <= sent + 1;
      in_addr  <= Q'($urandom);
      in_value <= M'($urandom);
    end
    if (rst_n) begin
      checks++;
      if (out_valid == 2'b11) begin failures++; $display("FAIL both outputs valid"); end
    end
    if (rst_n && |(out_valid & out_ready)) begin
      logic [Q+M-1:0] e;
      checks++;
      got <= got + 1;
      e = expq.pop_front();
      if (out_valid != (2'b01 << e[Q+M-1]) || out_addr != e[Q+M-2 -: Q-1] || out_value != e[M-1:0]) begin
        failures++; $display("FAIL packet out %b %h %h expected %h", out_valid, out_addr, out_value, e);
      end
    end
  end

  initial begin
    in_addr = '0; in_value = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (got == NP);
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
