// tb_arb_unit: two producers send numbered multi-byte packets (byte = source
// id, packet number, byte index) through a two-input arbitration unit into a
// sink that is ready at random. Checks that packets are never interleaved,
// arrive complete and in order per source, and that while both inputs are
// busy the grant alternates (round-robin).
module tb_arb_unit;
  localparam int K = 12, NP = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0]   in_valid, in_ready, in_last;
  logic [K-1:0] in_data [2];
  logic         out_valid, out_ready, out_last;
  logic [K-1:0] out_data;

  arb_unit #(.NIN(2), .K(K)) dut (.*);

  int checks = 0, failures = 0;
  int pk [2], bi [2], len [2];
  int exp_pk [2];
  int cur_src = -1, exp_b = 0, last_src = -1, alt_ok = 0, both_busy = 0;

  function automatic int plen(int s, int p); return 1 + ((s * 7 + p * 3) % 4); endfunction

  for (genvar s = 0; s < 2; s++) begin : g_src
    assign in_valid[s]   = (pk[s] < NP);
    assign in_data[s]    = {2'(s), 6'(pk[s]), 4'(bi[s])};
    assign in_last[s]    = (bi[s] == plen(s, pk[s]) - 1);
  end

  always @(posedge clk) begin
    out_ready <= ($urandom_range(0, 3) != 0);
    for (int s = 0; s < 2; s++)
      if (in_valid[s] && in_ready[s]) begin
        if (in_last[s]) begin pk[s] <= pk[s] + 1; bi[s] <= 0; end
        else bi[s] <= bi[s] + 1;
      end
    if (out_valid && out_ready) begin
      int s, p, b;
      s = int'(out_data[11:10]); p = int'(out_data[9:4]); b = int'(out_data[3:0]);
      checks++;
      if (cur_src == -1) begin
        if (last_src != -1 && pk[0] < NP && pk[1] < NP) begin
          both_busy++;
          if (s != last_src) alt_ok++;
        end
        cur_src = s; exp_b = 0;
      end
      if (s != cur_src || p != exp_pk[s] || b != exp_b) begin
        failures++;
        $display("FAIL byte src %0d pkt %0d idx %0d (expected %0d %0d %0d)", s, p, b, cur_src, exp_pk[cur_src], exp_b);
      end
      exp_b++;
      if (out_last) begin
        checks++;
        if (exp_b != plen(s, p)) begin failures++; $display("FAIL length"); end
        exp_pk[s]++; last_src = s; cur_src = -1;
      end
    end
  end

  initial begin
    pk = '{0, 0}; bi = '{0, 0}; exp_pk = '{0, 0}; out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (exp_pk[0] == NP && exp_pk[1] == NP);
    checks++;
    if (alt_ok != both_busy || both_busy < 10) begin
      failures++;
      $display("FAIL round robin: %0d of %0d alternations", alt_ok, both_busy);
    end
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
