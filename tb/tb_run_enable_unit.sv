// tb_run_enable_unit: one run enable unit between an execution-counter model
// and two subtree models. Each run sends v requests R then the final request
// RF as fast as the unit takes them; each subtree takes requests at random
// and, some time after its RF, raises done, holding it until the
// acknowledge arrives. Checks: both outputs receive exactly v R followed by
// one RF (runs up to 40, beyond what the per-output counters hold, so the
// unit must push back); done rises only when both subtrees are done (a
// C-module) and falls only when both have dropped it; the acknowledge is
// passed to both.
module tb_run_enable_unit;
  import dfp_pkg::*;
  localparam int NC = 2;
  localparam int W  = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_valid = 0, in_final = 0, in_ready, done_out, done_ack_in = 0;
  logic [NC-1:0] out_valid, out_final, out_ready, done_in, done_ack_out;

  run_enable_unit #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  int nr [NC], nf [NC];

  for (genvar c = 0; c < NC; c++) begin : g_cell
    always @(posedge clk) begin
      out_ready[c] <= ($urandom_range(0, 3) == 0);
      if (rst_n && out_valid[c] && out_ready[c]) begin
        if (nf[c] != 0) begin failures++; $display("FAIL cell %0d request after RF", c); end
        if (out_final[c]) nf[c]++; else nr[c]++;
      end
    end
    initial begin
      done_in[c] = 0;
      forever begin
        @(negedge clk);
        if (nf[c] != 0 && !done_in[c]) begin
          repeat ($urandom_range(0, 20)) @(negedge clk);
          done_in[c] = 1;
          while (!done_ack_out[c]) @(negedge clk);
          repeat ($urandom_range(0, 5)) @(negedge clk);
          done_in[c] = 0;
          while (done_ack_out[c]) @(negedge clk);
          nf[c] = 0;
          nr[c] = 0;
        end
      end
    end
  end

  task automatic run(input int v);
    for (int i = 0; i <= v; i++) begin
      @(negedge clk);
      in_valid = 1; in_final = (i == v);
      while (!in_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0; in_final = 0;
    while (!done_out) begin
      @(negedge clk);
    end
    checks++;
    if (done_in != '1) begin failures++; $display("FAIL done rose with cells %b", done_in); end
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (nr[c] != v || nf[c] != 1) begin
        failures++; $display("FAIL run %0d cell %0d: %0d R, %0d RF", v, c, nr[c], nf[c]);
      end
    end
    done_ack_in = 1;
    while (done_out) begin
      @(negedge clk);
    end
    checks++;
    if (done_in != '0) begin failures++; $display("FAIL done fell early %b", done_in); end
    done_ack_in = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    for (int c = 0; c < NC; c++) begin nr[c] = 0; nf[c] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < 4; v++) run(v);
    run(40);
    for (int i = 0; i < 5; i++) run($urandom_range(0, 25));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
