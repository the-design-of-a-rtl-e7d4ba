// tb_execution_counter: issues run requests with counts 0..5 and a larger
// one, taking requests from the unit with random readiness, and plays the
// control network's completion handshake with random delays. Checks: exactly
// v R requests then one RF, nothing after RF, run_done only after the
// four-phase D/AD exchange, and run_done held until run_valid falls.
module tb_execution_counter;
  import dfp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         run_valid = 0, run_done, req_valid, req_final, req_ready, done_in = 0, done_ack;
  logic [M-1:0] run_count = 0;

  execution_counter dut (.*);

  int checks = 0, failures = 0;
  int nr = 0, nf = 0;

  always @(posedge clk) begin
    req_ready <= ($urandom_range(0, 2) != 0);
    if (rst_n && req_valid && req_ready) begin
      if (nf != 0) begin failures++; $display("FAIL request after RF"); end
      if (req_final) nf++; else nr++;
    end
  end

  task automatic run(input int v);
    nr = 0; nf = 0;
    @(negedge clk);
    run_valid = 1; run_count = M'(v);
    wait (nf == 1);
    repeat ($urandom_range(1, 5)) @(negedge clk);
    checks++;
    if (run_done || nr != v) begin failures++; $display("FAIL run %0d: %0d R, done %b", v, nr, run_done); end
    done_in = 1;
    wait (done_ack);
    repeat ($urandom_range(0, 3)) @(negedge clk);
    checks++;
    if (run_done) begin failures++; $display("FAIL done before D fell"); end
    done_in = 0;
    wait (run_done);
    repeat (3) @(negedge clk);
    checks++;
    if (!run_done || done_ack) begin failures++; $display("FAIL run_done not held"); end
    run_valid = 0;
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (run_done || nf != 1) begin failures++; $display("FAIL run_done not released / extra RF"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v <= 5; v++) run(v);
    run(200);
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
