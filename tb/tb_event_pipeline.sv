// tb_event_pipeline: a four-bit event queue (capacity 15) driven with random
// pushes and pops, including long stretches of pushes only (to fill it) and
// pops only (to drain it). A reference count in the testbench checks
// in_ready (refused exactly when 15 events wait), out_valid (exactly when
// at least one waits) and the count after every clock.
module tb_event_pipeline;
  localparam int W = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [W-1:0] count;

  event_pipeline #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  int ref_n = 0;
  int full_seen = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      int phase;
      phase = (i / 100) % 3;   // 0: random, 1: mostly push, 2: mostly pop
      @(negedge clk);
      in_valid  = (phase == 1) ? ($urandom_range(0, 7) != 0) :
                  (phase == 2) ? ($urandom_range(0, 7) == 0) : 1'($urandom);
      out_ready = (phase == 2) ? ($urandom_range(0, 7) != 0) :
                  (phase == 1) ? ($urandom_range(0, 7) == 0) : 1'($urandom);
      #1;
      checks++;
      if (in_ready != (ref_n < 2**W - 1) || out_valid != (ref_n > 0) || int'(count) != ref_n) begin
        failures++;
        $display("FAIL n=%0d in_ready=%b out_valid=%b count=%0d", ref_n, in_ready, out_valid, count);
      end
      if (ref_n == 2**W - 1) full_seen++;
      @(posedge clk);
      ref_n = ref_n + int'(in_valid && ref_n < 2**W - 1) - int'(out_ready && ref_n > 0);
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL queue never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
