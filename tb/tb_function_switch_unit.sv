// tb_function_switch_unit: offers packets whose top two bits name a
// functional unit, with random readiness at the four outputs, and checks
// that each packet leaves on the output it names, unchanged, that only that
// output is valid, and that the input waits while that output is not ready.
// A two-byte packet checks that the decision of the first byte is kept.
module tb_function_switch_unit;
  localparam int K = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         in_valid = 0, in_ready, in_last = 1, out_last;
  logic [K-1:0] in_data = 0, out_data;
  logic [3:0]   out_valid, out_ready = 0;

  function_switch_unit #(.NOUT(4), .K(K), .FSEL(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 60; p++) begin
      int f;
      @(negedge clk);
      in_data = K'($urandom); in_valid = 1; in_last = 1;
      f = int'(in_data[K-1 -: 2]);
      out_ready = 4'($urandom);
      #1;
      check(out_valid == (4'b1 << f), $sformatf("valid %b for unit %0d", out_valid, f));
      check(in_ready == out_ready[f], "ready does not follow selected output");
      check(out_data == in_data, "data changed");
    end
    // two-byte packet: second byte's top bits must not change the route
    @(negedge clk);
    in_data = 16'h8000; in_last = 0; out_ready = 4'b1111;
    @(negedge clk);
    in_data = 16'h0001; in_last = 1;
    #1;
    check(out_valid == 4'b0100, "second byte rerouted");
    @(negedge clk);
    in_valid = 0;
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
