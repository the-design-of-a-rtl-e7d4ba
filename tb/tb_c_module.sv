// tb_c_module: drives the two inputs with random values for many clocks and
// compares the output with a reference C-element kept in the testbench:
// after each clock edge the output is 1 if both inputs were 1, 0 if both
// were 0, and unchanged otherwise. Also checks the value after reset.
module tb_c_module;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic a = 0, b = 0, y;
  logic ref_y;

  c_module dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(posedge clk);
    checks++;
    if (y !== 1'b0) begin failures++; $display("FAIL output after reset"); end
    rst_n = 1'b1;
    ref_y = 1'b0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      // hold the inputs for a few clocks now and then so both agreeing and
      // disagreeing periods occur
      if ($urandom_range(0, 2) != 0) begin a = 1'($urandom); b = 1'($urandom); end
      @(posedge clk);
      if (a && b) ref_y = 1'b1;
      else if (!a && !b) ref_y = 1'b0;
      #1;
      checks++;
      if (y !== ref_y) begin failures++; $display("FAIL a=%b b=%b y=%b expected %b", a, b, y, ref_y); end
    end
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
