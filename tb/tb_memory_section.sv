// tb_memory_section: loads one cell of the memory section (cell 5, registers
// 15..17, all constants), runs it once, and checks that its packet appears on
// its own A[3] link with the loaded words, that no other cell sends, and that
// only its done output rises (other cells are given only the final request).
module tb_memory_section;
  import dfp_pkg::*;

  localparam int NC = 8, C = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3*NC-1:0] cmd_valid = '0, cmd_ack, din_valid = '0, din_bit = '0, din_last = '0, din_ready;
  reg_cmd_e        cmd [3*NC];
  logic [NC-1:0]   pkt_valid, pkt_ready = '0, pkt_last;
  logic [2:0]      pkt_data [NC];
  logic [NC-1:0]   run_valid = '0, run_final = '0, run_ready, done, done_ack = '0;

  memory_section dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic enter(input int r, input logic [M-1:0] v);
    @(negedge clk);
    cmd[r] = CMD_ENTER_CON; cmd_valid[r] = 1;
    for (int i = M - 1; i >= 0; i--) begin
      @(negedge clk);
      din_valid[r] = 1; din_bit[r] = v[i]; din_last[r] = (i == 0);
      while (!din_ready[r]) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    din_valid[r] = 0;
    while (!cmd_ack[r]) @(negedge clk);
    cmd_valid[r] = 0;
    while (cmd_ack[r]) @(negedge clk);
  endtask

  initial begin
    logic [3*M-1:0] got;
    int n;
    for (int r = 0; r < 3 * NC; r++) cmd[r] = CMD_EMPTY;
    repeat (2) @(posedge clk);
    rst_n = 1;
    enter(3*C, 16'hC0DE); enter(3*C+1, 16'h0005); enter(3*C+2, 16'h8001);
    // one R to cell C, RF to every cell
    @(negedge clk); run_valid[C] = 1;
    @(negedge clk); run_valid[C] = 0;
    @(negedge clk); run_valid = '1; run_final = '1;
    @(negedge clk); run_valid = '0; run_final = '0;
    pkt_ready = '1;
    n = 0;
    got = '0;
    while (n < M) begin
      @(posedge clk);
      check((pkt_valid & ~(NC'(1) << C)) == '0, "another cell sent a packet");
      if (pkt_valid[C]) begin
        got = {got[3*M-2:0], 1'b0};
        for (int k = 0; k < 3; k++) got[k*M] = pkt_data[C][k];
        n++;
      end
    end
    check(got == {16'hC0DE, 16'h0005, 16'h8001}, $sformatf("packet %h", got));
    repeat (6) @(negedge clk);
    check(done == '1, $sformatf("done %b", done));
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
