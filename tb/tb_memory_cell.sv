// tb_memory_cell: loads a cell (instruction and operand 1 constant, operand 2
// a full variable), requests two executions and the final request, and checks
// the two instruction packets (collected from the serial A[3] link), that the
// second packet waits for operand 2 to be refilled, that done is raised only
// after both executions, and the four-phase done/acknowledge.
module tb_memory_cell;
  import dfp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] cmd_valid = 0, cmd_ack;
  reg_cmd_e   cmd [3];
  logic [2:0] din_valid = 0, din_bit = 0, din_last = 0, din_ready;
  logic       pkt_valid, pkt_ready = 0, pkt_last;
  logic [2:0] pkt_data;
  logic       run_valid = 0, run_final = 0, run_ready, done, done_ack = 0;

  memory_cell dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic send_value(input int r, input logic [M-1:0] v);
    for (int i = M - 1; i >= 0; i--) begin
      @(negedge clk);
      din_valid[r] = 1; din_bit[r] = v[i]; din_last[r] = (i == 0);
      while (!din_ready[r]) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    din_valid[r] = 0; din_last[r] = 0;
  endtask

  task automatic enter(input int r, input reg_cmd_e c, input logic [M-1:0] v);
    @(negedge clk);
    cmd[r] = c; cmd_valid[r] = 1;
    send_value(r, v);
    while (!cmd_ack[r]) @(negedge clk);
    cmd_valid[r] = 0;
    while (cmd_ack[r]) @(negedge clk);
  endtask

  task automatic request(input bit fin);
    @(negedge clk);
    run_valid = 1; run_final = fin;
    while (!run_ready) @(negedge clk);
    @(negedge clk);
    run_valid = 0; run_final = 0;
  endtask

  // receive one packet (random ready), checking the byte count
  task automatic get_packet(output logic [M-1:0] i, x, y);
    int n = 0;
    forever begin
      @(negedge clk);
      pkt_ready = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (pkt_valid && pkt_ready) begin
        i = {i[M-2:0], pkt_data[2]};
        x = {x[M-2:0], pkt_data[1]};
        y = {y[M-2:0], pkt_data[0]};
        n++;
        if (pkt_last) break;
      end
    end
    @(negedge clk) pkt_ready = 0;
    check(n == M, $sformatf("packet length %0d", n));
  endtask

  initial begin
    logic [M-1:0] i, x, y;
    for (int r = 0; r < 3; r++) cmd[r] = CMD_EMPTY;
    repeat (2) @(posedge clk);
    rst_n = 1;
    enter(0, CMD_ENTER_CON, 16'h4321);
    enter(1, CMD_ENTER_CON, 16'h00FF);
    enter(2, CMD_ENTER_VAR, 16'h1111);
    repeat (5) @(negedge clk);
    check(!pkt_valid, "packet without request");
    request(0); request(0); request(1);
    get_packet(i, x, y);
    check(i == 16'h4321 && x == 16'h00FF && y == 16'h1111,
          $sformatf("packet 1 %h %h %h", i, x, y));
    repeat (20) @(negedge clk);
    check(!pkt_valid && !done, "second packet before operand 2 refilled");
    send_value(2, 16'h2222);
    get_packet(i, x, y);
    check(i == 16'h4321 && x == 16'h00FF && y == 16'h2222,
          $sformatf("packet 2 %h %h %h", i, x, y));
    repeat (5) @(negedge clk);
    check(!done, "done before last refill");
    send_value(2, 16'h3333);
    repeat (4) @(negedge clk);
    check(done, "done not raised");
    done_ack = 1;
    @(negedge clk); @(negedge clk);
    check(!done, "done not dropped after acknowledge");
    done_ack = 0;
    repeat (3) @(negedge clk);
    check(!done && !pkt_valid, "cell not quiet after run");
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
