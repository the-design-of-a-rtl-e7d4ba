// tb_controller: the complete controller (command interpreter plus execution
// counter) between a host model and models of the distribution, command and
// control networks. Runs a sequence of host commands and checks: enter
// commands produce the result packet and the enter command for the same
// register; empty and idle produce only the command; run v produces v R
// requests then RF, and host_ready comes only after the control network's
// completion handshake.
module tb_controller;
  import dfp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         host_valid = 0, host_ready;
  host_cmd_e    host_cmd = HOST_RUN;
  logic [Q-1:0] host_addr = 0, rp_addr, c_addr;
  logic [M-1:0] host_value = 0, rp_value;
  logic         rp_valid, rp_ready, c_valid, c_ack = 0;
  reg_cmd_e     c_cmd;
  logic         req_valid, req_final, req_ready, done_in = 0, done_ack;

  controller dut (.*);

  int checks = 0, failures = 0;
  int n_rp = 0, n_c = 0, n_r = 0, n_rf = 0;
  logic [Q-1:0] rp_a, c_a;
  logic [M-1:0] rp_v;
  reg_cmd_e     c_k;

  always @(posedge clk) begin
    rp_ready  <= ($urandom_range(0, 1) == 0);
    req_ready <= ($urandom_range(0, 2) != 0);
    if (rst_n && rp_valid && rp_ready) begin n_rp++; rp_a = rp_addr; rp_v = rp_value; end
    if (rst_n && req_valid && req_ready) begin if (req_final) n_rf++; else n_r++; end
  end

  // command network model
  initial forever begin
    @(negedge clk);
    if (c_valid) begin
      n_c++; c_k = c_cmd; c_a = c_addr;
      repeat ($urandom_range(0, 3)) @(negedge clk);
      c_ack = 1;
      while (c_valid) @(negedge clk);
      c_ack = 0;
    end
  end

  // control network model: done after RF, with delays
  initial forever begin
    @(negedge clk);
    if (n_rf != 0 && !done_in && !done_ack) begin
      repeat ($urandom_range(1, 4)) @(negedge clk);
      checks++;
      if (host_ready) begin failures++; $display("FAIL host_ready before completion"); end
      done_in = 1;
      while (!done_ack) @(negedge clk);
      done_in = 0;
      while (done_ack) @(negedge clk);
      n_rf = 0;
    end
  end

  task automatic host(input host_cmd_e c, input int a, input int v);
    int rp0, c0;
    rp0 = n_rp; c0 = n_c; n_r = 0;
    @(negedge clk);
    host_cmd = c; host_addr = Q'(a); host_value = M'(v); host_valid = 1;
    while (!host_ready) @(negedge clk);
    @(negedge clk);
    host_valid = 0;
    checks++;
    case (c)
      HOST_ENTER_CON, HOST_ENTER_VAR:
        if (n_rp != rp0 + 1 || n_c != c0 + 1 || rp_a != Q'(a) || rp_v != M'(v) || c_a != Q'(a) ||
            c_k != ((c == HOST_ENTER_CON) ? CMD_ENTER_CON : CMD_ENTER_VAR)) begin
          failures++; $display("FAIL enter %0d", c);
        end
      HOST_EMPTY, HOST_IDLE:
        if (n_rp != rp0 || n_c != c0 + 1 || c_a != Q'(a) ||
            c_k != ((c == HOST_EMPTY) ? CMD_EMPTY : CMD_IDLE)) begin
          failures++; $display("FAIL command %0d", c);
        end
      default:
        if (n_rp != rp0 || n_c != c0 || n_r != v) begin
          failures++; $display("FAIL run %0d: %0d requests", v, n_r);
        end
    endcase
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    host(HOST_ENTER_CON, 3, 16'h1234);
    host(HOST_ENTER_VAR, 17, 16'hBEEF);
    host(HOST_EMPTY, 4, 0);
    host(HOST_IDLE, 23, 0);
    host(HOST_RUN, 0, 1);
    host(HOST_RUN, 0, 7);
    host(HOST_RUN, 0, 0);
    for (int i = 0; i < 20; i++) host(host_cmd_e'($urandom_range(0, 4)), $urandom_range(0, 31), $urandom_range(0, 9));
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
