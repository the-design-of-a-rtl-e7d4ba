// tb_dataflow_processor: end-to-end test of the whole processor at its
// default size, running the second-order recursive filter
//     y(t) = A x(t) + B y(t-1) + C y(t-2)
// as an eight-cell data-flow program (cell c owns registers 3(c-1)..3(c-1)+2):
//   cell 1  input  -> 4           op1 = channel 0 (constant), op2 idle
//   cell 2  mult   -> 13          op1 x (empty variable), op2 A (constant)
//   cell 3  mult   -> 14          op1 y(t-1) (empty variable), op2 B
//   cell 4  mult   -> 16          op1 y(t-2) (full variable, y(-2)), op2 C
//   cell 5  add    -> 17          op1, op2 empty variables
//   cell 6  add    -> 19, 23      op1, op2 empty variables
//   cell 7  ident  -> 7, 10       op1 full variable y(-1), op2 idle
//   cell 8  output                op1 = channel 0 (constant), op2 empty variable
// The program is loaded with host commands, then run first one execution
// cycle per run command. Then the output cell is reprogrammed to also send
// each output to cell 1's second operand register, turning it into a full
// variable: the input cell can only fire again once the previous output has
// left, which bounds how far any cell runs ahead. Then one run command
// executes many cycles. Output
// samples are compared with a reference model computed in the testbench
// (16-bit wrap-around arithmetic). The input channel withholds samples and
// the output channel refuses samples at random, so waits happen on both.
// Counted mechanisms (each must occur): arbitration contention, a result
// waiting for a register that is still full, functional-unit back-pressure,
// input wait, output stall, results with two destinations, several requests
// queued in one cell, and each of the five host commands.
module tb_dataflow_processor;
  import dfp_pkg::*;

  localparam int T1 = 6;    // samples run with "run 1"
  localparam int T2 = 20;   // samples run with one "run T2"
  localparam int T  = T1 + T2;
  localparam logic [M-1:0] CA = 16'd3, CB = 16'd2, CC = 16'hFFFF;  // C = -1

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           host_valid = 1'b0, host_ready;
  host_cmd_e      host_cmd = HOST_RUN;
  logic [Q-1:0]   host_addr = '0;
  logic [M-1:0]   host_value = '0;
  logic [NCH-1:0] in_valid, in_ready, out_valid, out_ready;
  logic [M-1:0]   in_data [NCH];
  logic [M-1:0]   out_data;

  dataflow_processor dut (.*);

  int checks = 0, failures = 0;
  logic [M-1:0] xs [T];
  logic [M-1:0] ys [T];
  int n_in = 0, n_out = 0;
  int cmd_count [5];
  int c_contend = 0, c_dist_wait = 0, c_fu_stall = 0, c_in_wait = 0,
      c_out_stall = 0, c_two_dest = 0, c_queued = 0;

  // reference model
  initial begin
    logic [M-1:0] y1, y2;
    y1 = '0; y2 = '0;
    for (int t = 0; t < T; t++) begin
      xs[t] = M'($urandom_range(0, 200));
      ys[t] = CA * xs[t] + CB * y1 + CC * y2;
      y2 = y1; y1 = ys[t];
    end
  end

  // input channel 0: samples in order, sometimes withheld
  logic hold_in;
  assign in_valid[0] = (n_in < T) && !hold_in;
  assign in_data[0]  = (n_in < T) ? xs[n_in] : '0;
  assign in_valid[1] = 1'b0;
  assign in_data[1]  = '0;
  logic stall_out;
  assign out_ready = {1'b0, !stall_out};

  always @(posedge clk) begin
    hold_in   <= ($urandom_range(0, 3) == 0);
    stall_out <= ($urandom_range(0, 3) == 0);
    if (in_valid[0] && in_ready[0]) n_in <= n_in + 1;
    if (out_valid[0] && out_ready[0]) begin
      checks++;
      if (n_out >= T || out_data !== ys[n_out]) begin
        failures++;
        $display("FAIL output %0d: got %0d expected %0d", n_out, out_data,
                 (n_out < T) ? ys[n_out] : 0);
      end
      n_out <= n_out + 1;
    end
    if (out_valid[1]) begin
      failures++;
      $display("FAIL unexpected output on channel 1");
    end
    // mechanism counters
    for (int g = 0; g < N_CELLS / 2; g++)
      if (&dut.ip_valid[2*g +: 2]) c_contend++;
    if (|(dut.rd_valid & ~dut.rd_ready)) c_dist_wait++;
    if (|(dut.fi_valid & ~dut.fi_ready)) c_fu_stall++;
    if (dut.fi_valid[FU_IN] && !in_valid[0]) c_in_wait++;
    if (out_valid[0] && !out_ready[0]) c_out_stall++;
    if (dut.rp_valid[2*FU_ADD] && dut.rp_valid[2*FU_ADD+1] && dut.rp_ready[2*FU_ADD+1]) c_two_dest++;
    if (dut.u_mem.g_cell[0].u_cell.pend > 1) c_queued++;
  end

  task automatic host(input host_cmd_e c, input int a, input int v);
    @(negedge clk);
    host_cmd = c; host_addr = Q'(a); host_value = M'(v); host_valid = 1'b1;
    while (!host_ready) @(negedge clk);
    @(negedge clk);
    host_valid = 1'b0;
    cmd_count[int'(c)]++;
  endtask

  task automatic con(input int a, input int v); host(HOST_ENTER_CON, a, v); endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    int t_start;
    for (int i = 0; i < 5; i++) cmd_count[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // cell 1: input
    con(0, int'(make_instr(FU_IN, 2'd0, 1'b1, 5'd4, 1'b0, 5'd0)));
    con(1, 0);                 host(HOST_IDLE, 2, 0);
    // cell 2: A * x
    con(3, int'(make_instr(FU_MUL, SP_MUL, 1'b1, 5'd13, 1'b0, 5'd0)));
    host(HOST_EMPTY, 4, 0);    con(5, int'(CA));
    // cell 3: B * y(t-1)
    con(6, int'(make_instr(FU_MUL, SP_MUL, 1'b1, 5'd14, 1'b0, 5'd0)));
    host(HOST_EMPTY, 7, 0);    con(8, int'(CB));
    // cell 4: C * y(t-2)
    con(9, int'(make_instr(FU_MUL, SP_MUL, 1'b1, 5'd16, 1'b0, 5'd0)));
    host(HOST_ENTER_VAR, 10, 0); con(11, int'(CC));
    // cell 5: add -> 17
    con(12, int'(make_instr(FU_ADD, SP_ADD, 1'b1, 5'd17, 1'b0, 5'd0)));
    host(HOST_EMPTY, 13, 0);   host(HOST_EMPTY, 14, 0);
    // cell 6: add -> 19, 23
    con(15, int'(make_instr(FU_ADD, SP_ADD, 1'b1, 5'd19, 1'b1, 5'd23)));
    host(HOST_EMPTY, 16, 0);   host(HOST_EMPTY, 17, 0);
    // cell 7: identity -> 7, 10
    con(18, int'(make_instr(FU_ADD, SP_IDX, 1'b1, 5'd7, 1'b1, 5'd10)));
    host(HOST_ENTER_VAR, 19, 0); host(HOST_IDLE, 20, 0);
    // cell 8: output
    con(21, int'(make_instr(FU_OUT, 2'd0, 1'b0, 5'd0, 1'b0, 5'd0)));
    con(22, 0);                host(HOST_EMPTY, 23, 0);

    // one execution cycle per run command
    for (int t = 0; t < T1; t++) begin
      host(HOST_RUN, 0, 1);
      checks++;
      if (n_out != t + 1) begin
        failures++;
        $display("FAIL after run %0d: %0d outputs", t, n_out);
      end
    end
    // Reprogram between runs so that the output cell hands a token back to the
    // input cell (register 2, full variable): no producer can then run more
    // than one cycle ahead of the loop, which a multi-cycle run needs.
    con(21, int'(make_instr(FU_OUT, 2'd0, 1'b1, 5'd2, 1'b0, 5'd0)));
    host(HOST_ENTER_VAR, 2, 0);
    // many cycles with one command
    t_start = cyc;
    host(HOST_RUN, 0, T2);
    $display("run %0d took %0d clocks", T2, cyc - t_start);
    checks++;
    if (n_out != T) begin failures++; $display("FAIL outputs %0d of %0d", n_out, T); end

    // every mechanism must have happened
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (cmd_count[i] == 0) begin failures++; $display("FAIL host command %0d never used", i); end
    end
    $display("contention=%0d dist_wait=%0d fu_stall=%0d in_wait=%0d out_stall=%0d two_dest=%0d queued=%0d",
             c_contend, c_dist_wait, c_fu_stall, c_in_wait, c_out_stall, c_two_dest, c_queued);
    checks += 7;
    if (c_contend == 0)   begin failures++; $display("FAIL no arbitration contention"); end
    if (c_dist_wait == 0) begin failures++; $display("FAIL no result waited for a full register"); end
    if (c_fu_stall == 0)  begin failures++; $display("FAIL no functional-unit back-pressure"); end
    if (c_in_wait == 0)   begin failures++; $display("FAIL input unit never waited"); end
    if (c_out_stall == 0) begin failures++; $display("FAIL output never stalled"); end
    if (c_two_dest == 0)  begin failures++; $display("FAIL no two-destination result"); end
    if (c_queued == 0)    begin failures++; $display("FAIL no queued execution requests"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d outputs", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
