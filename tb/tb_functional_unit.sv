// tb_functional_unit: one instance of each of the four kinds of functional
// unit (add, multiply, input, output) with a three-stage pipeline. Each gets
// random instruction packets (random function codes, destinations present or
// absent) and random readiness on both result links; the input unit's
// channels offer numbered samples at random and the output unit's channels
// take samples at random. A reference model computes each expected result
// when the packet is accepted. Checks: value and address of every result
// packet, in order, separately for destination 1 and 2; the output unit's
// channel data; and, in a first phase with everything ready, that a result
// appears exactly LAT clocks after its packet entered.
module tb_functional_unit;
  import dfp_pkg::*;
  localparam int LAT = 3;
  localparam int NP  = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int done_cnt = 0;
  bit  free_run = 1'b1;   // first phase: no back-pressure, latency measured

  for (genvar k = 0; k < 4; k++) begin : g_fu
    localparam logic [1:0] KIND = 2'(k);
    logic              in_valid, in_ready;
    logic [IPKT_W-1:0] in_data;
    logic [NCH-1:0]    ich_valid, ich_ready, och_valid, och_ready;
    logic [M-1:0]      ich_data [NCH];
    logic [M-1:0]      och_data;
    logic [1:0]        r_valid, r_ready;
    logic [Q-1:0]      r_addr [2];
    logic [M-1:0]      r_value [2];

    functional_unit #(.KIND(KIND), .LAT(LAT)) dut (.*);

    ipkt_t          pkt;
    int             sent = 0, cyc = 0;
    logic [M-1:0]   ch_seq [NCH];
    logic [Q+M-1:0] expq [2][$];
    int             tq [2][$];
    logic [M-1:0]   outq [$];
    logic           drive;

    assign in_data     = pkt;
    assign in_valid    = drive && (sent < NP);
    assign ich_data[0] = ch_seq[0];
    assign ich_data[1] = ch_seq[1];

    function automatic logic [M-1:0] model(ipkt_t p);
      logic signed [2*M-1:0] prod;
      prod = $signed(p.x) * $signed(p.y);
      case (KIND)
        FU_ADD: case (p.instr.spec)
          SP_ADD: return p.x + p.y;
          SP_SUB: return p.x - p.y;
          SP_IDX: return p.x;
          default: return p.y;
        endcase
        FU_MUL: return (p.instr.spec == SP_FMUL) ? M'(prod >>> (M - 1)) : M'(prod);
        FU_IN:  return ch_seq[p.x[0]];
        default: return p.y;
      endcase
    endfunction

    function automatic ipkt_t new_pkt();
      ipkt_t p;
      p.instr = make_instr(KIND, 2'($urandom), 1'($urandom), Q'($urandom),
                           1'($urandom), Q'($urandom));
      p.x = (KIND == FU_IN || KIND == FU_OUT) ? M'($urandom_range(0, 1)) : M'($urandom);
      p.y = M'($urandom);
      return p;
    endfunction

    initial begin
      ch_seq[0] = 16'h1000; ch_seq[1] = 16'h2000;
      pkt = new_pkt();
    end

    always @(posedge clk) begin
      cyc <= cyc + 1;
      drive     <= free_run || ($urandom_range(0, 2) != 0);
      r_ready   <= free_run ? 2'b11 : 2'($urandom);
      ich_valid <= free_run ? 2'b11 : 2'($urandom);
      och_ready <= free_run ? 2'b11 : 2'($urandom);
      if (rst_n && in_valid && in_ready) begin
        logic [M-1:0] z;
        z = model(pkt);
        if (pkt.instr.d1v) begin expq[0].push_back({pkt.instr.d1, z}); tq[0].push_back(cyc); end
        if (pkt.instr.d2v) begin expq[1].push_back({pkt.instr.d2, z}); tq[1].push_back(cyc); end
        if (KIND == FU_OUT) outq.push_back(pkt.y);
        sent <= sent + 1;
        pkt  <= new_pkt();
      end
      for (int c = 0; c < NCH; c++)
        if (rst_n && ich_valid[c] && ich_ready[c]) ch_seq[c] <= ch_seq[c] + 1'b1;
      if (rst_n && |(och_valid & och_ready)) begin
        checks++;
        if (outq.size() == 0 || och_data !== outq[0] ||
            !(och_valid == (2'b01 << pkt.x[0]))) begin
          failures++; $display("FAIL output unit channel data %h", och_data);
        end
        if (outq.size() != 0) void'(outq.pop_front());
      end
      for (int d = 0; d < 2; d++)
        if (rst_n && r_valid[d] && r_ready[d]) begin
          checks++;
          if (expq[d].size() == 0 || {r_addr[d], r_value[d]} !== expq[d][0]) begin
            failures++;
            $display("FAIL kind %0d dest %0d: got %h:%h", k, d + 1, r_addr[d], r_value[d]);
          end else if (free_run && cyc - tq[d][0] != LAT) begin
            failures++;
            $display("FAIL kind %0d latency %0d", k, cyc - tq[d][0]);
          end
          if (expq[d].size() != 0) begin
            void'(expq[d].pop_front());
            void'(tq[d].pop_front());
          end
        end
    end

    initial begin
      wait (sent == NP && expq[0].size() == 0 && expq[1].size() == 0);
      done_cnt++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (60) @(posedge clk);
    free_run = 1'b0;
    wait (done_cnt == 4);
    repeat (10) @(posedge clk);
    checks++;
    if (g_fu[3].outq.size() != 0) begin failures++; $display("FAIL output samples missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
