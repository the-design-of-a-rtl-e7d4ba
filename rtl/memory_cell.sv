// memory_cell: one Memory Cell -- three Register Units (instruction, operand
// 1, operand 2) and the cell's control structure.
//
// The control structure queues execution requests arriving over the D link
// from the control network: each R request allows one execution of the
// instruction, and the final request RF marks the end of a run. The queue is an
// event pipeline (a counter) for the R requests plus a "final seen" flag; the
// document keeps the same sequence in a bit pipeline. RF is only taken once
// the earlier requests are queued, so the order is the same. For every queued request the cell waits until
// all three registers are ready (the document joins their enable signals with
// C-modules), then sends the instruction packet on its A[3] link: M bytes of
// three bits, byte i holding bit M-1-i of the instruction, operand 1 and
// operand 2 (most significant bit first). When the last byte is taken, every
// register is told the packet is gone; the cycle ends when all three report
// completion (a full variable must first be refilled). Once RF has been
// queued and every request before it has been executed, the cell raises done
// (D) and holds it until the network acknowledges (AD).
//
// A cell whose instruction register is idle is inactive: its requests are
// counted off without sending packets (the document runs "each instruction in
// an active (not idle) Memory Cell"). REQW sets the size of the request queue
// (own choice; the document gives no depth).
module memory_cell
  import dfp_pkg::*;
#(
  parameter int REQW = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  // command links C[0], one per register (0 instruction, 1 and 2 operands)
  input  logic [2:0] cmd_valid,
  input  reg_cmd_e   cmd [3],
  output logic [2:0] cmd_ack,
  // result links B[0,1], one per register
  input  logic [2:0] din_valid,
  input  logic [2:0] din_bit,
  input  logic [2:0] din_last,
  output logic [2:0] din_ready,
  // instruction packet link A[3] to the arbitration network
  output logic       pkt_valid,
  input  logic       pkt_ready,
  output logic [2:0] pkt_data,
  output logic       pkt_last,
  // D link from the control network
  input  logic       run_valid,
  input  logic       run_final,
  output logic       run_ready,
  output logic       done,
  input  logic       done_ack
);

  localparam int CW = $clog2(M);

  typedef enum logic [1:0] {S_WAIT, S_SEND, S_FIN} cell_state_e;
  typedef enum logic [1:0] {D_IDLE, D_SIG, D_LOW} done_state_e;

  cell_state_e   state;
  done_state_e   dstate;
  logic [REQW-1:0] pend;
  logic          final_pend;
  logic [CW-1:0] bcnt;

  logic [2:0] r_e, r_done, r_bit, r_idle;
  logic       cyc_req, pkt_shift, pkt_sent, cyc_end, take_req, q_ready;

  assign pkt_valid = (state == S_SEND);
  assign pkt_last  = (bcnt == CW'(M-1));
  assign pkt_data  = r_bit;
  assign pkt_shift = pkt_valid && pkt_ready;
  assign pkt_sent  = pkt_shift && pkt_last;
  assign cyc_end   = ((state == S_FIN) && (&r_done)) ||
                     ((state == S_WAIT) && cyc_req && r_idle[0]);
  assign run_ready = !final_pend && q_ready;
  assign take_req  = run_valid && run_ready && !run_final;
  assign done      = (dstate == D_SIG);

  // request queue: one event per R request, removed when its cycle ends
  event_pipeline #(.W(REQW)) u_req (
    .clk, .rst_n,
    .in_valid(take_req), .in_ready(q_ready),
    .out_valid(cyc_req), .out_ready(cyc_end),
    .count(pend)
  );

  for (genvar i = 0; i < 3; i++) begin : g_reg
    register_unit u_reg (
      .clk, .rst_n,
      .cmd_valid(cmd_valid[i]), .cmd(cmd[i]), .cmd_ack(cmd_ack[i]),
      .din_valid(din_valid[i]), .din_bit(din_bit[i]), .din_last(din_last[i]),
      .din_ready(din_ready[i]),
      .cyc_req, .cyc_e(r_e[i]), .cyc_done(r_done[i]),
      .pkt_shift, .pkt_sent, .cyc_end,
      .dout_bit(r_bit[2-i]), .is_idle(r_idle[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_WAIT;
      dstate     <= D_IDLE;
      final_pend <= 1'b0;
      bcnt       <= '0;
    end else begin
      if (run_valid && run_ready && run_final) final_pend <= 1'b1;

      unique case (state)
        S_WAIT: if (cyc_req && !r_idle[0] && (&r_e)) begin
          state <= S_SEND;
          bcnt  <= '0;
        end
        S_SEND: if (pkt_shift) begin
          bcnt <= bcnt + 1'b1;
          if (pkt_last) state <= S_FIN;
        end
        default: if (&r_done) state <= S_WAIT;  // S_FIN
      endcase

      // completion signalling (four-phase D / AD)
      unique case (dstate)
        D_IDLE: if (final_pend && pend == '0 && state == S_WAIT) dstate <= D_SIG;
        D_SIG:  if (done_ack) begin
          dstate     <= D_LOW;
          final_pend <= 1'b0;
        end
        default: if (!done_ack) dstate <= D_IDLE;
      endcase
    end
  end

  a_pkt_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (pkt_valid && !pkt_ready) |=> pkt_valid);

endmodule
