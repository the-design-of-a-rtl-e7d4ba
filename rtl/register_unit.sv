// register_unit: one Register Unit of a Memory Cell (instruction or operand).
//
// Holds one M-bit word. The unit is in one of three modes:
//   idle      - not used; it never holds up its cell and contributes zero bits;
//   constant  - the word is sent with every instruction packet and kept;
//   variable  - the word is sent once and must be replaced by a result packet
//               from the distribution network. A variable register is either
//               "full" or "empty" when the processor is quiescent. A full one
//               sends first and is refilled before its cycle ends; an empty one
//               waits to be filled, then sends, and ends its cycle empty.
// Values arrive bit-serially, most significant bit first, over a B[0,1] link
// (din_*); a value is only taken by an empty register in variable mode, so a
// result for a register that still holds its last value waits in the network.
// The word is read out one bit per pkt_shift, most significant bit first, as
// this register's share of the cell's A[3] instruction packet. The word is
// held in a bit pipeline, as in the document: filling pushes bits in, sending
// pops them out, and a constant puts each popped bit straight back in, so it
// still holds its word after every packet.
//
// Execution cycle (cell side): while cyc_req is high the unit raises cyc_e
// once it can be sent; pkt_sent marks the end of the packet transfer; cyc_done
// rises when the unit has finished its part of the cycle; cyc_end closes the
// cycle. Commands (C[0] link) are four-phase: cmd_ack rises when the command
// has been carried out (for the two enter commands, once the value has
// arrived) and falls after cmd_valid falls.
//
// Follows the document: the four modes, the empty/full distinction and its
// effect on the order of send and refill, the enter/empty/idle commands and
// the serial formats. Own choices: clocked logic with valid/ready in place of
// the speed-independent modules, MSB-first bit order, and "empty" making the
// register an active variable (as stated for the empty command in Part I).
module register_unit
  import dfp_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // command link C[0]
  input  logic     cmd_valid,
  input  reg_cmd_e cmd,
  output logic     cmd_ack,
  // result value from the distribution network, B[0,1]
  input  logic     din_valid,
  input  logic     din_bit,
  input  logic     din_last,
  output logic     din_ready,
  // cell control structure
  input  logic     cyc_req,
  output logic     cyc_e,
  output logic     cyc_done,
  input  logic     pkt_shift,
  input  logic     pkt_sent,
  input  logic     cyc_end,
  output logic     dout_bit,
  output logic     is_idle
);

  localparam int CW = $clog2(M);

  typedef enum logic [1:0] {CS_READY, CS_FILL, CS_ACK} cmd_state_e;

  logic [CW-1:0] fill_cnt;
  logic          full, q_full, sent;
  logic          bp_clear, bp_in_valid, bp_in_ready, bp_in_bit;
  logic          bp_out_valid, bp_out_bit;
  logic [$clog2(M+1)-1:0] bp_count;
  reg_mode_e     mode, pend_mode;
  cmd_state_e    cstate;

  assign is_idle   = (mode == MODE_IDLE);
  assign din_ready = (mode == MODE_VAR) && !full;
  assign dout_bit  = is_idle ? 1'b0 : bp_out_bit;
  assign cmd_ack   = (cstate == CS_ACK);

  assign cyc_e    = cyc_req && !sent && (mode != MODE_VAR || full);
  assign cyc_done = cyc_req && (is_idle ||
                                (sent && (mode == MODE_CON || !q_full || full)));

  // The word lives in a bit pipeline. Filling pushes the arriving bits; each
  // packet byte pops one bit, and a constant pushes the same bit back, so
  // after a packet it holds its word again. Enter and empty commands clear it.
  assign bp_clear    = (cstate == CS_READY) && cmd_valid && (cmd != CMD_IDLE);
  assign bp_in_valid = (din_valid && din_ready) || (pkt_shift && mode == MODE_CON);
  assign bp_in_bit   = (mode == MODE_CON) ? bp_out_bit : din_bit;

  bit_pipeline #(.N(M)) u_bp (
    .clk, .rst_n, .clear(bp_clear),
    .in_valid(bp_in_valid), .in_ready(bp_in_ready), .in_bit(bp_in_bit),
    .out_valid(bp_out_valid), .out_ready(pkt_shift && !is_idle), .out_bit(bp_out_bit),
    .count(bp_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_cnt  <= '0;
      full      <= 1'b0;
      q_full    <= 1'b0;
      sent      <= 1'b0;
      mode      <= MODE_IDLE;
      pend_mode <= MODE_IDLE;
      cstate    <= CS_READY;
    end else begin
      // serial fill from the distribution network
      if (din_valid && din_ready) begin
        if (din_last) begin
          full     <= 1'b1;
          fill_cnt <= '0;
        end else begin
          fill_cnt <= fill_cnt + 1'b1;
        end
      end
      // serial read-out into the instruction packet
      if (pkt_sent) begin
        sent    <= 1'b1;
        if (mode == MODE_VAR) full <= 1'b0;
      end
      if (cyc_end) sent <= 1'b0;

      // commands
      unique case (cstate)
        CS_READY: if (cmd_valid) begin
          unique case (cmd)
            CMD_ENTER_CON, CMD_ENTER_VAR: begin
              full      <= 1'b0;
              fill_cnt  <= '0;
              mode      <= MODE_VAR;
              pend_mode <= (cmd == CMD_ENTER_CON) ? MODE_CON : MODE_VAR;
              cstate    <= CS_FILL;
            end
            CMD_EMPTY: begin
              full     <= 1'b0;
              fill_cnt <= '0;
              q_full   <= 1'b0;
              mode     <= MODE_VAR;
              cstate   <= CS_ACK;
            end
            default: begin  // CMD_IDLE
              mode   <= MODE_IDLE;
              cstate <= CS_ACK;
            end
          endcase
        end
        CS_FILL: if (full) begin
          mode   <= pend_mode;
          q_full <= 1'b1;
          cstate <= CS_ACK;
        end
        default: if (!cmd_valid) cstate <= CS_READY;  // CS_ACK
      endcase
    end
  end

  // the pipeline never overflows or runs dry, and a value fills it exactly
  a_bp_room: assert property (@(posedge clk) disable iff (!rst_n)
    bp_in_valid |-> bp_in_ready);
  a_bp_data: assert property (@(posedge clk) disable iff (!rst_n)
    (pkt_shift && !is_idle) |-> bp_out_valid);
  a_bp_word: assert property (@(posedge clk) disable iff (!rst_n)
    (din_valid && din_ready && din_last) |-> (int'(bp_count) == M - 1));

  // a value arriving on the serial link has exactly M bits
  a_value_length: assert property (@(posedge clk) disable iff (!rst_n)
    (din_valid && din_ready && din_last) |-> (fill_cnt == CW'(M-1)));

endmodule
