// sp_buffer_unit: Serial-to-Parallel Conversion and Buffer Unit of the
// arbitration network.
//
// Takes an instruction packet arriving as M three-bit bytes on an A[3] link
// (byte i = bit M-1-i of instruction, operand 1, operand 2) and shifts each
// bit into one of three M-bit shift registers, one per register of the cell.
// When the byte marked last has been taken the whole packet is held in the
// buffer and offered on the A[3M] output link as a single byte (last = 1). The
// input is not accepted again until the buffer has been emptied, so a packet
// only engages the following arbitration unit once it is complete -- the
// reason the document gives for the buffer. Conversion in one stage
// (b = m) is this design's choice; the document allows several stages.
module sp_buffer_unit
  import dfp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [2:0]        in_data,
  input  logic              in_last,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [IPKT_W-1:0] out_data,
  output logic              out_last
);

  localparam int CW = $clog2(M);

  logic [M-1:0]  sh_i, sh_x, sh_y;
  logic          full;
  logic [CW-1:0] cnt;

  assign in_ready  = !full;
  assign out_valid = full;
  assign out_data  = {sh_i, sh_x, sh_y};
  assign out_last  = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_i <= '0;
      sh_x <= '0;
      sh_y <= '0;
      full <= 1'b0;
      cnt  <= '0;
    end else begin
      if (in_valid && in_ready) begin
        sh_i <= {sh_i[M-2:0], in_data[2]};
        sh_x <= {sh_x[M-2:0], in_data[1]};
        sh_y <= {sh_y[M-2:0], in_data[0]};
        cnt  <= in_last ? '0 : cnt + 1'b1;
        if (in_last) full <= 1'b1;
      end
      if (out_valid && out_ready) full <= 1'b0;
    end
  end

  a_packet_length: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_ready && in_last) |-> (cnt == CW'(M-1)));

endmodule
