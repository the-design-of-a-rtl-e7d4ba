// register_select_unit: Register Select Unit of the command network.
//
// Passes a command packet arriving on a C[H] link to one of two C[H-1] links
// according to the most significant address bit, which is removed; the
// acknowledge of the chosen output is returned on the input. The unit holds
// no state: command, address and request stay steady on the input until the
// four-phase transaction has finished, so steering is purely combinational,
// like the document's multiple data switches. For H = 1 the outgoing address
// is a single unused bit, tied to zero.
module register_select_unit
  import dfp_pkg::*;
#(
  parameter  int H  = Q,
  localparam int HO = (H > 1) ? H - 1 : 1
) (
  input  logic          in_valid,
  input  reg_cmd_e      in_cmd,
  input  logic [H-1:0]  in_addr,
  output logic          in_ack,
  output logic [1:0]    out_valid,
  output reg_cmd_e      out_cmd,
  output logic [HO-1:0] out_addr,
  input  logic [1:0]    out_ack
);

  logic dir;

  assign dir       = in_addr[H-1];
  assign out_valid = {in_valid && dir, in_valid && !dir};
  assign out_cmd   = in_cmd;
  assign out_addr  = (H > 1) ? HO'(in_addr) : '0;
  assign in_ack    = out_ack[dir];

endmodule
