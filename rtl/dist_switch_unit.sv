// dist_switch_unit: Switch Unit of the distribution network.
//
// Takes a result packet on a B[H,M] link (H address bits, parallel value),
// steers it to output 0 or 1 by the most significant address bit, and passes
// on the remaining H-1 address bits: the tested bit is deleted, as in the
// document. The unit holds one packet in a register stage: a packet is taken
// when the stage is empty or is being emptied in the same cycle, so a blocked
// output holds only this unit's packet. For H = 1 the outgoing address is a
// single unused bit (tied to zero). The register stage is this design's own
// choice; the document's unit passes value bits through under a gate module.
module dist_switch_unit
  import dfp_pkg::*;
#(
  parameter  int H  = Q,
  localparam int HO = (H > 1) ? H - 1 : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [H-1:0]  in_addr,
  input  logic [M-1:0]  in_value,
  output logic [1:0]    out_valid,
  input  logic [1:0]    out_ready,
  output logic [HO-1:0] out_addr,
  output logic [M-1:0]  out_value
);

  logic          full, dir;
  logic [HO-1:0] addr_q;
  logic [M-1:0]  value_q;
  logic          drain;

  assign drain     = full && out_ready[dir];
  assign in_ready  = !full || drain;
  assign out_valid = {full && dir, full && !dir};
  assign out_addr  = addr_q;
  assign out_value = value_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full    <= 1'b0;
      dir     <= 1'b0;
      addr_q  <= '0;
      value_q <= '0;
    end else if (in_valid && in_ready) begin
      full    <= 1'b1;
      dir     <= in_addr[H-1];
      addr_q  <= (H > 1) ? HO'(in_addr) : '0;
      value_q <= in_value;
    end else if (drain) begin
      full <= 1'b0;
    end
  end

endmodule
