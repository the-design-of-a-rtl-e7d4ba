// command_network: the Command Network, a binary tree of Register Select Units
// decoding one address bit per level, most significant first, from the
// controller's C[Q] link down to a C[0] link at every Register Unit. Nodes are
// numbered heap-wise (node k feeds 2k+1 and 2k+2; numbers from 2**Q-1 upward
// are leaves). Leaves at addresses NR and above have no register; a command
// sent there is acknowledged at once so the controller cannot hang.
module command_network
  import dfp_pkg::*;
#(
  parameter int NR = N_REGS
) (
  input  logic          in_valid,
  input  reg_cmd_e      in_cmd,
  input  logic [Q-1:0]  in_addr,
  output logic          in_ack,
  output logic [NR-1:0] out_valid,
  output reg_cmd_e      out_cmd [NR],
  input  logic [NR-1:0] out_ack
);

  localparam int NSEL = 2**Q - 1;
  localparam int NLNK = 2**(Q+1) - 1;

  logic [NLNK-1:0] lv, lk;
  reg_cmd_e        lc [NLNK];
  logic [Q-1:0]    la [NLNK];

  assign lv[0]  = in_valid;
  assign lc[0]  = in_cmd;
  assign la[0]  = in_addr;
  assign in_ack = lk[0];

  for (genvar k = 0; k < NSEL; k++) begin : g_sel
    localparam int HS = Q - ($clog2(k + 2) - 1);
    localparam int HO = (HS > 1) ? HS - 1 : 1;
    logic [HO-1:0] oa;
    reg_cmd_e      oc;
    register_select_unit #(.H(HS)) u_sel (
      .in_valid(lv[k]), .in_cmd(lc[k]), .in_addr(la[k][HS-1:0]), .in_ack(lk[k]),
      .out_valid(lv[2*k+1 +: 2]), .out_cmd(oc), .out_addr(oa), .out_ack(lk[2*k+1 +: 2])
    );
    assign lc[2*k+1] = oc;
    assign lc[2*k+2] = oc;
    assign la[2*k+1] = Q'(oa);
    assign la[2*k+2] = Q'(oa);
  end

  for (genvar j = 0; j < 2**Q; j++) begin : g_leaf
    logic [Q-1:0] unused_addr;
    assign unused_addr = la[NSEL + j];
    if (j < NR) begin : g_reg
      assign out_valid[j]  = lv[NSEL + j];
      assign out_cmd[j]    = lc[NSEL + j];
      assign lk[NSEL + j]  = out_ack[j];
    end else begin : g_none
      reg_cmd_e unused_cmd;
      assign unused_cmd   = lc[NSEL + j];
      assign lk[NSEL + j] = lv[NSEL + j];
    end
  end

endmodule
