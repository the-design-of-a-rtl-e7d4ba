// distribution_network: carries result packets from the functional units and
// the controller to every Register Unit.
//
// Structure (own arrangement; the document shows a tree of switch units with a
// few arbitration units after the first rank so that packets for different
// destinations can enter concurrently and share the second-rank switches):
//   - every source link (two per functional unit, one from the controller)
//     enters its own Switch Unit, which tests the top address bit;
//   - for each half of the address space one Arbitration Unit merges the
//     NSRC packets headed there;
//   - a tree of Switch Units on the remaining Q-1 bits follows, each deleting
//     its bit, and ends in one Buffer and Parallel/Serial Conversion Unit per
//     register (B[0,1] serial link).
// Leaves whose address is at or above NR (no such register) accept and drop
// what reaches them. Source links are B[Q,M]; packets to one register arrive
// in the order they leave the half's arbitration unit.
module distribution_network
  import dfp_pkg::*;
#(
  parameter int NSRC = 2 * NFU + 1,
  parameter int NR   = N_REGS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NSRC-1:0] in_valid,
  output logic [NSRC-1:0] in_ready,
  input  logic [Q-1:0]    in_addr [NSRC],
  input  logic [M-1:0]    in_value [NSRC],
  output logic [NR-1:0]   out_valid,
  input  logic [NR-1:0]   out_ready,
  output logic [NR-1:0]   out_bit,
  output logic [NR-1:0]   out_last
);

  localparam int KH   = Q - 1 + M;   // packet width inside a half
  localparam int HALF = 2**(Q-1);

  logic [1:0]      s_valid [NSRC];
  logic [1:0]      s_ready [NSRC];
  logic [Q-2:0]    s_addr  [NSRC];
  logic [M-1:0]    s_value [NSRC];

  logic [2**Q-1:0] l_valid, l_ready, l_bit, l_last;

  for (genvar i = 0; i < NSRC; i++) begin : g_src
    dist_switch_unit #(.H(Q)) u_sw (
      .clk, .rst_n,
      .in_valid(in_valid[i]), .in_ready(in_ready[i]),
      .in_addr(in_addr[i]), .in_value(in_value[i]),
      .out_valid(s_valid[i]), .out_ready(s_ready[i]),
      .out_addr(s_addr[i]), .out_value(s_value[i])
    );
  end

  for (genvar h = 0; h < 2; h++) begin : g_half
    logic [NSRC-1:0] v, r;
    logic [KH-1:0]   d [NSRC];
    logic            a_valid, a_ready, a_last;
    logic [KH-1:0]   a_data;
    for (genvar i = 0; i < NSRC; i++) begin : g_in
      assign v[i]          = s_valid[i][h];
      assign s_ready[i][h] = r[i];
      assign d[i]          = {s_addr[i], s_value[i]};
    end
    arb_unit #(.NIN(NSRC), .K(KH)) u_arb (
      .clk, .rst_n,
      .in_valid(v), .in_ready(r), .in_data(d), .in_last('1),
      .out_valid(a_valid), .out_ready(a_ready), .out_data(a_data), .out_last(a_last)
    );
    dist_tree #(.H(Q-1)) u_tree (
      .clk, .rst_n,
      .in_valid(a_valid), .in_ready(a_ready),
      .in_addr(a_data[KH-1 -: Q-1]), .in_value(a_data[M-1:0]),
      .out_valid(l_valid[h*HALF +: HALF]), .out_ready(l_ready[h*HALF +: HALF]),
      .out_bit(l_bit[h*HALF +: HALF]), .out_last(l_last[h*HALF +: HALF])
    );
  end

  for (genvar j = 0; j < 2**Q; j++) begin : g_leaf
    if (j < NR) begin : g_reg
      assign out_valid[j] = l_valid[j];
      assign out_bit[j]   = l_bit[j];
      assign out_last[j]  = l_last[j];
      assign l_ready[j]   = out_ready[j];
    end else begin : g_none
      assign l_ready[j] = 1'b1;
    end
  end

endmodule
