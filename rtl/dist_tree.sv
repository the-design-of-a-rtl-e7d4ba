// dist_tree: the switching part of one half of the distribution network: a
// binary tree of Switch Units on an H-bit address, most significant bit
// first. Each switch deletes the bit it tested, so a switch at depth d sees
// H-d address bits. Below the last rank each leaf is a Buffer and
// Parallel/Serial Conversion Unit driving the serial B[0,1] link of one
// Register Unit; leaf j of the 2**H outputs serves local address j.
// Nodes are numbered heap-wise: node k feeds nodes 2k+1 and 2k+2, and the
// numbers from 2**H-1 upward are the leaves.
module dist_tree
  import dfp_pkg::*;
#(
  parameter int H = Q - 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [H-1:0]      in_addr,
  input  logic [M-1:0]      in_value,
  output logic [2**H-1:0]   out_valid,
  input  logic [2**H-1:0]   out_ready,
  output logic [2**H-1:0]   out_bit,
  output logic [2**H-1:0]   out_last
);

  localparam int NSW  = 2**H - 1;       // switch units
  localparam int NLNK = 2**(H+1) - 1;   // links: root input, then every switch output

  logic [NLNK-1:0] lv, lr;
  logic [H-1:0]    la [NLNK];
  logic [M-1:0]    lval [NLNK];

  assign lv[0]    = in_valid;
  assign in_ready = lr[0];
  assign la[0]    = in_addr;
  assign lval[0]  = in_value;

  for (genvar k = 0; k < NSW; k++) begin : g_sw
    localparam int HS = H - ($clog2(k + 2) - 1);   // address bits left here
    localparam int HO = (HS > 1) ? HS - 1 : 1;
    logic [HO-1:0] oa;
    dist_switch_unit #(.H(HS)) u_sw (
      .clk, .rst_n,
      .in_valid(lv[k]), .in_ready(lr[k]), .in_addr(la[k][HS-1:0]), .in_value(lval[k]),
      .out_valid(lv[2*k+1 +: 2]), .out_ready(lr[2*k+1 +: 2]),
      .out_addr(oa), .out_value(lval[2*k+1])
    );
    assign lval[2*k+2] = lval[2*k+1];
    assign la[2*k+1]   = H'(oa);
    assign la[2*k+2]   = H'(oa);
  end

  for (genvar j = 0; j < 2**H; j++) begin : g_leaf
    logic [H-1:0] unused_addr;
    assign unused_addr = la[NSW + j];
    ps_buffer_unit u_ps (
      .clk, .rst_n,
      .in_valid(lv[NSW + j]), .in_ready(lr[NSW + j]), .in_value(lval[NSW + j]),
      .out_valid(out_valid[j]), .out_ready(out_ready[j]),
      .out_bit(out_bit[j]), .out_last(out_last[j])
    );
  end

endmodule
