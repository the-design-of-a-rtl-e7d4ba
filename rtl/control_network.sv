// control_network: the Control Network, a binary tree of Run Enable Units
// carrying execution requests from the execution counter to every Memory Cell
// and their completion signals back. NC must be a power of two. Nodes are
// numbered heap-wise: node k feeds links 2k+1 and 2k+2, and links from NC-1
// upward go to the cells.
module control_network
  import dfp_pkg::*;
#(
  parameter int NC = N_CELLS,
  parameter int W  = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_final,
  output logic          in_ready,
  output logic          done_out,
  input  logic          done_ack_in,
  output logic [NC-1:0] out_valid,
  output logic [NC-1:0] out_final,
  input  logic [NC-1:0] out_ready,
  input  logic [NC-1:0] done_in,
  output logic [NC-1:0] done_ack_out
);

  localparam int NU   = NC - 1;
  localparam int NLNK = 2 * NC - 1;

  logic [NLNK-1:0] lv, lf, lr, ld, la;

  assign lv[0]    = in_valid;
  assign lf[0]    = in_final;
  assign in_ready = lr[0];
  assign done_out = ld[0];
  assign la[0]    = done_ack_in;

  for (genvar k = 0; k < NU; k++) begin : g_unit
    run_enable_unit #(.W(W)) u_ren (
      .clk, .rst_n,
      .in_valid(lv[k]), .in_final(lf[k]), .in_ready(lr[k]),
      .done_out(ld[k]), .done_ack_in(la[k]),
      .out_valid(lv[2*k+1 +: 2]), .out_final(lf[2*k+1 +: 2]), .out_ready(lr[2*k+1 +: 2]),
      .done_in(ld[2*k+1 +: 2]), .done_ack_out(la[2*k+1 +: 2])
    );
  end

  assign out_valid              = lv[NU +: NC];
  assign out_final              = lf[NU +: NC];
  assign lr[NU +: NC]           = out_ready;
  assign ld[NU +: NC]           = done_in;
  assign done_ack_out           = la[NU +: NC];

  initial assert ((NC & (NC - 1)) == 0) else $error("NC must be a power of two");

endmodule
