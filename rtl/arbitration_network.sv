// arbitration_network: carries instruction packets from every Memory Cell to
// every Functional Unit, following the improved arbitration network figure:
//
//   cells --A[3]--> rank-1 arb (2 cells each) --> s/p + buffer --A[3M]-->
//   rank-2 arb (2 buffers each) --> function switch (4 ways) -->
//   rank-3 arb (one per functional unit, one input per switch) --> FU
//
// With the default eight cells there are four rank-1 units, four converters,
// two rank-2 units, two function switches and four rank-3 units. Every unit
// has fan-in two, as the document assumes for its description; NC must be a
// multiple of four. Input links are serial A[3]; output links are parallel
// A[3M], one byte per packet. There is exactly one path from each cell to each
// functional unit.
module arbitration_network
  import dfp_pkg::*;
#(
  parameter int NC = N_CELLS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NC-1:0]     in_valid,
  output logic [NC-1:0]     in_ready,
  input  logic [2:0]        in_data [NC],
  input  logic [NC-1:0]     in_last,
  output logic [NFU-1:0]    fu_valid,
  input  logic [NFU-1:0]    fu_ready,
  output logic [IPKT_W-1:0] fu_data [NFU]
);

  localparam int R1 = NC / 2;   // rank-1 arbitration units and converters
  localparam int R2 = R1 / 2;   // rank-2 arbitration units and switches

  // rank 1 -> converters
  logic [R1-1:0]      a1_valid, a1_ready, a1_last;
  logic [2:0]         a1_data [R1];
  // converters -> rank 2
  logic [R1-1:0]      c_valid, c_ready, c_last;
  logic [IPKT_W-1:0]  c_data [R1];
  // rank 2 -> switches
  logic [R2-1:0]      a2_valid, a2_ready, a2_last;
  logic [IPKT_W-1:0]  a2_data [R2];
  // switches -> rank 3
  logic [NFU-1:0]     s_valid [R2];
  logic [NFU-1:0]     s_ready [R2];
  logic [IPKT_W-1:0]  s_data [R2];
  logic [R2-1:0]      s_last;

  for (genvar g = 0; g < R1; g++) begin : g_r1
    logic [2:0] d [2];
    assign d[0] = in_data[2*g];
    assign d[1] = in_data[2*g+1];
    arb_unit #(.NIN(2), .K(3)) u_arb (
      .clk, .rst_n,
      .in_valid(in_valid[2*g +: 2]), .in_ready(in_ready[2*g +: 2]), .in_data(d),
      .in_last(in_last[2*g +: 2]),
      .out_valid(a1_valid[g]), .out_ready(a1_ready[g]), .out_data(a1_data[g]),
      .out_last(a1_last[g])
    );
    sp_buffer_unit u_sp (
      .clk, .rst_n,
      .in_valid(a1_valid[g]), .in_ready(a1_ready[g]), .in_data(a1_data[g]),
      .in_last(a1_last[g]),
      .out_valid(c_valid[g]), .out_ready(c_ready[g]), .out_data(c_data[g]),
      .out_last(c_last[g])
    );
  end

  for (genvar g = 0; g < R2; g++) begin : g_r2
    logic [IPKT_W-1:0] d [2];
    assign d[0] = c_data[2*g];
    assign d[1] = c_data[2*g+1];
    arb_unit #(.NIN(2), .K(IPKT_W)) u_arb (
      .clk, .rst_n,
      .in_valid(c_valid[2*g +: 2]), .in_ready(c_ready[2*g +: 2]), .in_data(d),
      .in_last(c_last[2*g +: 2]),
      .out_valid(a2_valid[g]), .out_ready(a2_ready[g]), .out_data(a2_data[g]),
      .out_last(a2_last[g])
    );
    function_switch_unit #(.NOUT(NFU), .K(IPKT_W), .FSEL(2)) u_sw (
      .clk, .rst_n,
      .in_valid(a2_valid[g]), .in_ready(a2_ready[g]), .in_data(a2_data[g]),
      .in_last(a2_last[g]),
      .out_valid(s_valid[g]), .out_ready(s_ready[g]), .out_data(s_data[g]),
      .out_last(s_last[g])
    );
  end

  for (genvar f = 0; f < NFU; f++) begin : g_r3
    logic [R2-1:0]     v, r;
    logic [IPKT_W-1:0] d [R2];
    logic              unused_last;
    for (genvar g = 0; g < R2; g++) begin : g_in
      assign v[g]          = s_valid[g][f];
      assign s_ready[g][f] = r[g];
      assign d[g]          = s_data[g];
    end
    arb_unit #(.NIN(R2), .K(IPKT_W)) u_arb (
      .clk, .rst_n,
      .in_valid(v), .in_ready(r), .in_data(d), .in_last(s_last),
      .out_valid(fu_valid[f]), .out_ready(fu_ready[f]), .out_data(fu_data[f]),
      .out_last(unused_last)
    );
  end

endmodule
