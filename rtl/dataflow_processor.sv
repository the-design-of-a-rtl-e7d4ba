// dataflow_processor: a data-flow processor for signal-processing programs.
//
// The program is held in Memory Cells, one per operator. A cell whose
// instruction and operands are all present (and which has an execution request
// from the controller) sends them as an instruction packet through the
// arbitration network to the functional unit its opcode names. The unit
// computes the result and sends one result packet per destination address
// through the distribution network to the operand registers of other cells.
// No processor fetches instructions: an instruction runs when its data are
// there, so every enabled cell works in parallel and the packet networks only
// need throughput, not low latency.
//
// Sections and links (all in this module):
//   memory_section        N_CELLS cells x 3 Register Units
//   arbitration_network   cells --A[3] serial--> ... --A[3M]--> 4 units
//   functional_unit x 4   0 add/sub/identity, 1 multiply, 2 input, 3 output
//   distribution_network  9 sources (2 per unit + controller) --> 3*N_CELLS
//                         registers, B[Q,M] in, B[0,1] serial out
//   controller            host commands: enter-constant, enter-variable,
//                         empty, idle, run
//   command_network       controller --C[Q]--> each register
//   control_network       controller --D--> each cell (R/RF, done)
// Host port: host_valid/host_cmd/host_addr/host_value are held until
// host_ready pulses, which happens when the command is complete (for run v:
// when every active cell has executed v times). Input channels feed the input
// unit, output channels are driven by the output unit; both are valid/ready.
//
// Caution for multi-cycle runs: a result is only taken by a register once it
// has been emptied, so results wait inside the distribution network. A cell
// that does not wait for any variable (for example an input cell whose
// operands are constants) can run several cycles ahead of its consumers, and
// its surplus results can then occupy shared switches on the path other
// results need: the run never completes. As in the architecture it follows,
// nothing in the hardware prevents this; the program must bound run-ahead,
// for instance by feeding a token back into a variable register of the
// leading cell (see the end-to-end testbench).
//
// Follows the document: the seven sections, their link types and the packet
// formats. Own choices: one clock with valid/ready handshakes, the host port
// encoding, the assignment of the four functional units, and the
// distribution network's arrangement (see that module).
module dataflow_processor
  import dfp_pkg::*;
#(
  parameter int FU_LAT = 3,
  parameter int REQW   = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  // host command port
  input  logic           host_valid,
  output logic           host_ready,
  input  host_cmd_e      host_cmd,
  input  logic [Q-1:0]   host_addr,
  input  logic [M-1:0]   host_value,
  // input channels (signal samples in)
  input  logic [NCH-1:0] in_valid,
  output logic [NCH-1:0] in_ready,
  input  logic [M-1:0]   in_data [NCH],
  // output channels (signal samples out)
  output logic [NCH-1:0] out_valid,
  input  logic [NCH-1:0] out_ready,
  output logic [M-1:0]   out_data
);

  localparam int NSRC = 2 * NFU + 1;

  // command network <-> registers
  logic [N_REGS-1:0] rc_valid, rc_ack;
  reg_cmd_e          rc_cmd [N_REGS];
  // distribution network <-> registers
  logic [N_REGS-1:0] rd_valid, rd_ready, rd_bit, rd_last;
  // cells <-> arbitration network
  logic [N_CELLS-1:0] ip_valid, ip_ready, ip_last;
  logic [2:0]         ip_data [N_CELLS];
  // control network <-> cells
  logic [N_CELLS-1:0] cr_valid, cr_final, cr_ready, cd_done, cd_ack;
  // arbitration network <-> functional units
  logic [NFU-1:0]     fi_valid, fi_ready;
  logic [IPKT_W-1:0]  fi_data [NFU];
  // result packets into the distribution network
  logic [NSRC-1:0]    rp_valid, rp_ready;
  logic [Q-1:0]       rp_addr [NSRC];
  logic [M-1:0]       rp_value [NSRC];
  // controller <-> command and control networks
  logic               cc_valid, cc_ack;
  reg_cmd_e           cc_cmd;
  logic [Q-1:0]       cc_addr;
  logic               xr_valid, xr_final, xr_ready, xd_done, xd_ack;

  memory_section #(.NC(N_CELLS), .REQW(REQW)) u_mem (
    .clk, .rst_n,
    .cmd_valid(rc_valid), .cmd(rc_cmd), .cmd_ack(rc_ack),
    .din_valid(rd_valid), .din_bit(rd_bit), .din_last(rd_last), .din_ready(rd_ready),
    .pkt_valid(ip_valid), .pkt_ready(ip_ready), .pkt_data(ip_data), .pkt_last(ip_last),
    .run_valid(cr_valid), .run_final(cr_final), .run_ready(cr_ready),
    .done(cd_done), .done_ack(cd_ack)
  );

  arbitration_network #(.NC(N_CELLS)) u_arbnet (
    .clk, .rst_n,
    .in_valid(ip_valid), .in_ready(ip_ready), .in_data(ip_data), .in_last(ip_last),
    .fu_valid(fi_valid), .fu_ready(fi_ready), .fu_data(fi_data)
  );

  for (genvar f = 0; f < NFU; f++) begin : g_fu
    logic [NCH-1:0] ich_valid, ich_ready, och_valid, och_ready;
    logic [M-1:0]   ich_data [NCH];
    logic [M-1:0]   och_data;
    logic [Q-1:0]   ra [2];
    logic [M-1:0]   rv [2];

    if (f == int'(FU_IN)) begin : g_in
      assign ich_valid = in_valid;
      assign ich_data  = in_data;
      assign in_ready  = ich_ready;
    end else begin : g_noin
      assign ich_valid = '0;
      for (genvar c = 0; c < NCH; c++) begin : g_z
        assign ich_data[c] = '0;
      end
    end
    if (f == int'(FU_OUT)) begin : g_out
      assign out_valid = och_valid;
      assign out_data  = och_data;
      assign och_ready = out_ready;
    end else begin : g_noout
      assign och_ready = '0;
    end

    functional_unit #(.KIND(2'(f)), .LAT(FU_LAT)) u_fu (
      .clk, .rst_n,
      .in_valid(fi_valid[f]), .in_ready(fi_ready[f]), .in_data(fi_data[f]),
      .ich_valid, .ich_ready, .ich_data,
      .och_valid, .och_ready, .och_data,
      .r_valid(rp_valid[2*f +: 2]), .r_ready(rp_ready[2*f +: 2]),
      .r_addr(ra), .r_value(rv)
    );
    assign rp_addr[2*f]    = ra[0];
    assign rp_addr[2*f+1]  = ra[1];
    assign rp_value[2*f]   = rv[0];
    assign rp_value[2*f+1] = rv[1];
  end

  distribution_network #(.NSRC(NSRC), .NR(N_REGS)) u_distnet (
    .clk, .rst_n,
    .in_valid(rp_valid), .in_ready(rp_ready), .in_addr(rp_addr), .in_value(rp_value),
    .out_valid(rd_valid), .out_ready(rd_ready), .out_bit(rd_bit), .out_last(rd_last)
  );

  controller u_ctrl (
    .clk, .rst_n,
    .host_valid, .host_ready, .host_cmd, .host_addr, .host_value,
    .rp_valid(rp_valid[NSRC-1]), .rp_ready(rp_ready[NSRC-1]),
    .rp_addr(rp_addr[NSRC-1]), .rp_value(rp_value[NSRC-1]),
    .c_valid(cc_valid), .c_cmd(cc_cmd), .c_addr(cc_addr), .c_ack(cc_ack),
    .req_valid(xr_valid), .req_final(xr_final), .req_ready(xr_ready),
    .done_in(xd_done), .done_ack(xd_ack)
  );

  command_network #(.NR(N_REGS)) u_cmdnet (
    .in_valid(cc_valid), .in_cmd(cc_cmd), .in_addr(cc_addr), .in_ack(cc_ack),
    .out_valid(rc_valid), .out_cmd(rc_cmd), .out_ack(rc_ack)
  );

  control_network #(.NC(N_CELLS), .W(REQW)) u_ctlnet (
    .clk, .rst_n,
    .in_valid(xr_valid), .in_final(xr_final), .in_ready(xr_ready),
    .done_out(xd_done), .done_ack_in(xd_ack),
    .out_valid(cr_valid), .out_final(cr_final), .out_ready(cr_ready),
    .done_in(cd_done), .done_ack_out(cd_ack)
  );

endmodule
