// dfp_pkg: sizes, instruction format and link encodings shared by every unit
// of the data-flow signal processor.
//
// The machine keeps its program in Memory Cells. Each cell has three Register
// Units: an instruction and two operands. An instruction word has the layout
// of the instruction-format figure: a two-bit functional-unit field, a
// "specialized function" field and two destination register addresses. The
// document leaves the word width m, the address width q and the width of the
// specialized-function field open. This design uses m = 16, q = 5 (enough for
// the 3 x 8 = 24 registers of the eight-cell example program) and a two-bit
// function field. Each destination has its own valid bit, standing in for the
// "dash" that marks an unused destination.
//
// Link types of the document, as realized here (one clock, valid/ready):
//   A[k]   instruction packet as a sequence of k-bit bytes, valid/ready/last
//   B[h,k] result packet: h address bits + value, valid/ready (parallel),
//          or at a register (B[0,1]) a bit-serial value with a last flag
//   C[k]   command packet: address + one of four commands, four-phase
//          req/ack (ack returned when the register has carried it out)
//   D      execution requests R / final request RF (valid/ready), and the
//          completion signal D with its acknowledge AD (four-phase)
package dfp_pkg;

  localparam int M        = 16;            // register word width (m)
  localparam int N_CELLS  = 8;             // memory cells (n)
  localparam int N_REGS   = 3 * N_CELLS;   // register units (3n)
  localparam int Q        = 5;             // register address width (q)
  localparam int NFU      = 4;             // functional units
  localparam int NCH      = 2;             // input / output channels
  localparam int IPKT_W   = 3 * M;         // parallel instruction packet, A[3m]

  // functional-unit numbers (field "functional unit" of the opcode)
  localparam logic [1:0] FU_ADD = 2'd0;    // add / subtract / identity
  localparam logic [1:0] FU_MUL = 2'd1;    // multiply
  localparam logic [1:0] FU_IN  = 2'd2;    // input operator
  localparam logic [1:0] FU_OUT = 2'd3;    // output operator

  // specialized-function codes
  localparam logic [1:0] SP_ADD   = 2'd0;  // FU_ADD: x + y
  localparam logic [1:0] SP_SUB   = 2'd1;  // FU_ADD: x - y
  localparam logic [1:0] SP_IDX   = 2'd2;  // FU_ADD: x
  localparam logic [1:0] SP_IDY   = 2'd3;  // FU_ADD: y
  localparam logic [1:0] SP_MUL   = 2'd0;  // FU_MUL: low m bits of x*y
  localparam logic [1:0] SP_FMUL  = 2'd1;  // FU_MUL: signed fraction (x*y) >>> (m-1)

  typedef struct packed {
    logic [1:0]   fu;     // functional unit
    logic [1:0]   spec;   // specialized function
    logic         d1v;    // destination 1 present
    logic [Q-1:0] d1;     // destination 1 register address
    logic         d2v;    // destination 2 present
    logic [Q-1:0] d2;     // destination 2 register address
  } instr_t;

  typedef struct packed {
    instr_t       instr;
    logic [M-1:0] x;      // operand register 1
    logic [M-1:0] y;      // operand register 2
  } ipkt_t;

  // register modes set by commands
  typedef enum logic [1:0] {
    MODE_IDLE = 2'd0,
    MODE_CON  = 2'd1,
    MODE_VAR  = 2'd2
  } reg_mode_e;

  // commands carried by the command network (C links)
  typedef enum logic [1:0] {
    CMD_ENTER_CON = 2'd0,
    CMD_ENTER_VAR = 2'd1,
    CMD_EMPTY     = 2'd2,
    CMD_IDLE      = 2'd3
  } reg_cmd_e;

  // host commands accepted by the controller
  typedef enum logic [2:0] {
    HOST_ENTER_CON = 3'd0,
    HOST_ENTER_VAR = 3'd1,
    HOST_EMPTY     = 3'd2,
    HOST_IDLE      = 3'd3,
    HOST_RUN       = 3'd4
  } host_cmd_e;

  function automatic logic [M-1:0] make_instr(input logic [1:0] fu, input logic [1:0] spec,
                                              input logic d1v, input logic [Q-1:0] d1,
                                              input logic d2v, input logic [Q-1:0] d2);
    instr_t i;
    i = '{fu: fu, spec: spec, d1v: d1v, d1: d1, d2v: d2v, d2: d2};
    return M'(i);
  endfunction

endpackage
