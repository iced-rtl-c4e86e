// iced_pkg -- types and constants shared by the ICED CGRA.
//
// A data token on the fabric is a 32-bit word plus one predicate bit. The
// predicate carries partial predication: a token whose predicate is 0 moves
// through the array like any other but marks a result that must be ignored
// (for example the first, not yet meaningful, firings of a software pipeline).
//
// DVFS levels follow the four modes of the architecture: normal (nominal
// voltage, base clock), relax (half the clock), rest (a quarter of the clock)
// and power-gated. The encoding orders them so that a larger code is a faster
// level. The voltage and clock-divider values are those of the 6x6 prototype;
// the encodings, opcode set and configuration word layout are this design's
// own choices.
package iced_pkg;

  localparam int unsigned DATA_W = 32;

  typedef struct packed {
    logic              pred;   // 1: token is valid under predication
    logic [DATA_W-1:0] data;
  } token_t;

  // DVFS level of an island; larger is faster.
  typedef enum logic [1:0] {
    LVL_PG     = 2'd0,   // power-gated: clock stopped, LDO off
    LVL_REST   = 2'd1,   // 0.42 V, base/4 (108.5 MHz)
    LVL_RELAX  = 2'd2,   // 0.50 V, base/2 (217 MHz)
    LVL_NORMAL = 2'd3    // 0.70 V, base   (434 MHz)
  } dvfs_level_e;

  // Clock division selector of the island PLL.
  typedef enum logic [1:0] {
    DIV1 = 2'd0,
    DIV2 = 2'd1,
    DIV4 = 2'd2
  } clk_div_e;

  // Island supply voltage in millivolts for each level.
  function automatic logic [9:0] level_mv(dvfs_level_e l);
    case (l)
      LVL_NORMAL: return 10'd700;
      LVL_RELAX:  return 10'd500;
      LVL_REST:   return 10'd420;
      default:    return 10'd0;
    endcase
  endfunction

  function automatic clk_div_e level_div(dvfs_level_e l);
    case (l)
      LVL_NORMAL: return DIV1;
      LVL_RELAX:  return DIV2;
      default:    return DIV4;
    endcase
  endfunction

  // Functional unit operations (one DFG node per firing).
  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,
    OP_ADD  = 5'd1,
    OP_SUB  = 5'd2,
    OP_MUL  = 5'd3,
    OP_DIV  = 5'd4,   // unsigned; x/0 gives all ones
    OP_REM  = 5'd5,   // unsigned; x%0 gives x
    OP_AND  = 5'd6,
    OP_OR   = 5'd7,
    OP_XOR  = 5'd8,
    OP_SHL  = 5'd9,
    OP_SHR  = 5'd10,
    OP_EQ   = 5'd11,
    OP_NE   = 5'd12,
    OP_LT   = 5'd13,  // signed compare
    OP_PHI  = 5'd14,  // first operand whose predicate is set
    OP_BR   = 5'd15,  // operand0 passed on, predicate gated by operand1 != 0
    OP_LD   = 5'd16,  // word load, address = operand0
    OP_ST   = 5'd17,  // word store, address = operand0, data = operand1
    OP_MOV  = 5'd18,
    OP_MAC  = 5'd19,  // operand0 * operand1 + operand2
    OP_EXIT = 5'd20   // kernel termination when operand0 is valid and non-zero
  } op_e;

  // Number of operand registers an operation reads.
  function automatic logic [1:0] op_nsrc(op_e op);
    case (op)
      OP_NOP:                 return 2'd0;
      OP_LD, OP_MOV, OP_EXIT: return 2'd1;
      OP_MAC:                 return 2'd3;
      default:                return 2'd2;
    endcase
  endfunction

  // Operations with an effect but no result token.
  function automatic logic op_no_result(op_e op);
    return (op == OP_ST) || (op == OP_EXIT) || (op == OP_NOP);
  endfunction

  // Tile crossbar: 6 inputs x 7 outputs.
  localparam int unsigned XB_IN  = 6;
  localparam int unsigned XB_OUT = 7;
  // Inputs
  localparam logic [2:0] SRC_N     = 3'd0;
  localparam logic [2:0] SRC_E     = 3'd1;
  localparam logic [2:0] SRC_S     = 3'd2;
  localparam logic [2:0] SRC_W     = 3'd3;
  localparam logic [2:0] SRC_FU    = 3'd4;
  localparam logic [2:0] SRC_CONST = 3'd5;
  localparam logic [2:0] SRC_NONE  = 3'd7;
  // Outputs 0..3 are N, E, S, W; 4..6 are FU operand registers 0..2.
  localparam int unsigned DIR_N = 0, DIR_E = 1, DIR_S = 2, DIR_W = 3;

  // One configuration word: what a tile does in one of its own clock cycles.
  typedef struct packed {
    op_e                     op;
    logic [XB_OUT-1:0][2:0]  sel;       // crossbar source per output
    logic [XB_OUT-1:0]       boot;      // on the first pass, take the constant instead
    logic [DATA_W-1:0]       konst;     // constant crossbar input
  } ctrl_t;

  localparam int unsigned CTRL_W = $bits(ctrl_t);

endpackage
