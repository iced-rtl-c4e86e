// fu -- single-cycle functional unit of an ICED tile.
//
// The FU executes one DFG node per firing of its tile: integer arithmetic,
// logic, compares, the phi and branch operations that implement partial
// predication, word loads and stores to the scratchpad, and the kernel
// termination operation. It is purely combinational: its operands come from
// the tile's three operand registers and its result is read by the tile
// crossbar in the same tile cycle, which makes the FU single-cycle as in the
// architecture this design follows.
//
// Interface: `op` selects the operation; `opnd[i]`/`opnd_v[i]` are the operand
// tokens and whether the register holds one. `res`/`res_valid` is the result
// token; `res_valid` is low until every operand the operation reads is present
// and, for a memory access, the scratchpad port has granted it (`mem_gnt`).
// A load or store whose address predicate is 0 makes no memory request and
// yields a token with predicate 0. `exit` is high when an EXIT node sees a
// valid, non-zero operand. `mem_addr` and `mem_wdata` are operands 0 and 1
// passed straight through. Which tiles reach memory is decided outside: only
// the left column is wired to the scratchpad crossbar.
//
// The opcode set (taken from the operations of the example kernel: phi,
// divide, remainder, add, compare, branch, load, multiply) and the predicate
// rules are this design's own choices.
module fu
  import iced_pkg::*;
(
  input  op_e               op,
  input  token_t [2:0]      opnd,
  input  logic   [2:0]      opnd_v,
  // scratchpad port
  output logic              mem_req,
  output logic              mem_we,
  output logic [DATA_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata,
  input  logic              mem_gnt,
  // result
  output token_t            res,
  output logic              res_valid,
  output logic              exit
);

  logic              srcs_ok;
  logic [DATA_W-1:0] a, b, c;
  logic              pa, pb, pc;

  always_comb begin
    a  = opnd[0].data;  b  = opnd[1].data;  c  = opnd[2].data;
    pa = opnd[0].pred;  pb = opnd[1].pred;  pc = opnd[2].pred;
    case (op_nsrc(op))
      2'd0:    srcs_ok = 1'b1;
      2'd1:    srcs_ok = opnd_v[0];
      2'd2:    srcs_ok = &opnd_v[1:0];
      default: srcs_ok = &opnd_v;
    endcase
  end

  always_comb begin
    res       = '0;
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = a;
    mem_wdata = b;
    exit      = 1'b0;
    res.pred  = pa & pb;
    unique case (op)
      OP_NOP:  res.pred = 1'b0;
      OP_ADD:  res.data = a + b;
      OP_SUB:  res.data = a - b;
      OP_MUL:  res.data = a * b;
      OP_DIV:  res.data = (b == '0) ? '1 : a / b;
      OP_REM:  res.data = (b == '0) ? a : a % b;
      OP_AND:  res.data = a & b;
      OP_OR:   res.data = a | b;
      OP_XOR:  res.data = a ^ b;
      OP_SHL:  res.data = a << b[4:0];
      OP_SHR:  res.data = a >> b[4:0];
      OP_EQ:   res.data = DATA_W'(a == b);
      OP_NE:   res.data = DATA_W'(a != b);
      OP_LT:   res.data = DATA_W'($signed(a) < $signed(b));
      OP_PHI: begin
        res.pred = pa | pb;
        res.data = pa ? a : b;
      end
      OP_BR: begin
        res.pred = pa & pb & (b != '0);
        res.data = a;
      end
      OP_LD: begin
        res.pred = pa;
        mem_req  = srcs_ok & pa;
        res.data = pa ? mem_rdata : '0;
      end
      OP_ST: begin
        mem_req  = srcs_ok & pa & pb;
        mem_we   = 1'b1;
      end
      OP_MOV:  begin res.pred = pa; res.data = a; end
      OP_MAC:  begin res.pred = pa & pb & pc; res.data = a * b + c; end
      OP_EXIT: begin
        res.pred = 1'b0;
        exit     = srcs_ok & pa & (a != '0);
      end
      default: res.pred = 1'b0;
    endcase
    res_valid = srcs_ok & (~mem_req | mem_gnt);
  end

endmodule
