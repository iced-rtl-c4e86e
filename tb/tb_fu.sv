// tb_fu -- self-checking test of the functional unit.
// Drives every operation with random operands and compares the result,
// the predicate and the memory request with values computed here.
module tb_fu;
  import iced_pkg::*;

  op_e          op;
  token_t [2:0] opnd;
  logic   [2:0] opnd_v;
  logic         mem_req, mem_we, mem_gnt, res_valid, exit_o;
  logic [31:0]  mem_addr, mem_wdata, mem_rdata;
  token_t       res;
  int checks = 0, failures = 0;

  fu dut (.op, .opnd, .opnd_v, .mem_req, .mem_we, .mem_addr, .mem_wdata,
          .mem_rdata, .mem_gnt, .res, .res_valid, .exit(exit_o));

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s op=%0d got=%h exp=%h", what, op, got, exp);
    end
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a, b, c, e;
    logic        pa, pb, pc, ep;
    for (int it = 0; it < 400; it++) begin
      a = $urandom; b = $urandom; c = $urandom;
      if (it % 5 == 0) b = 0;
      if (it % 7 == 0) b = a;
      pa = ($urandom % 4) != 0; pb = ($urandom % 4) != 0; pc = ($urandom % 4) != 0;
      opnd[0] = '{pa, a}; opnd[1] = '{pb, b}; opnd[2] = '{pc, c};
      opnd_v = 3'b111;
      mem_rdata = $urandom; mem_gnt = 1'b1;
      op = op_e'(it % 21);
      #1;
      ep = pa & pb;
      case (op)
        OP_ADD: e = a + b;
        OP_SUB: e = a - b;
        OP_MUL: e = a * b;
        OP_DIV: e = (b == 0) ? 32'hffffffff : a / b;
        OP_REM: e = (b == 0) ? a : a % b;
        OP_AND: e = a & b;
        OP_OR:  e = a | b;
        OP_XOR: e = a ^ b;
        OP_SHL: e = a << b[4:0];
        OP_SHR: e = a >> b[4:0];
        OP_EQ:  e = {31'd0, a == b};
        OP_NE:  e = {31'd0, a != b};
        OP_LT:  e = {31'd0, $signed(a) < $signed(b)};
        OP_PHI: begin ep = pa | pb; e = pa ? a : b; end
        OP_BR:  begin ep = pa & pb & (b != 0); e = a; end
        OP_LD:  begin ep = pa; e = pa ? mem_rdata : 0; end
        OP_MOV: begin ep = pa; e = a; end
        OP_MAC: begin ep = pa & pb & pc; e = a * b + c; end
        default: begin ep = 0; e = 0; end
      endcase
      if (op != OP_ST && op != OP_EXIT && op != OP_NOP) begin
        check("data", res.data, e);
        check("pred", res.pred, ep);
      end
      check("valid", res_valid, 1);
      check("memreq", mem_req, (op == OP_LD && pa) || (op == OP_ST && pa && pb));
      if (op == OP_ST) begin
        check("st_addr", mem_addr, a);
        check("st_data", mem_wdata, b);
        check("st_we", mem_we, 1);
      end
      check("exit", exit_o, op == OP_EXIT && pa && a != 0);
      // missing operand and missing grant hold the result back
      opnd_v = 3'b110;
      #1;
      check("nosrc", res_valid, op == OP_NOP);
      opnd_v = 3'b111; mem_gnt = 1'b0;
      #1;
      check("nognt", res_valid, !((op == OP_LD && pa) || (op == OP_ST && pa && pb)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
