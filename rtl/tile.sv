// tile -- one tile of the ICED CGRA.
//
// A tile holds a control memory unit, a 6x7 crossbar, three operand
// registers, a single-cycle FU and four asynchronous bypass FIFOs, one per
// output channel (N, E, S, W). It runs on the clock of its DVFS island;
// each output FIFO is read with the clock of the neighbour it feeds, which
// is the tile's second clock port that the clock-domain crossing needs.
//
// Each tile clock cycle executes the current configuration word as one
// step of the modulo schedule. The step "fires" when everything it needs is
// there: a token at the head of every input channel it routes, a valid FU
// result if the result is routed (or the operation is a store or exit), and
// room in every output FIFO it writes. On firing the routed input tokens are
// popped, the output FIFOs and operand registers are written, the operand
// registers the FU consumed are emptied, and the control memory moves to the
// next step. Otherwise the tile holds the step and retries next cycle. This
// elastic firing rule keeps a schedule compiled in base-clock cycles correct
// when an island runs at a half or a quarter of the base clock: the slow
// tile simply executes each step over a longer period, as the architecture's
// timing model describes, and producers and consumers wait on the FIFOs.
// In the first pass through the schedule a step whose operand registers are
// still empty does not wait: its FU result is a predicate-0 token, as in the
// predicated data-flow of the architecture, where the first firings of a
// software pipeline produce invalid results. Configuration bit `boot[o]`
// makes destination o take the constant during the first pass, which gives
// recurrences their initial value. The firing rule, the operand-register
// semantics and the boot bits are this design's own choices.
//
// Interface: `clk`/`rst_n` (island clock, global asynchronous reset), `run`
// (base-clock domain, synchronised here), configuration port on `wclk`,
// input channels `in_tok`/`in_valid`/`in_pop` (the neighbours' FIFO heads),
// output channels `out_tok`/`out_valid` read with `nb_clk` and `out_pop`,
// a scratchpad port (used only on the left column), `exit_tgl` which toggles
// once per executed EXIT (for crossing into the DVFS controller's domain),
// and `fired` (the step executed this cycle) for observation.
module tile
  import iced_pkg::*;
#(
  parameter int unsigned CTRL_DEPTH = 32,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          run,
  // configuration (base clock)
  input  logic                          wclk,
  input  logic                          cfg_we,
  input  logic [$clog2(CTRL_DEPTH)-1:0] cfg_addr,
  input  ctrl_t                         cfg_word,
  input  logic                          cfg_ii_we,
  input  logic [$clog2(CTRL_DEPTH):0]   cfg_ii,
  // input channels: heads of the neighbours' output FIFOs
  input  token_t [3:0]                  in_tok,
  input  logic   [3:0]                  in_valid,
  output logic   [3:0]                  in_pop,
  // output channels, read in the neighbours' clock domains
  input  logic   [3:0]                  nb_clk,
  input  logic   [3:0]                  out_pop,
  output token_t [3:0]                  out_tok,
  output logic   [3:0]                  out_valid,
  // scratchpad port
  output logic                          mem_req,
  output logic                          mem_we,
  output logic [DATA_W-1:0]             mem_addr,
  output logic [DATA_W-1:0]             mem_wdata,
  input  logic [DATA_W-1:0]             mem_rdata,
  input  logic                          mem_gnt,
  // status
  output logic                          exit_tgl,
  output logic                          fired
);

  // run synchroniser
  logic run_m, run_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {run_s, run_m} <= '0;
    else        {run_s, run_m} <= {run_m, run};
  end

  // control memory
  ctrl_t ctrl;
  logic  first_pass;
  logic [$clog2(CTRL_DEPTH)-1:0] step;

  ctrl_mem #(.DEPTH(CTRL_DEPTH)) u_ctrl (
    .wclk, .rst_n, .cfg_we, .cfg_addr, .cfg_word, .cfg_ii_we, .cfg_ii,
    .clk, .run(run_s), .advance(fired), .ctrl, .step, .first_pass
  );

  // operand registers
  token_t [2:0] opnd;
  logic   [2:0] opnd_v;

  // FU
  token_t fu_res;
  logic   fu_valid, fu_exit, fu_mem_req;

  fu u_fu (
    .op(ctrl.op), .opnd, .opnd_v,
    .mem_req(fu_mem_req), .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_gnt,
    .res(fu_res), .res_valid(fu_valid), .exit(fu_exit)
  );
  assign mem_req = fu_mem_req & run_s;

  // During the first pass through the schedule the operand registers of a
  // software-pipelined loop are still empty; like the predicated data-flow
  // of the architecture, the FU then yields a token with predicate 0 instead
  // of waiting, so the pipeline fills with invalid tokens.
  logic   srcs_ok, fu_ready;
  token_t fu_tok;
  always_comb begin
    case (op_nsrc(ctrl.op))
      2'd0:    srcs_ok = 1'b1;
      2'd1:    srcs_ok = opnd_v[0];
      2'd2:    srcs_ok = &opnd_v[1:0];
      default: srcs_ok = &opnd_v;
    endcase
    fu_ready = fu_valid | (first_pass & ~srcs_ok);
    fu_tok   = srcs_ok ? fu_res : '0;
  end

  // crossbar
  token_t [XB_IN-1:0]       src;
  logic   [XB_OUT-1:0][2:0] sel;
  token_t [XB_OUT-1:0]      dst;
  logic   [XB_OUT-1:0]      dst_used;

  always_comb begin
    src[0] = in_tok[0];
    src[1] = in_tok[1];
    src[2] = in_tok[2];
    src[3] = in_tok[3];
    src[4] = fu_tok;
    src[5] = '{pred: 1'b1, data: ctrl.konst};
    for (int o = 0; o < XB_OUT; o++)
      sel[o] = (first_pass && ctrl.boot[o]) ? SRC_CONST : ctrl.sel[o];
  end

  tile_xbar u_xbar (.src, .sel, .dst, .dst_used);

  // firing rule
  logic [3:0] need_in, need_out, out_full;
  logic       need_fu;

  always_comb begin
    need_in = '0;
    need_fu = (ctrl.op == OP_ST) || (ctrl.op == OP_EXIT);
    for (int o = 0; o < XB_OUT; o++) begin
      if (sel[o] < 3'd4)       need_in[sel[o][1:0]] = 1'b1;
      if (sel[o] == SRC_FU)    need_fu = 1'b1;
    end
    need_out = dst_used[3:0];
  end

  assign fired  = run_s
                & ((need_in & ~in_valid) == '0)
                & (~need_fu | fu_ready)
                & ((need_out & out_full) == '0);
  assign in_pop = fired ? need_in : '0;

  // operand registers: written when routed, emptied when the FU consumed them
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      opnd   <= '0;
      opnd_v <= '0;
    end else if (!run_s) begin
      opnd_v <= '0;
    end else if (fired) begin
      for (int r = 0; r < 3; r++) begin
        if (dst_used[4+r]) begin
          opnd[r]   <= dst[4+r];
          opnd_v[r] <= 1'b1;
        end else if (need_fu && srcs_ok && (r < int'(op_nsrc(ctrl.op)))) begin
          opnd_v[r] <= 1'b0;
        end
      end
    end
  end

  // termination toggle
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 exit_tgl <= 1'b0;
    else if (fired && fu_exit)  exit_tgl <= ~exit_tgl;
  end

  // asynchronous bypass FIFOs on the output channels
  for (genvar d = 0; d < 4; d++) begin : g_out
    logic empty;
    async_fifo #(.WIDTH($bits(token_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
      .wclk(clk), .wrst_n(rst_n), .push(fired & need_out[d]), .wdata(dst[d]),
      .full(out_full[d]),
      .rclk(nb_clk[d]), .rrst_n(rst_n), .pop(out_pop[d]), .rdata(out_tok[d]),
      .empty
    );
    assign out_valid[d] = ~empty;
  end

  // a routed input must be popped only when present
  a_pop_valid: assert property (@(posedge clk) (in_pop & ~in_valid) == '0)
    else $error("tile: popped an empty input channel");

endmodule
