// tb_tile -- self-checking test of one tile.
// Program A (II=1): a running sum. Each step routes the west input into
// operand 0, the FU result back into operand 1 (the constant 0 on the first
// pass) and the FU result north. Expected north stream: one predicate-0
// token (pipeline fill), then the prefix sums. With inputs always present
// and the reader always ready, the tile must fire every cycle (one step per
// cycle). The north FIFO is then read on a slower, unrelated clock with
// random pops to exercise back-pressure.
// Program B (II=3): store then load. Step 0 takes an address (west) and
// data (south), step 1 stores them while taking the address again, step 2
// loads it and sends the word east. The memory grant is withheld at random
// to force retries. Expected east stream: the stored data.
module tb_tile;
  import iced_pkg::*;
  logic clk = 0, wclk = 0, rclk = 0, rst_n = 0, run = 0;
  logic cfg_we = 0, cfg_ii_we = 0;
  logic [4:0] cfg_addr = 0;
  logic [5:0] cfg_ii = 0;
  ctrl_t cfg_word = '0;
  token_t [3:0] in_tok, out_tok;
  logic [3:0] in_valid, in_pop, nb_clk, out_pop, out_valid;
  logic mem_req, mem_we, mem_gnt, exit_tgl, fired;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [31:0] mem [256];
  int checks = 0, failures = 0;
  bit slow_reader = 0, rand_gnt = 0;

  tile #(.CTRL_DEPTH(32), .FIFO_DEPTH(8)) dut (.*);

  always #5 clk = ~clk;
  always #2 wclk = ~wclk;
  always #7 rclk = ~rclk;
  assign nb_clk = {4{slow_reader ? rclk : clk}};

  // input channels driven from queues
  token_t qin [4][$];
  always_comb for (int d = 0; d < 4; d++) begin
    in_valid[d] = qin[d].size() != 0;
    in_tok[d]   = in_valid[d] ? qin[d][0] : '0;
  end
  always @(posedge clk) for (int d = 0; d < 4; d++) if (in_pop[d]) void'(qin[d].pop_front());

  // output channels collected into queues, in the reader clock domain
  token_t qout [4][$];
  always @(posedge nb_clk[0]) for (int d = 0; d < 4; d++) begin
    if (out_pop[d] && out_valid[d]) qout[d].push_back(out_tok[d]);
  end
  always @(negedge nb_clk[0]) for (int d = 0; d < 4; d++)
    out_pop[d] <= out_valid[d] && (!slow_reader || ($urandom % 3 != 0));

  // scratchpad model
  assign mem_rdata = mem[mem_addr[7:0]];
  always @(negedge clk) mem_gnt <= !rand_gnt || ($urandom % 2 == 0);
  always @(posedge clk) if (mem_req && mem_we && mem_gnt) mem[mem_addr[7:0]] <= mem_wdata;

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, logic [63:0] g, logic [63:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask

  function automatic ctrl_t word(op_e op);
    ctrl_t w;
    w = '0;
    w.op = op;
    for (int o = 0; o < XB_OUT; o++) w.sel[o] = SRC_NONE;
    return w;
  endfunction

  task automatic load(int a, ctrl_t w);
    @(negedge wclk); cfg_we = 1; cfg_addr = 5'(a); cfg_word = w;
    @(negedge wclk); cfg_we = 0;
  endtask

  task automatic set_ii(int n);
    @(negedge wclk); cfg_ii_we = 1; cfg_ii = 6'(n);
    @(negedge wclk); cfg_ii_we = 0;
  endtask

  initial begin
    ctrl_t w;
    logic [31:0] sum, xs [64];
    int fires;
    mem_gnt = 1;
    for (int d = 0; d < 4; d++) out_pop[d] = 0;
    #12 rst_n = 1;
    // ---------------- program A
    w = word(OP_ADD);
    w.sel[4] = SRC_W; w.sel[5] = SRC_FU; w.sel[DIR_N] = SRC_FU;
    w.boot[5] = 1'b1; w.konst = 32'd0;
    load(0, w); set_ii(1);
    for (int i = 0; i < 40; i++) begin xs[i] = $urandom % 1000; qin[DIR_W].push_back('{1'b1, xs[i]}); end
    @(negedge clk); run = 1;
    // throughput: one step per cycle while inputs and output room exist
    repeat (3) @(posedge clk);
    fires = 0;
    repeat (10) @(posedge clk) fires += fired;
    chk("fires per cycle", fires, 10);
    wait (qout[DIR_N].size() == 41 || qin[DIR_W].size() == 0);
    repeat (20) @(posedge clk);
    chk("count A", qout[DIR_N].size(), 40);
    chk("fill token pred", qout[DIR_N][0].pred, 0);
    sum = 0;
    for (int i = 1; i < qout[DIR_N].size(); i++) begin
      sum += xs[i-1];
      chk("prefix sum", qout[DIR_N][i], {1'b1, sum});
    end
    run = 0;
    repeat (5) @(posedge clk);
    // ---------------- program B, slow unrelated reader, random grants
    slow_reader = 1; rand_gnt = 1;
    qout[DIR_E].delete(); qout[DIR_N].delete(); qin[DIR_W].delete();
    w = word(OP_NOP); w.sel[4] = SRC_W; w.sel[5] = SRC_S; load(0, w);
    w = word(OP_ST);  w.sel[4] = SRC_W; load(1, w);
    w = word(OP_LD);  w.sel[DIR_E] = SRC_FU; load(2, w);
    set_ii(3);
    for (int i = 0; i < 20; i++) begin
      xs[i] = $urandom;
      qin[DIR_W].push_back('{1'b1, 32'(i * 3 + 1)});
      qin[DIR_W].push_back('{1'b1, 32'(i * 3 + 1)});
      qin[DIR_S].push_back('{1'b1, xs[i]});
    end
    @(negedge clk); run = 1;
    wait (qout[DIR_E].size() == 20);
    repeat (10) @(posedge clk);
    chk("count B", qout[DIR_E].size(), 20);
    for (int i = 0; i < 20; i++) begin
      chk("loaded", qout[DIR_E][i], {1'b1, xs[i]});
      chk("stored", mem[8'(i * 3 + 1)], xs[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
