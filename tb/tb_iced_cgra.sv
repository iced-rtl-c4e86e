// tb_iced_cgra -- end-to-end test of the full 6x6 ICED CGRA at its default
// parameters.
//
// Phase 1, a streaming kernel across three DVFS islands. The bottom two
// rows carry a pipeline: a counter (tile 1) sends addresses to the
// left-column tile 0, which loads a[k] from the scratchpad; tile 2
// multiplies by 3 and tile 3 adds 5 (island 1, relax), tiles 4 and 5 route
// the stream up (island 2, rest), row 1 routes it back west; tile 9 compares
// each value with the sentinel 3*1000+5 and sends the result to tile 15
// (island 4, normal), which executes EXIT; tile 7 interleaves store
// addresses 8(k+3) with the data and the left-column tile 6 stores them.
// Expected: mem[8(k+3)] = 3*a[k] + 5 for 2 <= k < S, the slots paired with
// predicate-0 fill tokens stay untouched, and kernel_done pulses once per run.
// Islands 3 and 5-8 are power-gated.
//
// Phase 2, the dynamic DVFS window: kernel 0 owns islands 0, 1, 2 and 4;
// after its 10th execution the controller raises the bottleneck's (its)
// islands one level. An 11th run checks the results at the new levels.
//
// Phase 3, bank conflict and back-pressure: tiles 0 and 6 load from the same
// bank every cycle while their consumers never read; the scratchpad crossbar
// must report conflicts and the tiles must stall.
//
// Counted mechanisms (each must happen): island clock ratios 1:2:4, level
// changes by the host, power-gated islands without clock, tile stalls,
// firings in relax and rest islands, predicated (skipped) stores, kernel
// termination, the DVFS window, bank conflicts.
module tb_iced_cgra;
  import iced_pkg::*;

  localparam int S = 12;           // index of the sentinel in a[]
  localparam int K = 3, C = 5, SENT = K * 1000 + C;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, cfg_ii_we = 0, run = 0, flush = 0;
  logic [5:0] cfg_tile = 0;
  logic [4:0] cfg_addr = 0;
  ctrl_t cfg_word = '0;
  logic [5:0] cfg_ii = 0;
  logic dma_en = 0, dma_we = 0;
  logic [12:0] dma_addr = 0;
  logic [31:0] dma_wdata = 0, dma_rdata;
  logic map_we = 0, lvl_we = 0, dyn_en = 0;
  logic [3:0] map_kernel = 0, lvl_island = 0, rd_kernel = 0, bottleneck;
  logic [8:0] map_islands = 0;
  dvfs_level_e lvl_value = LVL_NORMAL;
  logic [8:0] kernel_start = 0, kernel_done, exit_pulse, island_busy, island_clk;
  logic [31:0] rd_cycles;
  logic [7:0] rd_updates;
  logic window_end, spm_conflict;
  dvfs_level_e [8:0] island_level;
  logic [8:0][9:0] island_vdd_mv;
  logic [35:0] tile_fired;

  iced_cgra dut (.*);

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  int n_done = 0, n_window = 0, n_conflict = 0, n_stall = 0, n_level_set = 0;
  int n_fire_relax = 0, n_fire_rest = 0, n_skipped = 0, n_gated = 0, n_ratio = 0;
  logic [31:0] a [64];

  always @(posedge clk) if (rst_n) begin
    if (kernel_done[0]) n_done++;
    if (window_end) n_window++;
    if (spm_conflict) n_conflict++;
  end
  always @(posedge island_clk[0]) if (run && !tile_fired[0]) n_stall++;
  always @(posedge island_clk[1]) if (run && tile_fired[2]) n_fire_relax++;
  always @(posedge island_clk[2]) if (run && tile_fired[4]) n_fire_rest++;

  initial begin
    #4000000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %0d exp %0d", w, g, e); end
  endtask

  function automatic ctrl_t nop();
    ctrl_t w;
    w = '0;
    w.op = OP_NOP;
    for (int o = 0; o < XB_OUT; o++) w.sel[o] = SRC_NONE;
    return w;
  endfunction

  task automatic cfg(int t, int s, ctrl_t w);
    @(negedge clk); cfg_we = 1; cfg_tile = 6'(t); cfg_addr = 5'(s); cfg_word = w;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic ii(int t, int n);
    @(negedge clk); cfg_ii_we = 1; cfg_tile = 6'(t); cfg_ii = 6'(n);
    @(negedge clk); cfg_ii_we = 0;
  endtask

  task automatic dma_wr(int ad, logic [31:0] d);
    @(negedge clk); dma_en = 1; dma_we = 1; dma_addr = 13'(ad); dma_wdata = d;
    @(negedge clk); dma_we = 0; dma_en = 0;
  endtask

  task automatic dma_rd(int ad, output logic [31:0] d);
    @(negedge clk); dma_en = 1; dma_we = 0; dma_addr = 13'(ad);
    #0.5 d = dma_rdata;
    @(negedge clk); dma_en = 0;
  endtask

  task automatic set_level(int i, dvfs_level_e l);
    @(negedge clk); lvl_we = 1; lvl_island = 4'(i); lvl_value = l;
    @(negedge clk); lvl_we = 0;
    n_level_set++;
  endtask

  task automatic wait_levels();
    repeat (4) @(negedge clk);
    while (island_busy != '0) @(negedge clk);
    repeat (40) @(negedge clk);   // PLL lock time of the slowest island
  endtask

  // island clock edges, counted continuously
  int edges [9];
  for (genvar g = 0; g < 9; g++) begin : g_edge
    always @(posedge island_clk[g]) edges[g]++;
  end

  // count island clock edges over 400 base cycles
  task automatic check_ratio(int i, int exp_edges);
    int e0, e;
    @(negedge clk);
    e0 = edges[i];
    repeat (400) @(negedge clk);
    e = edges[i] - e0;
    chk($sformatf("island %0d clock edges", i), 32'(e), 32'(exp_edges));
    if (e == exp_edges) n_ratio++;
  endtask

  task automatic load_program();
    ctrl_t w;
    for (int t = 0; t < 36; t++) begin cfg(t, 0, nop()); ii(t, 1); end
    // tile 0: load a[addr from E], result east
    w = nop(); w.op = OP_LD; w.sel[4] = SRC_E; w.sel[DIR_E] = SRC_FU; cfg(0, 0, w);
    // tile 1: address counter (from 1, step 1) west; forward loaded data east
    w = nop(); w.op = OP_ADD; w.sel[DIR_W] = SRC_FU; w.sel[4] = SRC_FU; w.boot[4] = 1'b1;
    w.sel[5] = SRC_CONST; w.konst = 1; cfg(1, 0, w);
    w = nop(); w.sel[DIR_E] = SRC_W; cfg(1, 1, w); ii(1, 2);
    // tile 2: *K ; tile 3: +C
    w = nop(); w.op = OP_MUL; w.sel[4] = SRC_W; w.sel[5] = SRC_CONST; w.konst = K;
    w.sel[DIR_E] = SRC_FU; cfg(2, 0, w);
    w = nop(); w.op = OP_ADD; w.sel[4] = SRC_W; w.sel[5] = SRC_CONST; w.konst = C;
    w.sel[DIR_E] = SRC_FU; cfg(3, 0, w);
    // routing: 4 W->E, 5 W->N, 11 S->W, 10 E->W, 8 E->W
    w = nop(); w.sel[DIR_E] = SRC_W; cfg(4, 0, w);
    w = nop(); w.sel[DIR_N] = SRC_W; cfg(5, 0, w);
    w = nop(); w.sel[DIR_W] = SRC_S; cfg(11, 0, w);
    w = nop(); w.sel[DIR_W] = SRC_E; cfg(10, 0, w);
    w = nop(); w.sel[DIR_W] = SRC_E; cfg(8, 0, w);
    // tile 9: forward west, compare with the sentinel, result north
    w = nop(); w.op = OP_EQ; w.sel[DIR_W] = SRC_E; w.sel[4] = SRC_E; w.sel[5] = SRC_CONST;
    w.konst = SENT; w.sel[DIR_N] = SRC_FU; cfg(9, 0, w);
    // tile 15: EXIT on a true comparison
    w = nop(); w.op = OP_EXIT; w.sel[4] = SRC_S; cfg(15, 0, w);
    // tile 7: store-address counter (from 8, step 8) interleaved with data
    w = nop(); w.op = OP_ADD; w.sel[DIR_W] = SRC_FU; w.sel[4] = SRC_FU; w.boot[4] = 1'b1;
    w.sel[5] = SRC_CONST; w.konst = 8; cfg(7, 0, w);
    w = nop(); w.sel[DIR_W] = SRC_E; cfg(7, 1, w); ii(7, 2);
    // tile 6: store (address, data) pairs
    w = nop(); w.op = OP_ST; w.sel[4] = SRC_E; cfg(6, 0, w);
    w = nop(); w.sel[5] = SRC_E; cfg(6, 1, w); ii(6, 2);
  endtask

  task automatic one_run(int r);
    logic [31:0] d;
    int t0;
    // data: a[k] for k <= S, outputs cleared
    for (int k = 0; k <= S + 2; k++) begin
      a[k] = (k == S) ? 1000 : 32'(1 + ($urandom % 900));
      dma_wr(k, a[k]);
    end
    for (int k = 0; k <= S + 4; k++) dma_wr(8 * (k + 3), 0);
    for (int j = 1; j <= 3; j++) dma_wr(8 * (j + 1), 32'hdead);
    @(negedge clk); flush = 1; repeat (4) @(negedge clk); flush = 0;
    @(negedge clk); kernel_start[0] = 1; run = 1;
    @(negedge clk); kernel_start[0] = 0;
    t0 = n_done;
    while (n_done == t0) @(negedge clk);
    repeat (300) @(negedge clk);
    run = 0;
    repeat (10) @(negedge clk);
    for (int k = 2; k < S; k++) begin
      dma_rd(8 * (k + 3), d);
      chk($sformatf("run %0d out[%0d]", r, k), 32'(d), 32'(K * a[k] + C));
    end
    // slots paired with predicate-0 tokens are not written
    for (int j = 1; j <= 3; j++) begin
      dma_rd(8 * (j + 1), d);
      chk($sformatf("run %0d skipped store %0d", r, j), 32'(d), 32'(32'hdead));
      if (d == 32'hdead) n_skipped++;
    end
  endtask

  initial begin
    logic [31:0] d;
    #5 rst_n = 1;
    wait_levels();
    for (int i = 0; i < 9; i++) chk("power-up level", 32'(island_level[i]), 32'(LVL_NORMAL));
    // compile-time levels of the mapping
    set_level(1, LVL_RELAX);
    set_level(2, LVL_REST);
    foreach (island_level[i]) if (!(i inside {0, 1, 2, 4})) set_level(i, LVL_PG);
    wait_levels();
    chk("isl1 relax", 32'(island_level[1]), 32'(LVL_RELAX));
    chk("isl2 rest", 32'(island_level[2]), 32'(LVL_REST));
    chk("isl1 vdd", 32'(island_vdd_mv[1]), 32'(500));
    chk("isl2 vdd", 32'(island_vdd_mv[2]), 32'(420));
    check_ratio(0, 400);
    check_ratio(1, 200);
    check_ratio(2, 100);
    check_ratio(5, 0);
    for (int i = 5; i < 9; i++) if (island_vdd_mv[i] == 0 && island_level[i] == LVL_PG) n_gated++;
    // DMA sanity
    dma_wr(100, 32'h12345678); dma_rd(100, d); chk("dma", 32'(d), 32'(32'h12345678));

    load_program();
    @(negedge clk); map_we = 1; map_kernel = 0; map_islands = 9'b000010111;
    @(negedge clk); map_we = 0; dyn_en = 1;
    for (int r = 0; r < 10; r++) begin
      one_run(r);
      if (r < 9) begin
        rd_kernel = 0; #0.5;
        chk("exeTable updates", 32'(rd_updates), 32'(r + 1));
        checks++;
        if (rd_cycles == 0) begin failures++; $display("FAIL exeTable cycles zero"); end
      end
    end
    wait_levels();
    chk("window", 32'(n_window), 32'(1));
    chk("bottleneck", 32'(bottleneck), 32'(0));
    chk("isl1 raised", 32'(island_level[1]), 32'(LVL_NORMAL));
    chk("isl2 raised", 32'(island_level[2]), 32'(LVL_RELAX));
    chk("isl0 stays", 32'(island_level[0]), 32'(LVL_NORMAL));
    chk("isl5 gated", 32'(island_level[5]), 32'(LVL_PG));
    check_ratio(2, 200);
    one_run(10);
    chk("kernel_done count", 32'(n_done), 32'(11));

    // phase 3: conflicting loads with blocked consumers
    begin
      ctrl_t w;
      @(negedge clk); flush = 1; repeat (4) @(negedge clk); flush = 0;
      w = nop(); w.op = OP_LD; w.sel[4] = SRC_CONST; w.konst = 64; w.sel[DIR_E] = SRC_FU;
      cfg(0, 0, w);
      w.konst = 72; cfg(6, 0, w);
      cfg(1, 0, nop()); ii(1, 1);
      cfg(7, 0, nop()); ii(7, 1);
      ii(6, 1);
      n_conflict = 0; n_stall = 0;
      @(negedge clk); run = 1;
      repeat (100) @(negedge clk);
      run = 0;
      // both output FIFOs fill within a few cycles, then the loads stall
      checks++;
      if (n_stall < 80) begin failures++; $display("FAIL back-pressure stalls %0d", n_stall); end
      checks++;
      if (n_conflict < 4) begin failures++; $display("FAIL conflicts %0d", n_conflict); end
    end

    $display("mechanisms: done=%0d window=%0d conflict=%0d stall=%0d levels_set=%0d relax_fires=%0d rest_fires=%0d skipped=%0d gated=%0d ratios=%0d",
             n_done, n_window, n_conflict, n_stall, n_level_set, n_fire_relax, n_fire_rest, n_skipped, n_gated, n_ratio);
    if (n_done == 0)       begin failures++; $display("FAIL no kernel termination"); end
    if (n_window == 0)     begin failures++; $display("FAIL no DVFS window"); end
    if (n_conflict == 0)   begin failures++; $display("FAIL no bank conflict"); end
    if (n_stall == 0)      begin failures++; $display("FAIL no stall"); end
    if (n_level_set == 0)  begin failures++; $display("FAIL no host level change"); end
    if (n_fire_relax == 0) begin failures++; $display("FAIL no firing at relax"); end
    if (n_fire_rest == 0)  begin failures++; $display("FAIL no firing at rest"); end
    if (n_skipped == 0)    begin failures++; $display("FAIL no predicated store"); end
    if (n_gated == 0)      begin failures++; $display("FAIL no power-gated island"); end
    if (n_ratio < 5)       begin failures++; $display("FAIL clock ratios"); end
    checks += 10;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
