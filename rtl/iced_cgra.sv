// iced_cgra -- a 6x6 spatio-temporal CGRA with per-island DVFS.
//
// Thirty-six tiles form a mesh; each tile talks to its four neighbours over
// elastic channels that end in asynchronous FIFOs. The tiles are grouped
// into 2x2 DVFS islands (nine for 6x6). Every island has its own control
// unit, LDO and PLL, so it can run at normal (0.70 V, base clock), relax
// (0.50 V, half clock), rest (0.42 V, quarter clock) or be power-gated.
// The six tiles of the left column reach a 32 KB, eight-bank scratchpad
// through a 6x8 crossbar. A DVFS controller sets each island's level, either
// as the host writes it (single kernel: levels chosen at compile time) or,
// for a pipeline of kernels, by moving the bottleneck kernel's islands up
// and the other kernels' islands down once per window of 10 executions.
//
// Tile (r, c) is tile number r*COLS + c; row 0 is the bottom row and column
// 0 the left column, next to the scratchpad. Island (r/2, c/2) is island
// number (r/2)*(COLS/2) + c/2. A tile's north neighbour is row r+1.
//
// Host interface (all on the base clock `clk`):
//  * configuration: `cfg_we` writes `cfg_word` to step `cfg_addr` of tile
//    `cfg_tile`; `cfg_ii_we` sets that tile's initiation interval. Load the
//    configuration while `run` is low.
//  * data: the DMA port `dma_*` reads and writes the scratchpad (word
//    addresses; bank = low 3 bits). Use it while `run` is low; fabric
//    accesses are withheld while `dma_en` is high.
//  * `run` starts every tile at step 0 of its schedule; lowering it stops
//    the fabric and empties the operand registers. Channel FIFOs keep
//    their contents; `flush` (held for a few cycles with `run` low) clears
//    all tile state except the configuration, so a stream that never
//    drains can be stopped and restarted.
//  * DVFS: `map_*` writes the mapTable (islands of each kernel), `lvl_*`
//    sets one island's level, `dyn_en` enables the per-window adjustment,
//    `kernel_start` marks the start of a kernel execution for the exeTable.
//  * `kernel_done` pulses (base clock) when a tile of a kernel's islands
//    executes EXIT; `exit_pulse` is the same per island, without the map.
//
// What follows the architecture: the 6x6 array, 2x2 islands, the three
// levels and their voltages and ratios, the 6x7 tile crossbar, the
// asynchronous output buffers, the 8-bank 32 KB scratchpad on the left
// column behind a 6x8 crossbar, and the controller's exeTable/mapTable
// policy. The elastic firing rule, configuration format, word addressing
// and the host port layout are this design's choices.
module iced_cgra
  import iced_pkg::*;
#(
  parameter int unsigned ROWS       = 6,
  parameter int unsigned COLS       = 6,
  parameter int unsigned ISL        = 2,     // island side in tiles
  parameter int unsigned CTRL_DEPTH = 32,
  parameter int unsigned FIFO_DEPTH = 8,
  parameter int unsigned BANKS      = 8,
  parameter int unsigned BANK_WORDS = 1024,
  localparam int unsigned NT  = ROWS * COLS,
  localparam int unsigned NI  = (ROWS / ISL) * (COLS / ISL),
  localparam int unsigned NK  = NI,
  localparam int unsigned TW  = $clog2(NT),
  localparam int unsigned CAW = $clog2(CTRL_DEPTH),
  localparam int unsigned IW  = $clog2(NI),
  localparam int unsigned KW  = $clog2(NK),
  localparam int unsigned DAW = $clog2(BANKS * BANK_WORDS)
) (
  input  logic                clk,
  input  logic                rst_n,
  // configuration
  input  logic                cfg_we,
  input  logic [TW-1:0]       cfg_tile,
  input  logic [CAW-1:0]      cfg_addr,
  input  ctrl_t               cfg_word,
  input  logic                cfg_ii_we,
  input  logic [CAW:0]        cfg_ii,
  input  logic                run,
  input  logic                flush,
  // DMA port to the scratchpad
  input  logic                dma_en,
  input  logic                dma_we,
  input  logic [DAW-1:0]      dma_addr,
  input  logic [DATA_W-1:0]   dma_wdata,
  output logic [DATA_W-1:0]   dma_rdata,
  // DVFS controller
  input  logic                map_we,
  input  logic [KW-1:0]       map_kernel,
  input  logic [NI-1:0]       map_islands,
  input  logic                lvl_we,
  input  logic [IW-1:0]       lvl_island,
  input  dvfs_level_e         lvl_value,
  input  logic                dyn_en,
  input  logic [NK-1:0]       kernel_start,
  output logic [NK-1:0]       kernel_done,
  input  logic [KW-1:0]       rd_kernel,
  output logic [31:0]         rd_cycles,
  output logic [7:0]          rd_updates,
  output logic                window_end,
  output logic [KW-1:0]       bottleneck,
  // status
  output logic [NI-1:0]       exit_pulse,
  output dvfs_level_e [NI-1:0] island_level,
  output logic [NI-1:0]       island_busy,
  output logic [NI-1:0][9:0]  island_vdd_mv,
  output logic [NI-1:0]       island_clk,
  output logic [NT-1:0]       tile_fired,
  output logic                spm_conflict
);

  function automatic int island_of(int t);
    return ((t / COLS) / ISL) * (COLS / ISL) + (t % COLS) / ISL;
  endfunction

  // ---------------------------------------------------------------- DVFS
  dvfs_level_e [NI-1:0] level_req;

  dvfs_controller #(.NI(NI), .NK(NK), .CYC_W(32), .WINDOW(10)) u_dvfs (
    .clk, .rst_n,
    .map_we, .map_kernel, .map_islands, .lvl_we, .lvl_island, .lvl_value, .dyn_en,
    .kernel_start, .kernel_done,
    .island_level(level_req),
    .rd_kernel, .rd_cycles, .rd_updates, .window_end, .bottleneck
  );

  // mapTable copy for routing termination signals to kernels
  logic [NI-1:0] kmap [NK];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int k = 0; k < NK; k++) kmap[k] <= '0;
    else if (map_we) kmap[map_kernel] <= map_islands;
  end

  for (genvar i = 0; i < NI; i++) begin : g_island
    logic       pll_en, pll_locked, ldo_en, ldo_pgood;
    clk_div_e   pll_div;
    logic [9:0] ldo_mv;

    dvfs_ctrl_unit u_cu (
      .clk, .rst_n, .level_req(level_req[i]),
      .pll_en, .pll_div, .pll_locked,
      .ldo_en, .ldo_mv, .ldo_pgood,
      .level(island_level[i]), .busy(island_busy[i])
    );
    adpll u_pll (
      .ref_clk(clk), .rst_n, .en(pll_en), .div(pll_div),
      .clk_out(island_clk[i]), .locked(pll_locked)
    );
    ldo u_ldo (
      .clk, .rst_n, .en(ldo_en), .vsel_mv(ldo_mv),
      .vdd_mv(island_vdd_mv[i]), .pgood(ldo_pgood)
    );
  end

  // ---------------------------------------------------------------- tiles
  logic fab_rst_n;
  assign fab_rst_n = rst_n & ~flush;

  token_t [NT-1:0][3:0] out_tok;
  logic   [NT-1:0][3:0] out_valid, out_pop, in_pop, in_valid, nb_clk;
  token_t [NT-1:0][3:0] in_tok;
  logic   [NT-1:0]      tclk, exit_tgl;
  logic   [NT-1:0]      mem_req, mem_we, mem_gnt;
  logic   [NT-1:0][DATA_W-1:0] mem_addr, mem_wdata, mem_rdata;

  logic [ROWS-1:0]              p_req, p_we, p_gnt;
  logic [ROWS-1:0][DATA_W-1:0]  p_addr, p_wdata, p_rdata;

  for (genvar t = 0; t < NT; t++) begin : g_tile
    localparam int R = t / COLS;
    localparam int C = t % COLS;
    // neighbour tile index per direction, -1 at the border
    localparam int NB_N = (R + 1 < ROWS) ? t + COLS : -1;
    localparam int NB_E = (C + 1 < COLS) ? t + 1    : -1;
    localparam int NB_S = (R > 0)        ? t - COLS : -1;
    localparam int NB_W = (C > 0)        ? t - 1    : -1;
    localparam int NB [4] = '{NB_N, NB_E, NB_S, NB_W};

    assign tclk[t] = island_clk[island_of(t)];

    for (genvar d = 0; d < 4; d++) begin : g_dir
      // the neighbour in direction d reads our output d on its side (d^2)
      if (NB[d] >= 0) begin : g_link
        assign in_tok[t][d]   = out_tok[NB[d]][d ^ 2];
        assign in_valid[t][d] = out_valid[NB[d]][d ^ 2];
        assign out_pop[t][d]  = in_pop[NB[d]][d ^ 2];
        assign nb_clk[t][d]   = tclk[NB[d]];
      end else begin : g_edge
        assign in_tok[t][d]   = '0;
        assign in_valid[t][d] = 1'b0;
        assign out_pop[t][d]  = 1'b0;
        assign nb_clk[t][d]   = tclk[t];
      end
    end

    tile #(.CTRL_DEPTH(CTRL_DEPTH), .FIFO_DEPTH(FIFO_DEPTH)) u_tile (
      .clk(tclk[t]), .rst_n(fab_rst_n), .run,
      .wclk(clk),
      .cfg_we(cfg_we && cfg_tile == TW'(t)), .cfg_addr, .cfg_word,
      .cfg_ii_we(cfg_ii_we && cfg_tile == TW'(t)), .cfg_ii,
      .in_tok(in_tok[t]), .in_valid(in_valid[t]), .in_pop(in_pop[t]),
      .nb_clk(nb_clk[t]), .out_pop(out_pop[t]), .out_tok(out_tok[t]),
      .out_valid(out_valid[t]),
      .mem_req(mem_req[t]), .mem_we(mem_we[t]), .mem_addr(mem_addr[t]),
      .mem_wdata(mem_wdata[t]), .mem_rdata(mem_rdata[t]), .mem_gnt(mem_gnt[t]),
      .exit_tgl(exit_tgl[t]), .fired(tile_fired[t])
    );

    // only the left column reaches the scratchpad
    if (C == 0) begin : g_mem
      assign p_req[R]     = mem_req[t] & ~dma_en;
      assign p_we[R]      = mem_we[t];
      assign p_addr[R]    = mem_addr[t];
      assign p_wdata[R]   = mem_wdata[t];
      assign mem_rdata[t] = p_rdata[R];
      assign mem_gnt[t]   = p_gnt[R];
    end else begin : g_nomem
      assign mem_rdata[t] = '0;
      assign mem_gnt[t]   = 1'b0;
    end
  end

  // ---------------------------------------------------------------- SPM
  logic [BANKS-1:0][$clog2(BANK_WORDS)-1:0] b_raddr, b_waddr;
  logic [BANKS-1:0][DATA_W-1:0]             b_rdata, b_wdata;
  logic [BANKS-1:0]                         b_we;

  spm_xbar #(.PORTS(ROWS), .BANKS(BANKS), .BANK_WORDS(BANK_WORDS)) u_spm_xbar (
    .req(p_req), .we(p_we), .addr(p_addr), .wdata(p_wdata), .rdata(p_rdata), .gnt(p_gnt),
    .bank_raddr(b_raddr), .bank_rdata(b_rdata), .bank_we(b_we), .bank_waddr(b_waddr),
    .bank_wdata(b_wdata), .conflict(spm_conflict)
  );

  spm #(.BANKS(BANKS), .BANK_WORDS(BANK_WORDS)) u_spm (
    .clk,
    .bank_raddr(b_raddr), .bank_rdata(b_rdata), .bank_we(b_we), .bank_waddr(b_waddr),
    .bank_wdata(b_wdata),
    .dma_en, .dma_we, .dma_addr, .dma_wdata, .dma_rdata
  );

  // ------------------------------------------------- termination signals
  logic [NT-1:0] ex_s1, ex_s2, ex_s3;
  always_ff @(posedge clk or negedge fab_rst_n) begin
    if (!fab_rst_n) {ex_s3, ex_s2, ex_s1} <= '0;
    else        {ex_s3, ex_s2, ex_s1} <= {ex_s2, ex_s1, exit_tgl};
  end

  always_comb begin
    exit_pulse = '0;
    for (int t = 0; t < NT; t++)
      if (ex_s3[t] != ex_s2[t]) exit_pulse[island_of(t)] = 1'b1;
    for (int k = 0; k < NK; k++)
      kernel_done[k] = |(exit_pulse & kmap[k]);
  end

endmodule
