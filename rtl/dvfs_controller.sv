// dvfs_controller -- the CGRA's DVFS controller for streaming applications.
//
// When a pipeline of kernels runs on the CGRA, each kernel owns one or more
// DVFS islands. The controller keeps two tables. mapTable holds, per
// kernel, a bit mask of the islands it owns (written by the host when the
// application is mapped). exeTable holds, per kernel, the base-clock cycles
// the kernel spent executing in the current time window and how many
// executions completed: a kernel's counter runs from its `kernel_start`
// pulse to its `kernel_done` (termination) pulse, and each termination is
// one update of the table. When every kernel that owns an island has
// completed WINDOW executions (10 by default, one window per 10 inputs),
// the kernel with the most cycles is the bottleneck: the level of each of
// its islands goes up one step (up to normal) and the level of every other
// kernel's islands goes down one step (down to rest, never to power-gated).
// The table is then cleared for the next window. Islands owned by no kernel
// keep their level. With `dyn_en` low nothing changes by itself and the
// host sets levels directly (the single-kernel case, where the compiler
// fixes the levels), which it can also do with `dyn_en` high.
//
// The tables, the 10-execution window and the one-step up/down rule are the
// architecture's. Counting cycles from a start to a termination pulse,
// ending the window when every kernel reached 10 updates, and the
// lowest-index tie break are this design's reading. Resets every island to
// normal.
module dvfs_controller
  import iced_pkg::*;
#(
  parameter int unsigned NI     = 9,    // islands
  parameter int unsigned NK     = 9,    // kernels (at most one per island)
  parameter int unsigned CYC_W  = 32,
  parameter int unsigned WINDOW = 10
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host: mapTable and direct level writes
  input  logic                  map_we,
  input  logic [$clog2(NK)-1:0] map_kernel,
  input  logic [NI-1:0]         map_islands,
  input  logic                  lvl_we,
  input  logic [$clog2(NI)-1:0] lvl_island,
  input  dvfs_level_e           lvl_value,
  input  logic                  dyn_en,
  // kernel execution events
  input  logic [NK-1:0]         kernel_start,
  input  logic [NK-1:0]         kernel_done,
  // island level requests
  output dvfs_level_e [NI-1:0]  island_level,
  // observation
  input  logic [$clog2(NK)-1:0] rd_kernel,
  output logic [CYC_W-1:0]      rd_cycles,
  output logic [7:0]            rd_updates,
  output logic                  window_end,
  output logic [$clog2(NK)-1:0] bottleneck
);

  logic [NI-1:0]    map_table [NK];
  logic [CYC_W-1:0] cycles    [NK];
  logic [7:0]       updates   [NK];
  logic [NK-1:0]    running;

  // window bookkeeping
  logic [NK-1:0]         active, reached;
  logic                  window_full;
  logic [$clog2(NK)-1:0] bn;
  logic [CYC_W-1:0]      bn_cycles;
  dvfs_level_e [NI-1:0]  next_level;

  always_comb begin
    for (int k = 0; k < NK; k++) begin
      active[k]  = (map_table[k] != '0);
      reached[k] = (updates[k] >= 8'(WINDOW));
    end
    window_full = dyn_en && (active != '0) && ((active & ~reached) == '0);
    bn        = '0;
    bn_cycles = '0;
    for (int k = 0; k < NK; k++) begin
      if (active[k] && cycles[k] > bn_cycles) begin
        bn        = ($clog2(NK))'(k);
        bn_cycles = cycles[k];
      end
    end
    next_level = island_level;
    for (int i = 0; i < NI; i++) begin
      for (int k = NK - 1; k >= 0; k--) begin
        if (map_table[k][i]) begin
          if (k == int'(bn))
            next_level[i] = (island_level[i] == LVL_NORMAL) ? LVL_NORMAL
                          : dvfs_level_e'(island_level[i] + 2'd1);
          else
            next_level[i] = (island_level[i] <= LVL_REST) ? LVL_REST
                          : dvfs_level_e'(island_level[i] - 2'd1);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NK; k++) begin
        map_table[k] <= '0;
        cycles[k]    <= '0;
        updates[k]   <= '0;
      end
      running      <= '0;
      island_level <= {NI{LVL_NORMAL}};
      window_end   <= 1'b0;
      bottleneck   <= '0;
    end else begin
      window_end <= 1'b0;
      for (int k = 0; k < NK; k++) begin
        if (kernel_start[k])     running[k] <= 1'b1;
        else if (kernel_done[k]) running[k] <= 1'b0;
        if (running[k] && !kernel_done[k] && cycles[k] != '1) cycles[k] <= cycles[k] + 1'b1;
        if (kernel_done[k] && running[k] && updates[k] != 8'hff) updates[k] <= updates[k] + 8'd1;
      end
      if (window_full) begin
        island_level <= next_level;
        bottleneck   <= bn;
        window_end   <= 1'b1;
        for (int k = 0; k < NK; k++) begin
          cycles[k]  <= '0;
          updates[k] <= '0;
        end
      end
      if (map_we) map_table[map_kernel] <= map_islands;
      if (lvl_we) island_level[lvl_island] <= lvl_value;
    end
  end

  assign rd_cycles  = cycles[rd_kernel];
  assign rd_updates = updates[rd_kernel];

endmodule
