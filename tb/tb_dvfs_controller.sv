// tb_dvfs_controller -- self-checking test of the DVFS controller. Maps
// three kernels to islands, runs windows of 10 executions with chosen
// execution lengths and checks the exeTable counts, that the window ends
// only after every kernel's 10th update, the chosen bottleneck and the
// resulting one-step level moves (saturating at normal and rest), and that
// unmapped islands and dyn_en=0 leave levels alone.
module tb_dvfs_controller;
  import iced_pkg::*;
  localparam int NI = 9, NK = 9;
  logic clk = 0, rst_n = 0;
  logic map_we = 0, lvl_we = 0, dyn_en = 0;
  logic [3:0] map_kernel = 0, lvl_island = 0, rd_kernel = 0, bottleneck;
  logic [NI-1:0] map_islands = 0;
  dvfs_level_e lvl_value = LVL_NORMAL;
  logic [NK-1:0] kernel_start = 0, kernel_done = 0;
  dvfs_level_e [NI-1:0] island_level;
  logic [31:0] rd_cycles;
  logic [7:0] rd_updates;
  logic window_end;
  int checks = 0, failures = 0, windows = 0;
  dvfs_level_e exp_lvl [NI];

  dvfs_controller #(.NI(NI), .NK(NK), .CYC_W(32), .WINDOW(10)) dut (.*);
  always #1 clk = ~clk;
  always @(posedge clk) if (rst_n && window_end) windows++;

  initial begin
    #400000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %0d exp %0d", w, g, e); end
  endtask

  // run kernel k once for n cycles
  task automatic exec(int k, int n);
    @(negedge clk); kernel_start[k] = 1;
    @(negedge clk); kernel_start[k] = 0;
    repeat (n - 1) @(negedge clk);
    kernel_done[k] = 1;
    @(negedge clk); kernel_done[k] = 0;
  endtask

  task automatic window(int n0, int n1, int n2, int bn);
    int w0;
    w0 = windows;
    for (int r = 0; r < 10; r++) begin
      exec(0, n0); exec(1, n1);
      if (r < 9 || n2 == 0) exec(2, n2 == 0 ? 1 : n2);
      if (r == 9) begin
        // kernels 0 and 1 have 10 updates, kernel 2 only 9
        rd_kernel = 0; #0.1;
        chk("upd k0", 32'(rd_updates), 32'(10));
        rd_kernel = 1; #0.1;
        chk("cycles k1", 32'(rd_cycles), 32'(10 * (n1 - 1)));  // start..done, done cycle excluded
        chk("no early window", 32'(windows), 32'(w0));
        exec(2, n2 == 0 ? 1 : n2);
      end
    end
    repeat (2) @(negedge clk);
    chk("window ended", 32'(windows), 32'(w0 + 1));
    chk("bottleneck", 32'(bottleneck), 32'(bn));
    for (int i = 0; i < NI; i++) begin
      int k;
      k = (i < 2) ? 0 : (i < 4) ? 1 : (i == 4) ? 2 : -1;
      if (k == bn)      exp_lvl[i] = (exp_lvl[i] == LVL_NORMAL) ? LVL_NORMAL : dvfs_level_e'(exp_lvl[i] + 1);
      else if (k >= 0)  exp_lvl[i] = (exp_lvl[i] == LVL_REST) ? LVL_REST : dvfs_level_e'(exp_lvl[i] - 1);
      chk($sformatf("island %0d", i), 32'(island_level[i]), 32'(exp_lvl[i]));
    end
    rd_kernel = 0; #0.1;
    chk("cleared", 32'(rd_updates), 32'(0));
  endtask

  initial begin
    #5 rst_n = 1;
    for (int i = 0; i < NI; i++) chk("reset level", 32'(island_level[i]), 32'(LVL_NORMAL));
    // mapTable: k0 -> islands 0,1 ; k1 -> 2,3 ; k2 -> 4 ; islands 5..8 unmapped
    @(negedge clk); map_we = 1; map_kernel = 0; map_islands = 9'b000000011;
    @(negedge clk); map_kernel = 1; map_islands = 9'b000001100;
    @(negedge clk); map_kernel = 2; map_islands = 9'b000010000;
    @(negedge clk); map_we = 0;
    // host levels: compile-time relax for k1 and island 8 power-gated
    @(negedge clk); lvl_we = 1; lvl_island = 2; lvl_value = LVL_RELAX;
    @(negedge clk); lvl_island = 3;
    @(negedge clk); lvl_island = 8; lvl_value = LVL_PG;
    @(negedge clk); lvl_we = 0;
    for (int i = 0; i < NI; i++) exp_lvl[i] = island_level[i];
    chk("host write", 32'(island_level[2]), 32'(LVL_RELAX));
    // dynamic switching disabled: nothing moves
    for (int r = 0; r < 10; r++) begin exec(0, 3); exec(1, 3); exec(2, 3); end
    repeat (3) @(negedge clk);
    chk("dyn off", 32'(windows), 32'(0));
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    @(negedge clk); map_we = 1; map_kernel = 0; map_islands = 9'b000000011;
    @(negedge clk); map_kernel = 1; map_islands = 9'b000001100;
    @(negedge clk); map_kernel = 2; map_islands = 9'b000010000;
    @(negedge clk); map_we = 0; lvl_we = 1; lvl_island = 8; lvl_value = LVL_PG;
    @(negedge clk); lvl_we = 0;
    for (int i = 0; i < NI; i++) exp_lvl[i] = island_level[i];
    dyn_en = 1;
    window(5, 12, 3, 1);   // k1 bottleneck
    window(5, 12, 3, 1);
    window(20, 4, 3, 0);   // shifts to k0
    window(4, 4, 30, 2);   // k2
    window(4, 4, 30, 2);
    window(4, 4, 30, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
