// tb_adpll -- self-checking test of the PLL model: for each ratio the
// output period measured after lock must be 1, 2 and 4 reference periods,
// lock must drop on a change, rising edges must line up with reference
// edges, and a disabled PLL must give no clock.
module tb_adpll;
  import iced_pkg::*;
  logic ref_clk = 0, rst_n = 0, en = 0, clk_out, locked;
  clk_div_e div = DIV1;
  int checks = 0, failures = 0;
  realtime last_edge, period;
  int edges = 0;

  adpll #(.LOCK_CYCLES(8)) dut (.ref_clk, .rst_n, .en, .div, .clk_out, .locked);
  always #5 ref_clk = ~ref_clk;   // 10 ns reference period

  always @(posedge clk_out) if (rst_n) begin
    period = $realtime - last_edge;
    last_edge = $realtime;
    edges++;
    checks++;
    if (ref_clk !== 1'b1) begin failures++; $display("FAIL edge not on reference edge"); end
  end

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(clk_div_e d, int exp_ns);
    div = d;
    @(posedge ref_clk); #1;
    checks++;
    if (locked) begin failures++; $display("FAIL lock held over change"); end
    wait (locked);
    repeat (3) @(posedge clk_out);
    #1;
    checks++;
    if (period != exp_ns) begin failures++; $display("FAIL div %0d period %0t exp %0d", d, period, exp_ns); end
    // high time is half the period
    @(posedge clk_out); #1;
    begin
      realtime t0;
      t0 = $realtime;
      @(negedge clk_out);
      checks++;
      if (($realtime - t0 + 1) != exp_ns / 2) begin failures++; $display("FAIL duty div %0d", d); end
    end
  endtask

  initial begin
    #22 rst_n = 1;
    en = 1;
    measure(DIV4, 40);
    measure(DIV2, 20);
    measure(DIV1, 10);
    measure(DIV4, 40);
    en = 0;
    repeat (8) @(posedge ref_clk);
    begin
      int e0;
      e0 = edges;
      repeat (20) @(posedge ref_clk);
      checks++;
      if (edges != e0 || clk_out !== 1'b0) begin failures++; $display("FAIL clock while disabled"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
