// tb_ldo -- self-checking test of the LDO model: ramps between the three
// island voltages and off, checking the slew per cycle, the settled value,
// the settle time in cycles and power-good.
module tb_ldo;
  logic clk = 0, rst_n = 0, en = 0, pgood;
  logic [9:0] vsel_mv = 0, vdd_mv;
  int checks = 0, failures = 0;

  ldo #(.STEP_MV(20)) dut (.clk, .rst_n, .en, .vsel_mv, .vdd_mv, .pgood);
  always #5 clk = ~clk;

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic go(bit e, int mv);
    int prev, cyc, expc;
    prev = vdd_mv;
    expc = ((e ? mv : 0) > prev ? (e ? mv : 0) - prev : prev - (e ? mv : 0) + 19) / 20;
    if ((e ? mv : 0) > prev) expc = ((e ? mv : 0) - prev + 19) / 20;
    @(negedge clk); en = e; vsel_mv = 10'(mv);
    cyc = 0;
    #1;
    while (vdd_mv != (e ? mv : 0)) begin
      @(negedge clk); cyc++;
      checks++;
      if ((vdd_mv > prev ? vdd_mv - prev : prev - vdd_mv) > 20) begin failures++; $display("FAIL slew"); end
      prev = vdd_mv;
      if (cyc > 100) break;
    end
    checks++;
    if (cyc != expc) begin failures++; $display("FAIL settle %0d cycles exp %0d", cyc, expc); end
    checks++;
    if (pgood !== (e && mv != 0)) begin failures++; $display("FAIL pgood"); end
  endtask

  initial begin
    #12 rst_n = 1;
    go(1, 700);
    go(1, 500);
    go(1, 420);
    go(1, 700);
    go(0, 700);
    go(1, 420);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
