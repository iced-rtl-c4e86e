// tb_dvfs_ctrl_unit -- self-checking test of the per-island DVFS control
// unit, run with the PLL and LDO models. Walks through every level change
// (power-up, down, up, power-gate) and checks at every base-clock cycle
// that the island clock never runs faster than its supply allows, that each
// change ends with the table's voltage and ratio, and that a power-gated
// island has no clock and no supply.
module tb_dvfs_ctrl_unit;
  import iced_pkg::*;
  logic clk = 0, rst_n = 0;
  dvfs_level_e level_req = LVL_PG, level;
  logic pll_en, pll_locked, ldo_en, ldo_pgood, busy, clk_isl;
  clk_div_e pll_div;
  logic [9:0] ldo_mv, vdd_mv;
  int checks = 0, failures = 0, changes = 0;

  dvfs_ctrl_unit dut (.*);
  adpll #(.LOCK_CYCLES(8)) u_pll (.ref_clk(clk), .rst_n, .en(pll_en), .div(pll_div),
                                  .clk_out(clk_isl), .locked(pll_locked));
  ldo #(.STEP_MV(20)) u_ldo (.clk, .rst_n, .en(ldo_en), .vsel_mv(ldo_mv),
                             .vdd_mv, .pgood(ldo_pgood));
  always #1 clk = ~clk;

  function automatic int need_mv(clk_div_e d);
    case (d)
      DIV1: return 700;
      DIV2: return 500;
      default: return 420;
    endcase
  endfunction

  // safety: a running clock never outpaces the supply
  always @(posedge clk) if (rst_n && u_pll.cur_en) begin
    checks++;
    if (vdd_mv < need_mv(u_pll.cur_div)) begin
      failures++; $display("FAIL %0t: clock div %0d at %0d mV", $time, u_pll.cur_div, vdd_mv);
    end
  end

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic go(dvfs_level_e l);
    @(negedge clk); level_req = l;
    @(negedge clk);
    checks++;
    if (!busy) begin failures++; $display("FAIL not busy after request"); end
    wait (!busy);
    @(negedge clk);
    changes++;
    checks++;
    if (level !== l) begin failures++; $display("FAIL level %0d exp %0d", level, l); end
    if (l == LVL_PG) for (int i = 0; i < 100 && vdd_mv != 0; i++) @(negedge clk);
    checks++;
    if (vdd_mv !== level_mv(l)) begin failures++; $display("FAIL vdd %0d for level %0d", vdd_mv, l); end
    if (l != LVL_PG) begin
      checks++;
      if (!pll_locked || u_pll.cur_div !== level_div(l)) begin failures++; $display("FAIL clock for level %0d", l); end
    end else begin
      checks++;
      if (u_pll.cur_en || ldo_en) begin failures++; $display("FAIL not gated"); end
    end
  endtask

  initial begin
    #5 rst_n = 1;
    go(LVL_NORMAL);
    go(LVL_RELAX);
    go(LVL_REST);
    go(LVL_NORMAL);
    go(LVL_REST);
    go(LVL_RELAX);
    go(LVL_PG);
    go(LVL_REST);
    go(LVL_PG);
    go(LVL_NORMAL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
