// dvfs_ctrl_unit -- per-island DVFS control unit.
//
// Every DVFS island (2x2 tiles) has one of these next to its LDO and PLL.
// It receives the level the DVFS controller wants for the island, looks the
// level up in a voltage/frequency table (normal 0.70 V / base clock, relax
// 0.50 V / half, rest 0.42 V / quarter, power-gated 0 V / no clock) and
// sequences the change so the logic never runs faster than its supply
// allows: going up, the voltage is raised first and the clock changed once
// the LDO reports power-good; going down, the clock is slowed first and the
// voltage lowered once the PLL has locked; power-gating stops the clock and
// then turns the LDO off. `level` reports the level in force and `busy` is
// high during a change. A new request is taken only when idle.
//
// The table values are the architecture's; the sequencing order and the
// handshake with the LDO and PLL are this design's choices. Runs on the base
// clock; resets to power-gated.
module dvfs_ctrl_unit
  import iced_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  dvfs_level_e level_req,
  // PLL
  output logic        pll_en,
  output clk_div_e    pll_div,
  input  logic        pll_locked,
  // LDO
  output logic        ldo_en,
  output logic [9:0]  ldo_mv,
  input  logic        ldo_pgood,
  // status
  output dvfs_level_e level,
  output logic        busy
);

  typedef enum logic [2:0] {S_IDLE, S_VUP, S_FUP, S_FDN, S_VDN, S_PGOFF} state_e;
  state_e      state;
  dvfs_level_e target;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      target  <= LVL_PG;
      level   <= LVL_PG;
      pll_en  <= 1'b0;
      pll_div <= DIV4;
      ldo_en  <= 1'b0;
      ldo_mv  <= 10'd0;
    end else begin
      unique case (state)
        S_IDLE: if (level_req != level) begin
          target <= level_req;
          if (level_req > level) begin
            ldo_en <= 1'b1;
            ldo_mv <= level_mv(level_req);
            state  <= S_VUP;
          end else if (level_req == LVL_PG) begin
            pll_en <= 1'b0;
            state  <= S_PGOFF;
          end else begin
            pll_div <= level_div(level_req);
            state   <= S_FDN;
          end
        end
        S_VUP: if (ldo_pgood) begin
          pll_en  <= 1'b1;
          pll_div <= level_div(target);
          state   <= S_FUP;
        end
        S_FUP: if (pll_locked) begin
          level <= target;
          state <= S_IDLE;
        end
        S_FDN: if (pll_locked) begin
          ldo_mv <= level_mv(target);
          state  <= S_VDN;
        end
        S_VDN: if (ldo_pgood) begin
          level <= target;
          state <= S_IDLE;
        end
        S_PGOFF: if (pll_locked) begin   // the PLL has stopped the clock
          ldo_en <= 1'b0;
          ldo_mv <= 10'd0;
          level  <= LVL_PG;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
