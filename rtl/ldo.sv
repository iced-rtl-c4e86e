// ldo -- behavioural model of the island's power-header LDO regulator.
//
// BEHAVIOURAL MODEL, not a circuit: the real part is a linear regulator
// built from standard power-header cells, which sets the island supply
// VDD_ISLAND from VDD_CORE. This model keeps its control ports and reports
// the supply as a number of millivolts. When enabled, the output moves
// towards the requested voltage by STEP_MV per clock cycle (a few
// nanoseconds per 100 mV at 434 MHz, matching a regulator that settles on a
// nanosecond scale); when disabled it falls to 0 at the same rate.
// `pgood` is high while the output equals an enabled request.
//
// The voltages used (0.70, 0.50, 0.42 V) are the architecture's; the slew
// rate is assumed.
module ldo #(
  parameter int unsigned STEP_MV = 20
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [9:0] vsel_mv,
  output logic [9:0] vdd_mv,
  output logic       pgood
);

  logic [9:0] target;
  assign target = en ? vsel_mv : 10'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            vdd_mv <= 10'd0;
    else if (vdd_mv + 10'(STEP_MV) <= target) vdd_mv <= vdd_mv + 10'(STEP_MV);
    else if (vdd_mv < target)              vdd_mv <= target;
    else if (vdd_mv >= target + 10'(STEP_MV)) vdd_mv <= vdd_mv - 10'(STEP_MV);
    else                                   vdd_mv <= target;
  end

  assign pgood = en && (vdd_mv == vsel_mv) && (vsel_mv != 10'd0);

endmodule
