// adpll -- behavioural model of the island's all-digital PLL.
//
// BEHAVIOURAL MODEL, not a circuit: the real part is an all-digital PLL
// (a DCO in a digital loop), one per DVFS island, which is analog in
// nature. This model keeps its ports and its observable behaviour: an
// island clock at the base frequency (434 MHz), half of it (217 MHz) or a
// quarter of it (108.5 MHz), or no clock when disabled, plus a lock flag.
// The output is derived from the reference clock, so the island clocks
// keep integer ratios to the base clock and edges of a divided clock line
// up with reference edges.
//
// Behaviour: `div` and `en` are taken only at a period boundary of the
// output clock, so the output never shows a runt pulse; `locked` drops when
// `div` or `en` changes and rises LOCK_CYCLES reference cycles after the new
// setting took effect. The three ratios are the architecture's; the lock
// time and the switching rule are assumed.
module adpll
  import iced_pkg::*;
#(
  parameter int unsigned LOCK_CYCLES = 8
) (
  input  logic     ref_clk,
  input  logic     rst_n,
  input  logic     en,
  input  clk_div_e div,
  output logic     clk_out,
  output logic     locked
);

  clk_div_e    cur_div;
  logic        cur_en;
  logic [1:0]  phase;
  logic        half;        // high half of a divided period
  logic [7:0]  lock_cnt;
  logic [1:0]  last;

  always_comb begin
    case (cur_div)
      DIV2:    last = 2'd1;
      DIV4:    last = 2'd3;
      default: last = 2'd0;
    endcase
  end

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_div  <= DIV1;
      cur_en   <= 1'b0;
      phase    <= '0;
      half     <= 1'b0;
      lock_cnt <= '0;
    end else begin
      if (phase == last) begin
        // period boundary: take the new setting
        cur_div <= div;
        cur_en  <= en;
        phase   <= '0;
        half    <= en && (div != DIV1);
        if (div != cur_div || en != cur_en) lock_cnt <= '0;
        else if (lock_cnt != 8'(LOCK_CYCLES)) lock_cnt <= lock_cnt + 8'd1;
      end else begin
        phase <= phase + 2'd1;
        // DIV2: high for phase 0; DIV4: high for phases 0 and 1
        half  <= cur_en && (cur_div == DIV4) && (phase == 2'd0);
        if (lock_cnt != 8'(LOCK_CYCLES)) lock_cnt <= lock_cnt + 8'd1;
      end
    end
  end

  assign clk_out = cur_en && ((cur_div == DIV1) ? ref_clk : half);
  assign locked  = (lock_cnt == 8'(LOCK_CYCLES)) && (cur_div == div) && (cur_en == en);

endmodule
