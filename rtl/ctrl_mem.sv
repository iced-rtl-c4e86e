// ctrl_mem -- control memory unit of an ICED tile.
//
// Holds the tile's configuration words, one per step of the modulo schedule,
// and a step counter that walks through the first `ii` of them, one step per
// firing of the tile, wrapping back to step 0. That each tile has a
// configuration memory feeding the FU and the crossbar is the architecture's;
// the depth, the loading port and the counter are this design's choices.
//
// Loading: words and the initiation interval are written through the
// `cfg_*` port on the base clock `wclk` (the DMA side), while the fabric is
// stopped. Execution: on the tile clock `clk`, while `run` is high, every
// cycle with `advance` high moves to the next step. `first_pass` is high until
// the first wrap; it lets a schedule start recurrences from constants. While
// `run` is low the counter sits at step 0 with `first_pass` set. `ctrl` is
// the current word, read combinationally. A programmed `ii` of 0 acts as 1.
// Words and `ii` are not reset and must be loaded before `run`; `rst_n`
// resets only the step counter.
module ctrl_mem
  import iced_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic                     wclk,
  input  logic                     rst_n,
  input  logic                     cfg_we,
  input  logic [$clog2(DEPTH)-1:0] cfg_addr,
  input  ctrl_t                    cfg_word,
  input  logic                     cfg_ii_we,
  input  logic [$clog2(DEPTH):0]   cfg_ii,
  input  logic                     clk,
  input  logic                     run,
  input  logic                     advance,
  output ctrl_t                    ctrl,
  output logic [$clog2(DEPTH)-1:0] step,
  output logic                     first_pass
);

  localparam int unsigned AW = $clog2(DEPTH);

  ctrl_t          mem [DEPTH];
  logic [AW:0]    ii;
  logic [AW:0]    step_nx;

  always_ff @(posedge wclk) begin
    if (cfg_we) mem[cfg_addr] <= cfg_word;
  end

  // like the words, the interval is configuration: it is not reset, so a
  // fabric reset between runs keeps the loaded schedule
  always_ff @(posedge wclk) begin
    if (cfg_ii_we) ii <= (cfg_ii == '0) ? (AW+1)'(1) : cfg_ii;
  end

  assign step_nx = {1'b0, step} + (AW+1)'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step       <= '0;
      first_pass <= 1'b1;
    end else if (!run) begin
      step       <= '0;
      first_pass <= 1'b1;
    end else if (advance) begin
      if (step_nx >= ii) begin
        step       <= '0;
        first_pass <= 1'b0;
      end else begin
        step       <= step_nx[AW-1:0];
      end
    end
  end

  assign ctrl = mem[step];

endmodule
