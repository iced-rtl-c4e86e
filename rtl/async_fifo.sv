// async_fifo -- asynchronous bypass FIFO on a tile's data output.
//
// Neighbouring tiles may sit in different DVFS islands, each clocked by its
// own PLL, so every data channel between tiles crosses a clock domain. Each
// tile output channel therefore ends in this dual-clock FIFO: the producing
// tile writes it with its own clock, the neighbour reads it with its clock.
// That the channel buffers are asynchronous and need a second clock port is
// the architecture's; the structure is this design's choice: a classic
// Gray-coded pointer FIFO with two-flop synchronisers in each direction.
//
// Interface: write side (`wclk`, `wrst_n`, `push`, `wdata`, `full`), read
// side (`rclk`, `rrst_n`, `pop`, `rdata`, `empty`). The read side is
// show-ahead: `rdata` holds the oldest entry while `empty` is low. `push` when
// `full` and `pop` when `empty` are ignored. A written word is visible to the
// reader two to three read-clock edges after the write.
module async_fifo #(
  parameter int unsigned WIDTH = 33,
  parameter int unsigned DEPTH = 4      // power of two, at least 4
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in read domain
  logic [AW:0] wbin_nx, rbin_nx;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  assign wbin_nx = wbin + {{AW{1'b0}}, push & ~full};
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin  <= '0;
      wgray <= '0;
    end else begin
      wbin  <= wbin_nx;
      wgray <= bin2gray(wbin_nx);
    end
  end
  always_ff @(posedge wclk) begin
    if (push && !full) mem[wbin[AW-1:0]] <= wdata;
  end
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) {rgray_w2, rgray_w1} <= '0;
    else         {rgray_w2, rgray_w1} <= {rgray_w1, rgray};
  end
  // full: pointers differ only in the two top Gray bits
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // read domain
  assign rbin_nx = rbin + {{AW{1'b0}}, pop & ~empty};
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin  <= '0;
      rgray <= '0;
    end else begin
      rbin  <= rbin_nx;
      rgray <= bin2gray(rbin_nx);
    end
  end
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) {wgray_r2, wgray_r1} <= '0;
    else         {wgray_r2, wgray_r1} <= {wgray_r1, wgray};
  end
  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];

  initial begin
    assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("async_fifo: DEPTH must be a power of two >= 4");
  end

endmodule
