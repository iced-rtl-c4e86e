// tile_xbar -- the 6x7 routing crossbar inside an ICED tile.
//
// Six sources (the N, E, S, W input channels, the FU result and the
// configuration constant) are routed to seven destinations (the N, E, S, W
// output channels and the three FU operand registers). Each destination has
// its own 3-bit select from the current configuration word; any source may
// feed several destinations in the same cycle, and select SRC_NONE (7) or 6
// leaves a destination unused.
//
// The 6x7 size comes from the architecture; the assignment of the six
// sources and seven destinations is this design's reading of the tile
// organisation (four channels in, the FU result back in, four channels out, three
// operand registers). Purely combinational.
module tile_xbar
  import iced_pkg::*;
(
  input  token_t [XB_IN-1:0]       src,
  input  logic   [XB_OUT-1:0][2:0] sel,
  output token_t [XB_OUT-1:0]      dst,
  output logic   [XB_OUT-1:0]      dst_used
);

  always_comb begin
    for (int o = 0; o < XB_OUT; o++) begin
      dst[o]      = '0;
      dst_used[o] = 1'b0;
      if (sel[o] < 3'(XB_IN)) begin
        dst[o]      = src[sel[o]];
        dst_used[o] = 1'b1;
      end
    end
  end

endmodule
