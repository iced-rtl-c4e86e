// tb_tile_xbar -- self-checking test of the 6x7 tile crossbar: random
// sources and selects, every destination compared with the selected source.
module tb_tile_xbar;
  import iced_pkg::*;
  token_t [XB_IN-1:0]       src;
  logic   [XB_OUT-1:0][2:0] sel;
  token_t [XB_OUT-1:0]      dst;
  logic   [XB_OUT-1:0]      dst_used;
  int checks = 0, failures = 0;

  tile_xbar dut (.src, .sel, .dst, .dst_used);

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 300; it++) begin
      for (int i = 0; i < XB_IN; i++) src[i] = '{pred: 1'($urandom), data: $urandom};
      for (int o = 0; o < XB_OUT; o++) sel[o] = 3'($urandom);
      #1;
      for (int o = 0; o < XB_OUT; o++) begin
        checks++;
        if (sel[o] < 6) begin
          if (dst[o] !== src[sel[o]] || dst_used[o] !== 1'b1) begin
            failures++; $display("FAIL out %0d sel %0d", o, sel[o]);
          end
        end else if (dst_used[o] !== 1'b0 || dst[o] !== '0) begin
          failures++; $display("FAIL unused out %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
