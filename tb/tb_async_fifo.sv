// tb_async_fifo -- self-checking test of the dual-clock FIFO. The writer
// runs at the base clock and the reader at a quarter of it, then the
// reverse; random push/pop; every word read is compared with a reference
// queue, order and count included, and the writer must see `full`.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic push, pop, full, empty;
  logic [32:0] wdata, rdata;
  int checks = 0, failures = 0, fulls = 0;
  int wper = 2, rper = 8;
  logic [32:0] q[$];
  bit   done = 0;

  async_fifo #(.WIDTH(33), .DEPTH(4)) dut (.wclk, .wrst_n(rst_n), .push, .wdata, .full,
                                          .rclk, .rrst_n(rst_n), .pop, .rdata, .empty);

  always #(wper) wclk = ~wclk;
  always #(rper) rclk = ~rclk;

  initial begin
    #400000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nw = 0, nr = 0;
  localparam int N = 300;

  always @(posedge wclk) begin
    if (rst_n && push && !full) begin q.push_back(wdata); nw++; end
    if (rst_n && full) fulls++;
    push  <= rst_n && (nw < N) && ($urandom % 3 != 0);
    wdata <= 33'({$urandom, $urandom});
  end

  always @(posedge rclk) begin
    if (rst_n && pop && !empty) begin
      checks++;
      if (q.size() == 0 || rdata !== q[0]) begin
        failures++; $display("FAIL read %h", rdata);
      end
      if (q.size() != 0) void'(q.pop_front());
      nr++;
    end
    pop <= rst_n && ($urandom % 4 != 0);
  end

  initial begin
    push = 0; pop = 0; wdata = 0;
    #20 rst_n = 1;
    wait (nr == N);
    // swap speeds: fast reader, slow writer
    rst_n = 0; nw = 0; nr = 0; q.delete();
    wper = 9; rper = 2;
    #40 rst_n = 1;
    wait (nr == N);
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL never full"); end
    $display("fulls=%0d", fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
