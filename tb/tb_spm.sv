// tb_spm -- self-checking test of the 8-bank scratchpad: fills all 32 KB
// through the DMA port, reads it back, then writes and reads through the
// per-bank fabric ports and checks against a reference array.
module tb_spm;
  localparam int B = 8, W = 1024;
  logic clk = 0;
  logic [B-1:0][9:0] bank_raddr = '0, bank_waddr = '0;
  logic [B-1:0][31:0] bank_rdata, bank_wdata = '0;
  logic [B-1:0] bank_we = '0;
  logic dma_en = 0, dma_we = 0;
  logic [12:0] dma_addr = '0;
  logic [31:0] dma_wdata = '0, dma_rdata;
  logic [31:0] ref_mem [B * W];
  int checks = 0, failures = 0;

  spm #(.BANKS(B), .BANK_WORDS(W)) dut (.*);
  always #2 clk = ~clk;

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < B * W; a++) begin
      ref_mem[a] = a * 32'h9e3779b1 + 7;
      @(negedge clk); dma_en = 1; dma_we = 1; dma_addr = 13'(a); dma_wdata = ref_mem[a];
    end
    @(negedge clk); dma_we = 0;
    for (int a = 0; a < B * W; a += 3) begin
      dma_addr = 13'(a); #1;
      checks++;
      if (dma_rdata !== ref_mem[a]) begin failures++; $display("FAIL dma rd %0d", a); end
    end
    dma_en = 0;
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      for (int b = 0; b < B; b++) begin
        bank_we[b] = 1'($urandom); bank_waddr[b] = 10'($urandom); bank_wdata[b] = $urandom;
        if (bank_we[b]) ref_mem[{bank_waddr[b], 3'(b)}] = bank_wdata[b];
      end
      @(negedge clk);
      bank_we = '0;
      for (int b = 0; b < B; b++) bank_raddr[b] = 10'($urandom);
      #1;
      for (int b = 0; b < B; b++) begin
        checks++;
        if (bank_rdata[b] !== ref_mem[{bank_raddr[b], 3'(b)}]) begin
          failures++; $display("FAIL bank %0d row %0d", b, bank_raddr[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
