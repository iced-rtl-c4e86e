// spm -- the ICED scratchpad data memory: 32 KB in eight banks.
//
// Each bank holds BANK_WORDS 32-bit words (1024 by default, so 8 x 4 KB =
// 32 KB) and has one write port and one read port. The read port is
// asynchronous (a register-file style read), so a load returns its word in
// the same tile cycle, which keeps the FU single-cycle; the write port is
// synchronous to the base clock. The DMA port loads and unloads the memory
// while the fabric is idle; when `dma_en` is high it takes both ports of the
// bank its address selects; the fabric must not access the memory meanwhile
// (the top-level withholds fabric requests while `dma_en` is high).
//
// Size, bank count and the read/write port pair are the architecture's; the
// asynchronous read, the word interleaving (bank = low address bits) and the
// DMA priority are this design's choices.
module spm
  import iced_pkg::*;
#(
  parameter int unsigned BANKS      = 8,
  parameter int unsigned BANK_WORDS = 1024
) (
  input  logic                                      clk,
  // fabric side (from spm_xbar)
  input  logic [BANKS-1:0][$clog2(BANK_WORDS)-1:0]  bank_raddr,
  output logic [BANKS-1:0][DATA_W-1:0]              bank_rdata,
  input  logic [BANKS-1:0]                          bank_we,
  input  logic [BANKS-1:0][$clog2(BANK_WORDS)-1:0]  bank_waddr,
  input  logic [BANKS-1:0][DATA_W-1:0]              bank_wdata,
  // DMA side, word address
  input  logic                                      dma_en,
  input  logic                                      dma_we,
  input  logic [$clog2(BANKS*BANK_WORDS)-1:0]       dma_addr,
  input  logic [DATA_W-1:0]                         dma_wdata,
  output logic [DATA_W-1:0]                         dma_rdata
);

  localparam int unsigned BW = $clog2(BANKS);
  localparam int unsigned RW = $clog2(BANK_WORDS);

  logic [BW-1:0] dma_bank;
  logic [RW-1:0] dma_row;
  assign dma_bank = dma_addr[BW-1:0];
  assign dma_row  = dma_addr[BW +: RW];

  logic [BANKS-1:0][DATA_W-1:0] rd;

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    logic [DATA_W-1:0] mem [BANK_WORDS];
    logic              dma_here;
    logic              we;
    logic [RW-1:0]     waddr, raddr;
    logic [DATA_W-1:0] wdata;

    assign dma_here = dma_en && (dma_bank == BW'(b));
    assign we       = dma_here ? dma_we    : bank_we[b];
    assign waddr    = dma_here ? dma_row   : bank_waddr[b];
    assign wdata    = dma_here ? dma_wdata : bank_wdata[b];
    assign raddr    = dma_here ? dma_row   : bank_raddr[b];

    always_ff @(posedge clk) begin
      if (we) mem[waddr] <= wdata;
    end
    assign rd[b]         = mem[raddr];
  end

  assign bank_rdata = rd;
  assign dma_rdata  = rd[dma_bank];

endmodule
