// spm_xbar -- the 6x8 crossbar between the left-column tiles and the
// scratchpad banks.
//
// Only the six tiles of the leftmost column reach the scratchpad. Each of
// them presents at most one word access per cycle; the crossbar steers it to
// the bank given by the low address bits (word interleaving) and returns
// that bank's read data. Every bank has one read and one write port, so a
// read and a write may reach the same bank in one cycle; two reads (or two
// writes) to one bank conflict, and the lower-numbered port (the lower row)
// wins. A port that loses sees `gnt` low and its tile retries.
//
// The 6x8 size and the per-bank read/write port pair are the architecture's;
// the interleaving, the word addressing and the fixed-priority arbitration
// are this design's choices. Purely combinational.
module spm_xbar
  import iced_pkg::*;
#(
  parameter int unsigned PORTS      = 6,
  parameter int unsigned BANKS      = 8,
  parameter int unsigned BANK_WORDS = 1024
) (
  // tile side
  input  logic [PORTS-1:0]                          req,
  input  logic [PORTS-1:0]                          we,
  input  logic [PORTS-1:0][DATA_W-1:0]              addr,   // word address
  input  logic [PORTS-1:0][DATA_W-1:0]              wdata,
  output logic [PORTS-1:0][DATA_W-1:0]              rdata,
  output logic [PORTS-1:0]                          gnt,
  // bank side
  output logic [BANKS-1:0][$clog2(BANK_WORDS)-1:0]  bank_raddr,
  input  logic [BANKS-1:0][DATA_W-1:0]              bank_rdata,
  output logic [BANKS-1:0]                          bank_we,
  output logic [BANKS-1:0][$clog2(BANK_WORDS)-1:0]  bank_waddr,
  output logic [BANKS-1:0][DATA_W-1:0]              bank_wdata,
  output logic                                      conflict
);

  localparam int unsigned BW = $clog2(BANKS);
  localparam int unsigned RW = $clog2(BANK_WORDS);

  logic [BANKS-1:0] bank_re;

  logic [PORTS-1:0][BW-1:0] bank_of;
  logic [PORTS-1:0][RW-1:0] row_of;

  always_comb begin
    for (int p = 0; p < PORTS; p++) begin
      bank_of[p] = addr[p][BW-1:0];
      row_of[p]  = addr[p][BW +: RW];
    end
    bank_re    = '0;  // read-port claims
    bank_raddr = '0;
    bank_we    = '0;
    bank_waddr = '0;
    bank_wdata = '0;
    gnt        = '0;
    for (int p = 0; p < PORTS; p++) begin
      if (req[p]) begin
        if (we[p]) begin
          if (!bank_we[bank_of[p]]) begin
            bank_we[bank_of[p]]    = 1'b1;
            bank_waddr[bank_of[p]] = row_of[p];
            bank_wdata[bank_of[p]] = wdata[p];
            gnt[p]                 = 1'b1;
          end
        end else begin
          if (!bank_re[bank_of[p]]) begin
            bank_re[bank_of[p]]    = 1'b1;
            bank_raddr[bank_of[p]] = row_of[p];
            gnt[p]                 = 1'b1;
          end
        end
      end
    end
    conflict = |(req & ~gnt);
  end

  // read data return, kept apart from the arbitration above
  always_comb begin
    for (int p = 0; p < PORTS; p++) rdata[p] = bank_rdata[addr[p][BW-1:0]];
  end

endmodule
