// tb_spm_xbar -- self-checking test of the 6x8 scratchpad crossbar:
// random requests from six ports; checks bank steering, row address, write
// data, read-data return and the fixed-priority grant per bank and port
// kind, against a reference arbiter written here.
module tb_spm_xbar;
  localparam int P = 6, B = 8, W = 1024;
  logic [P-1:0] req, we, gnt;
  logic [P-1:0][31:0] addr, wdata, rdata;
  logic [B-1:0][9:0] bank_raddr, bank_waddr;
  logic [B-1:0][31:0] bank_rdata, bank_wdata;
  logic [B-1:0] bank_we;
  logic conflict;
  int checks = 0, failures = 0, conflicts = 0;

  spm_xbar #(.PORTS(P), .BANKS(B), .BANK_WORDS(W)) dut (.*);

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit rtaken[B], wtaken[B];
    bit eg;
    bit any_conf;
    for (int it = 0; it < 500; it++) begin
      for (int p = 0; p < P; p++) begin
        req[p] = 1'($urandom); we[p] = 1'($urandom);
        addr[p] = $urandom % (B * W * 2);
        if (it % 3 == 0) addr[p][2:0] = 3'(p % 2);   // force collisions
        wdata[p] = $urandom;
      end
      for (int b = 0; b < B; b++) bank_rdata[b] = $urandom;
      #1;
      for (int b = 0; b < B; b++) begin rtaken[b] = 0; wtaken[b] = 0; end
      any_conf = 0;
      for (int p = 0; p < P; p++) begin
        int b;
        b = addr[p][2:0];
        eg = 0;
        if (req[p]) begin
          if (we[p] && !wtaken[b]) begin
            eg = 1; wtaken[b] = 1;
            checks++;
            if (!bank_we[b] || bank_waddr[b] !== addr[p][12:3] || bank_wdata[b] !== wdata[p]) begin
              failures++; $display("FAIL write steer port %0d", p);
            end
          end else if (!we[p] && !rtaken[b]) begin
            eg = 1; rtaken[b] = 1;
            checks++;
            if (bank_raddr[b] !== addr[p][12:3]) begin failures++; $display("FAIL raddr port %0d", p); end
          end
        end
        if (req[p] && !eg) any_conf = 1;
        checks++;
        if (gnt[p] !== eg) begin failures++; $display("FAIL gnt port %0d", p); end
        checks++;
        if (rdata[p] !== bank_rdata[b]) begin failures++; $display("FAIL rdata port %0d", p); end
      end
      for (int b = 0; b < B; b++) begin
        checks++;
        if (bank_we[b] !== wtaken[b]) begin failures++; $display("FAIL spurious write bank %0d", b); end
      end
      checks++;
      if (conflict !== any_conf) begin failures++; $display("FAIL conflict flag"); end
      if (any_conf) conflicts++;
    end
    checks++;
    if (conflicts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
