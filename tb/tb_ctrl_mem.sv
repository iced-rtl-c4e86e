// tb_ctrl_mem -- self-checking test of the control memory unit: loads
// random words, runs the step counter with random advance over several
// initiation intervals and checks the word, step and first-pass flag.
module tb_ctrl_mem;
  import iced_pkg::*;
  localparam int D = 32;
  logic wclk = 0, clk = 0, rst_n = 0;
  logic cfg_we = 0, cfg_ii_we = 0, run = 0, advance = 0;
  logic [4:0] cfg_addr = 0;
  logic [5:0] cfg_ii = 0;
  ctrl_t cfg_word = '0, ctrl;
  logic [4:0] step;
  logic first_pass;
  ctrl_t ref_mem [D];
  int checks = 0, failures = 0;

  ctrl_mem #(.DEPTH(D)) dut (.*);

  always #2 wclk = ~wclk;
  always #5 clk = ~clk;

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, logic [127:0] g, logic [127:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask

  initial begin
    int exp_step, passes;
    #7 rst_n = 1;
    for (int i = 0; i < D; i++) begin
      ctrl_t w;
      w = '0;
      w.op    = op_e'($urandom % 21);
      w.sel   = 21'($urandom);
      w.boot  = 7'($urandom);
      w.konst = $urandom;
      ref_mem[i] = w;
      @(negedge wclk); cfg_we = 1; cfg_addr = 5'(i); cfg_word = w;
    end
    @(negedge wclk); cfg_we = 0;
    foreach (ref_mem[i]) begin end
    for (int ii = 1; ii <= D; ii += 5) begin
      @(negedge wclk); cfg_ii_we = 1; cfg_ii = 6'(ii);
      @(negedge wclk); cfg_ii_we = 0;
      @(negedge clk); run = 1;
      exp_step = 0; passes = 0;
      for (int c = 0; c < 3 * ii + 5; c++) begin
        advance = 1'($urandom);
        #1;
        chk("step", step, exp_step);
        chk("word", ctrl, ref_mem[exp_step]);
        chk("first", first_pass, passes == 0);
        @(negedge clk);
        if (advance) begin
          exp_step++;
          if (exp_step == ii) begin exp_step = 0; passes++; end
        end
      end
      run = 0;
      @(negedge clk);
      chk("stop", {first_pass, step}, {1'b1, 5'd0});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
