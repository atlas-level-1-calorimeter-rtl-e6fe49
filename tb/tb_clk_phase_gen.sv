// tb_clk_phase_gen: self-checking test of clk_phase_gen.
// After reset the phase count must step 0,1,2,3,0,... on every clock, ce40
// must be high only at phase 0 (one clock in four) and ce80 at phases 0 and
// 2 (one clock in two). Checked over 4000 clocks, including a second reset.
module tb_clk_phase_gen;
  logic clk = 0, rst = 1;
  logic [1:0] ph;
  logic ce80, ce40;
  always #1 clk = ~clk;
  clk_phase_gen dut (.clk, .rst, .ph, .ce80, .ce40);
  int checks = 0, failures = 0;

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_ph, n40, n80;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int pass = 0; pass < 2; pass++) begin
      exp_ph = (int'(ph) + 1) % 4; n40 = 0; n80 = 0;
      for (int k = 0; k < 2000; k++) begin
        @(negedge clk);
        checks++;
        if (int'(ph) != exp_ph || ce40 != (ph == 2'd0) || ce80 != !ph[0]) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d ph=%0d exp=%0d ce40=%b ce80=%b", k, ph, exp_ph, ce40, ce80);
        end
        n40 += int'(ce40); n80 += int'(ce80);
        exp_ph = (exp_ph + 1) % 4;
      end
      checks++;
      if (n40 != 500 || n80 != 1000) begin failures++; $display("FAIL rates %0d %0d", n40, n80); end
      @(negedge clk); rst = 1;
      repeat ($urandom_range(1, 5)) @(negedge clk);
      rst = 0;
      // first negedge after release: the count has taken one step from 0
      @(negedge clk);
      checks++;
      if (ph != 2'd1) begin failures++; $display("FAIL after reset ph=%0d", ph); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
