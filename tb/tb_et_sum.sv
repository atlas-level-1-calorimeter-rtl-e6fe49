// tb_et_sum: self-checking test of et_sum.
// Random 32-element inputs and thresholds are summed by a model in this file
// (threshold, 12-bit saturation, saturated inputs); directed cases cover the
// all-zero input, overflow of the tree and a single saturated element. The
// 6-tick latency is checked with a single impulse.
module tb_et_sum;
  import jem_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] ph;
  logic ce80, ce40;
  always #1 clk = ~clk;
  clk_phase_gen u_cg (.clk, .rst, .ph, .ce80, .ce40);

  je_t [31:0] je;
  je_t        thr;
  esum_t      et;
  et_sum dut (.clk, .rst, .ce40, .je, .threshold(thr), .et);

  int checks = 0, failures = 0;

  task automatic tick(input int n);
    repeat (n) begin
      do @(negedge clk); while (!ce40);
      @(negedge clk);
    end
  endtask

  function automatic int model();
    int s = 0;
    for (int i = 0; i < 32; i++) begin
      if (je[i] == 10'h3FF) return 4095;
      if (je[i] > thr) s += int'(je[i]);
    end
    return (s > 4095) ? 4095 : s;
  endfunction

  task automatic check(input string name);
    int exp = model();
    tick(8);
    checks++;
    if (int'(et) != exp) begin
      failures++;
      $display("FAIL %s: et=%0d exp=%0d", name, et, exp);
    end
  endtask

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    je = '0; thr = '0;
    repeat (8) @(posedge clk);
    @(negedge clk);
    rst = 0;
    check("zero");
    // latency
    je[5] = 10'd77;
    lat = 0;
    for (int k = 1; k <= 8; k++) begin
      tick(1);
      if (et != 0 && lat == 0) lat = k;
    end
    checks++;
    if (lat != 6) begin failures++; $display("FAIL latency %0d", lat); end
    check("impulse");
    for (int i = 0; i < 32; i++) je[i] = 10'd1000;
    check("overflow");
    je = '0; je[17] = 10'h3FF;
    check("saturated input");
    je = '0; je[3] = 10'd50; je[4] = 10'd51; thr = 10'd50;
    check("threshold");
    for (int n = 0; n < 400; n++) begin
      for (int i = 0; i < 32; i++) je[i] = 10'($urandom_range(0, (n % 3 == 0) ? 1023 : 150));
      thr = 10'($urandom_range(0, 100));
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
