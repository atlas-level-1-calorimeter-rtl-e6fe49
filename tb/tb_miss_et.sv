// tb_miss_et: self-checking test of miss_et.
// The model adds each phi row, projects it with the split 6-bit
// multiplication (hi * c / 64 + lo * c / 4096, both truncated) and sums with
// 12-bit saturation. Checks: random inputs and coefficients, a saturated
// element, a coefficient of 4095 against the exact product within 1 LSB per
// row, and the 6-tick latency.
module tb_miss_et;
  import jem_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] ph;
  logic ce80, ce40;
  always #1 clk = ~clk;
  clk_phase_gen u_cg (.clk, .rst, .ph, .ce80, .ce40);

  je_t [7:0][3:0]    je;
  logic [7:0][11:0]  cx, cy;
  esum_t             ex, ey;
  miss_et dut (.clk, .rst, .ce40, .je, .coef_x(cx), .coef_y(cy), .ex, .ey);

  int checks = 0, failures = 0;

  task automatic tick(input int n);
    repeat (n) begin
      do @(negedge clk); while (!ce40);
      @(negedge clk);
    end
  endtask

  function automatic int proj(input int s, input int c);
    if (s >= 4095) return 4095;
    return ((s / 64) * c) / 64 + ((s % 64) * c) / 4096;
  endfunction

  function automatic int model(input bit y);
    int tot = 0;
    for (int p = 0; p < 8; p++) begin
      int s = 0;
      for (int e = 0; e < 4; e++) s += (je[p][e] == 10'h3FF) ? 4095 : int'(je[p][e]);
      if (s > 4095) s = 4095;
      tot += proj(s, y ? int'(cy[p]) : int'(cx[p]));
    end
    return (tot > 4095) ? 4095 : tot;
  endfunction

  task automatic check(input string name);
    int xe = model(0), ye = model(1);
    tick(8);
    checks++;
    if (int'(ex) != xe || int'(ey) != ye) begin
      failures++;
      $display("FAIL %s: ex=%0d exp=%0d ey=%0d exp=%0d", name, ex, xe, ey, ye);
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
    je = '0;
    for (int p = 0; p < 8; p++) begin
      // |cos| and |sin| of the centres of 8 bins covering 90 degrees
      cx[p] = 12'($rtoi(4095.0 * $cos((p + 0.5) * 3.14159265 / 16.0)));
      cy[p] = 12'($rtoi(4095.0 * $sin((p + 0.5) * 3.14159265 / 16.0)));
    end
    repeat (8) @(posedge clk);
    @(negedge clk);
    rst = 0;
    check("zero");
    je[2][1] = 10'd500;
    lat = 0;
    for (int k = 1; k <= 8; k++) begin
      tick(1);
      if (ex != 0 && lat == 0) lat = k;
    end
    checks++;
    if (lat != 6) begin failures++; $display("FAIL latency %0d", lat); end
    check("impulse");
    // accuracy against the exact product with full-scale coefficients
    cx = {8{12'd4095}};
    je = '0; je[0][0] = 10'd1000; je[0][1] = 10'd1000;
    tick(8);
    checks++;
    if (ex > 12'd2000 || ex < 12'd1998) begin failures++; $display("FAIL accuracy ex=%0d", ex); end
    je[4][2] = 10'h3FF;
    check("saturated element");
    for (int n = 0; n < 300; n++) begin
      for (int p = 0; p < 8; p++) begin
        for (int e = 0; e < 4; e++) je[p][e] = 10'($urandom_range(0, (n % 4 == 0) ? 1023 : 120));
        cx[p] = 12'($urandom_range(0, 4095));
        cy[p] = 12'($urandom_range(0, 4095));
      end
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
