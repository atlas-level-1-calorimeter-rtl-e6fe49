// tb_jet_element_former: self-checking test of jet_element_former.
// The model adds the e.m. and hadronic 9-bit towers, forces 1023 when either
// input is saturated (511), zeroes sums below the threshold and halves the
// unsaturated FCAL channels. Directed saturation and threshold-edge cases are
// followed by 2000 random ticks; the result must appear one tick later.
module tb_jet_element_former;
  import jem_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] ph;
  logic ce80, ce40;
  always #1 clk = ~clk;
  clk_phase_gen u_cg (.clk, .rst, .ph, .ce80, .ce40);

  logic [3:0][8:0] em, had;
  logic [8:0]      thr;
  logic [3:0]      fm;
  je_t  [3:0]      je;
  jet_element_former dut (.clk, .rst, .ce40, .em, .had, .threshold(thr), .fcal_mask(fm), .je);

  int checks = 0, failures = 0;

  task automatic tick();
    do @(negedge clk); while (!ce40);
    @(negedge clk);
  endtask

  function automatic int model(input int i);
    int s = int'(em[i]) + int'(had[i]);
    if (em[i] == 9'h1FF || had[i] == 9'h1FF) return 1023;
    if (s < int'(thr)) s = 0;
    return fm[i] ? s / 2 : s;
  endfunction

  task automatic check();
    int e[4];
    for (int i = 0; i < 4; i++) e[i] = model(i);
    tick();
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (int'(je[i]) != e[i]) begin
        failures++;
        if (failures < 10) $display("FAIL ch%0d em=%0d had=%0d got %0d exp %0d", i, em[i], had[i], je[i], e[i]);
      end
    end
  endtask

  initial begin
    #200000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    em = '0; had = '0; thr = '0; fm = '0;
    repeat (8) @(posedge clk);
    @(negedge clk);
    rst = 0;
    check();
    em = {9'h1FF, 9'd0, 9'd510, 9'd3}; had = {9'd0, 9'h1FF, 9'd510, 9'd4}; fm = 4'b0001;
    check();
    thr = 9'd7; fm = '0;
    check();
    em[0] = 9'd2; fm = 4'b1111;
    check();
    for (int k = 0; k < 2000; k++) begin
      for (int i = 0; i < 4; i++) begin
        em[i]  = ($urandom_range(0, 30) == 0) ? 9'h1FF : 9'($urandom_range(0, 510));
        had[i] = 9'($urandom_range(0, (k % 2) ? 510 : 20));
      end
      thr = 9'($urandom_range(0, 40));
      fm  = 4'($urandom());
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
