// tb_spy_mem: self-checking test of spy_mem at 256 x 25 bits.
// After a start pulse the next 256 bunch-tick words must be captured; busy
// is high for the capture, and a start while busy is ignored. The buffer is
// then read through the auto-incrementing read port and compared; a read
// pointer clear and a second read check the re-read path. A second capture
// of new data checks that it overwrites the first.
module tb_spy_mem;
  logic clk = 0, rst = 1;
  logic [1:0] ph;
  logic ce80, ce40;
  always #1 clk = ~clk;
  clk_phase_gen u_cg (.clk, .rst, .ph, .ce80, .ce40);

  logic        start, rd, clr, busy;
  logic [24:0] din, dout;
  spy_mem dut (.clk, .rst, .ce40, .start, .din, .rd, .clr_rd(clr), .dout, .busy);

  int checks = 0, failures = 0;
  logic [24:0] img [256];

  task automatic tick();
    do @(negedge clk); while (!ce40);
    @(negedge clk);
  endtask

  task automatic capture();
    start = 1; tick(); start = 0;
    for (int s = 0; s < 256; s++) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL not busy at %0d", s); end
      img[s] = 25'($urandom());
      din = img[s];
      start = (s == 100);
      tick();
      start = 0;
    end
    din = '1;
    tick();
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
  endtask

  task automatic readback();
    clr = 1; @(negedge clk); clr = 0;
    for (int s = 0; s < 256; s++) begin
      checks++;
      if (dout != img[s]) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d got %h exp %h", s, dout, img[s]);
      end
      rd = 1; @(negedge clk); rd = 0;
    end
  endtask

  initial begin
    #2000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; rd = 0; clr = 0; din = '0;
    repeat (8) @(posedge clk);
    @(negedge clk);
    rst = 0;
    tick();
    capture();
    readback();
    readback();
    capture();
    readback();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
