// tb_playback_mem: self-checking test of playback_mem at 256 slices x 8
// channels x 10 bits.
// The memory is loaded through the auto-incrementing write port (channel
// first, then slice), started, and each of the 256 played slices is compared
// with what was written; active must be high for exactly those 256 ticks.
// A second run is stopped after 40 slices; a third run after an address
// clear and a partial reload checks that the write address restarts at 0.
module tb_playback_mem;
  logic clk = 0, rst = 1;
  logic [1:0] ph;
  logic ce80, ce40;
  always #1 clk = ~clk;
  clk_phase_gen u_cg (.clk, .rst, .ph, .ce80, .ce40);

  logic       wr, clr, start, stop, active;
  logic [9:0] wdata;
  logic [7:0][9:0] dout;
  playback_mem dut (.clk, .rst, .ce40, .wr, .wdata, .clr_addr(clr), .start, .stop, .active, .dout);

  int checks = 0, failures = 0;
  logic [7:0][9:0] img [256];

  task automatic tick();
    do @(negedge clk); while (!ce40);
    @(negedge clk);
  endtask

  task automatic load(input int nslices);
    clr = 1; @(negedge clk); clr = 0;
    for (int s = 0; s < nslices; s++)
      for (int c = 0; c < 8; c++) begin
        img[s][c] = 10'($urandom());
        wdata = img[s][c]; wr = 1; @(negedge clk); wr = 0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
  endtask

  task automatic run(input int stop_at);
    int n = 0;
    start = 1; tick(); start = 0;
    checks++;
    if (active) begin failures++; $display("FAIL active at start"); end
    for (int s = 0; s < 260; s++) begin
      if (s == stop_at) stop = 1;
      tick();
      stop = 0;
      if (active) begin
        checks++;
        if (dout != img[n]) begin
          failures++;
          if (failures < 10) $display("FAIL slice %0d got %h exp %h", n, dout, img[n]);
        end
        n++;
      end
    end
    checks++;
    if (n != ((stop_at < 256) ? stop_at : 256)) begin failures++; $display("FAIL played %0d slices", n); end
  endtask

  initial begin
    #2000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = 0; clr = 0; start = 0; stop = 0; wdata = '0;
    repeat (8) @(posedge clk);
    @(negedge clk);
    rst = 0;
    load(256);
    run(1000);
    run(40);
    load(10);
    run(1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
