// tb_lvds_sync: self-checking test of lvds_sync.
// A random 10-bit word is launched every bunch tick. For each of the four
// sample phases the latency from launch to output is measured on the first
// words and then required to hold for 200 more words; the extra-delay
// option must add exactly one tick. /LOCK must follow its input two ticks
// later. The latency table found is printed and checked against the
// expected one: 1 tick for sample phases 0 and 1, 0 ticks for phases 2 and 3.
module tb_lvds_sync;
  logic clk = 0, rst = 1;
  logic [1:0] ph;
  logic ce80, ce40;
  always #1 clk = ~clk;
  clk_phase_gen u_cg (.clk, .rst, .ph, .ce80, .ce40);

  logic [9:0] din, dout;
  logic       lock_n, lock_n_sync, extra;
  logic [1:0] psel;
  lvds_sync dut (.clk, .rst, .ph, .ce40, .din, .lock_n, .phase_sel(psel),
                 .extra_delay(extra), .dout, .lock_n_sync);

  int checks = 0, failures = 0;
  logic [9:0] sent [0:299];
  logic       lsent [0:299];

  task automatic tick();
    do @(negedge clk); while (!ce40);
    @(negedge clk);
  endtask

  initial begin
    #200000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat [2];
    din = '0; lock_n = 1; psel = 0; extra = 0;
    repeat (8) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int p = 0; p < 4; p++) begin
      for (int x = 0; x < 2; x++) begin
        psel = 2'(p); extra = x[0];
        lat[x] = -1;
        repeat (4) tick();
        for (int k = 0; k < 300; k++) begin
          sent[k] = 10'($urandom());
          lsent[k] = ($urandom_range(0, 9) == 0);
          din = sent[k];
          lock_n = lsent[k];
          tick();
          if (lat[x] < 0 && k >= 6) begin
            for (int l = 0; l <= 5; l++)
              if (lat[x] < 0 && dout == sent[k-l] && dout != sent[k-l-1]) lat[x] = l;
          end else if (lat[x] >= 0) begin
            checks++;
            if (dout != sent[k - lat[x]]) begin
              failures++;
              if (failures < 10) $display("FAIL psel=%0d x=%0d k=%0d", p, x, k);
            end
          end
          if (k >= 2) begin
            checks++;
            if (lock_n_sync != lsent[k-1]) begin failures++; $display("FAIL lock k=%0d", k); end
          end
        end
        checks++;
        if (lat[x] < 0) begin failures++; $display("FAIL no latency found psel=%0d", p); end
      end
      checks++;
      checks++;
      if (lat[0] != ((p < 2) ? 1 : 0)) begin failures++; $display("FAIL latency %0d at phase %0d", lat[0], p); end
      if (lat[1] != lat[0] + 1) begin failures++; $display("FAIL extra delay %0d %0d", lat[0], lat[1]); end
      $display("phase %0d: latency %0d tick(s), %0d with extra delay", p, lat[0], lat[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
