// tb_je_link: self-checking test of je_mux and je_demux connected back to
// back, as on a backplane link between two FPGAs.
// A random 10-bit jet element (with 1023 and 0 mixed in) is presented every
// bunch tick. The tick latency through the pair is found from the first
// words and must then hold for 2000 words; the 5-bit line must carry the
// low half at phases 1-2 and the high half at phases 3-0.
module tb_je_link;
  import jem_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] ph;
  logic ce80, ce40;
  always #1 clk = ~clk;
  clk_phase_gen u_cg (.clk, .rst, .ph, .ce80, .ce40);

  je_t        je_in, je_out;
  logic [4:0] line;
  je_mux   u_mux (.clk, .rst, .ph, .je(je_in), .dout(line));
  je_demux u_dmx (.clk, .rst, .ph, .din(line), .je(je_out));

  int checks = 0, failures = 0;
  je_t sent [0:2099];

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
    int lat = -1;
    je_in = '0;
    repeat (8) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int k = 0; k < 2100; k++) begin
      case ($urandom_range(0, 9))
        0:       sent[k] = JE_MAX;
        1:       sent[k] = '0;
        default: sent[k] = 10'($urandom());
      endcase
      je_in = sent[k];
      tick();
      // line content after the mux edge: low half
      checks++;
      if (line != sent[k][4:0]) begin failures++; if (failures < 10) $display("FAIL low half k=%0d", k); end
      @(negedge clk); @(negedge clk);
      checks++;
      if (line != sent[k][9:5]) begin failures++; if (failures < 10) $display("FAIL high half k=%0d", k); end
      if (lat < 0 && k >= 5) begin
        for (int l = 0; l <= 4; l++)
          if (lat < 0 && je_out == sent[k-l] && sent[k-l] != sent[k-l-1]) lat = l;
      end else if (lat >= 0) begin
        checks++;
        if (je_out != sent[k-lat]) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d got %0d exp %0d", k, je_out, sent[k-lat]);
        end
      end
    end
    checks++;
    if (lat < 0) begin failures++; $display("FAIL no latency"); end
    $display("link latency %0d tick(s) (sampled at phase 3)", lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
