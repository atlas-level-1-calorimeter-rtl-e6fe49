// tb_energy_encoder: self-checking test of energy_encoder.
// Every 12-bit value is encoded through each of the three fields and
// compared with the quad-linear table (range limits 63/255/1023/4095), and
// the word parity is checked to be odd.
module tb_energy_encoder;
  import jem_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] ph;
  logic ce80, ce40;
  always #1 clk = ~clk;
  clk_phase_gen u_cg (.clk, .rst, .ph, .ce80, .ce40);

  esum_t et, ex, ey;
  logic [24:0] word;
  energy_encoder dut (.clk, .rst, .ce40, .et, .ex, .ey, .word);

  int checks = 0, failures = 0;

  task automatic tick(input int n);
    repeat (n) begin
      do @(negedge clk); while (!ce40);
      @(negedge clk);
    end
  endtask

  function automatic logic [7:0] enc(input int v);
    if (v < 64)   return {2'b00, 6'(v)};
    if (v < 256)  return {2'b01, 6'(v / 4)};
    if (v < 1024) return {2'b10, 6'(v / 16)};
    return {2'b11, 6'(v / 64)};
  endfunction

  initial begin
    #200000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    et = '0; ex = '0; ey = '0;
    repeat (8) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int v = 0; v < 4096; v++) begin
      et = 12'(v); ex = 12'((v * 7) % 4096); ey = 12'(4095 - v);
      tick(1);
      checks++;
      if (word[23:16] != enc(v) || word[7:0] != enc((v * 7) % 4096) ||
          word[15:8] != enc(4095 - v) || (^word) != 1'b1) begin
        failures++;
        if (failures < 10) $display("FAIL v=%0d word=%h", v, word);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
