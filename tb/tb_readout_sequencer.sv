// tb_readout_sequencer: self-checking test of readout_sequencer and the
// sync_fifo inside it.
// Two instances share the inputs: A at the DAQ size (88 bits, 1 lane,
// 48-tick latency, 256-deep FIFO) and B shaped like the RoI path (96 bits on
// 2 lanes, first slice held for the whole event, 64-deep FIFO). A random
// stream of 40 MHz data is kept in a history array; for every tick with
// ReadRequest high the expected FIFO word is din from 48 ticks before. A
// receiver class rebuilds the words from the serial lanes, checks the odd
// parity bit per lane, that slices of one event are back to back and that at
// least one idle bit separates events. Finally a 100-tick ReadRequest
// overflows B but not A and the sticky overflow flags are checked.
module tb_readout_sequencer;
  logic clk = 0, rst = 1;
  logic [1:0] ph;
  logic ce80, ce40;
  always #1 clk = ~clk;
  clk_phase_gen u_cg (.clk, .rst, .ph, .ce80, .ce40);

  class Rx #(int W = 88, int L = 1);
    localparam int BPL = W / L;
    logic [W-1:0] exp_q[$];
    bit           first_q[$];
    logic [W-1:0] w;
    logic [L-1:0] p;
    int n = 0, words = 0, errs = 0, seps = 0;
    bit gap = 1;
    function void step(bit valid, logic [L-1:0] ser);
      if (!valid) begin
        if (n != 0) errs++;
        if (!gap) seps++;
        n = 0; gap = 1; p = '0;
        return;
      end
      if (n < BPL) begin
        for (int l = 0; l < L; l++) w[l*BPL + BPL - 1 - n] = ser[l];
        p ^= ser;
        n++;
      end else begin
        if ((p ^ ser) != '1) begin errs++; $display("FAIL parity W=%0d", W); end
        if (exp_q.size() == 0) begin
          errs++; $display("FAIL unexpected word W=%0d", W);
        end else begin
          logic [W-1:0] e = exp_q.pop_front();
          bit f = first_q.pop_front();
          if (e != w) begin errs++; $display("FAIL data W=%0d got %h exp %h", W, w, e); end
          if (f != gap) begin errs++; $display("FAIL separator W=%0d first=%0d gap=%0d", W, f, gap); end
        end
        words++;
        gap = 0; n = 0; p = '0;
      end
    endfunction
  endclass

  logic [95:0] din;
  logic        read_req;
  logic        ser_a, val_a, ovf_a, val_b, ovf_b;
  logic [1:0]  ser_b;
  logic [8:0]  cnt_a;
  logic [6:0]  cnt_b;

  readout_sequencer dut_a (
    .clk, .rst, .ce40, .din(din[87:0]), .read_req,
    .ser(ser_a), .valid(val_a), .fifo_count(cnt_a), .overflow(ovf_a));
  readout_sequencer #(.W(96), .LANES(2), .FIFO_DEPTH(64), .HOLD_FIRST(1'b1)) dut_b (
    .clk, .rst, .ce40, .din, .read_req,
    .ser(ser_b), .valid(val_b), .fifo_count(cnt_b), .overflow(ovf_b));

  Rx #(88, 1) rx_a = new();
  Rx #(96, 2) rx_b = new();
  logic [95:0] hist [int];
  int  t = 0;
  bit  req_prev = 0, rx_on = 0;
  logic [95:0] hold_b;
  int checks = 0, failures = 0;

  // One 40 MHz tick: inputs set here are sampled at the next ce40 edge (t);
  // the outputs seen after it are those registered at that edge.
  task automatic tick();
    hist[t] = din;
    if (read_req) begin
      logic [95:0] d = hist.exists(t - 48) ? hist[t - 48] : '0;
      rx_a.exp_q.push_back(d[87:0]);
      rx_a.first_q.push_back(!req_prev);
      if (!req_prev) hold_b = d;
      rx_b.exp_q.push_back(hold_b);
      rx_b.first_q.push_back(!req_prev);
    end
    req_prev = read_req;
    do @(negedge clk); while (!ce40);
    @(negedge clk);
    if (rx_on) begin
      rx_a.step(val_a, ser_a);
      rx_b.step(val_b, ser_b);
    end
    t++;
    din = {$urandom(), $urandom(), $urandom()};
  endtask

  initial begin
    #4000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len;
    din = '0; read_req = 0;
    repeat (8) @(posedge clk);
    @(negedge clk);
    rst = 0;
    rx_on = 1;
    repeat (60) tick();
    for (int ev = 0; ev < 60; ev++) begin
      len = $urandom_range(1, 5);
      read_req = 1;
      repeat (len) tick();
      read_req = 0;
      len = (ev % 3 == 0) ? $urandom_range(1, 3) : $urandom_range(1, 300);
      repeat (len) tick();
      while (cnt_b > 7'd40) tick();
    end
    for (int k = 0; k < 40000 && (rx_a.exp_q.size() != 0 || rx_b.exp_q.size() != 0); k++) tick();
    repeat (5) tick();
    checks++;
    if (rx_a.exp_q.size() != 0 || rx_b.exp_q.size() != 0) begin
      failures++; $display("FAIL words left %0d %0d", rx_a.exp_q.size(), rx_b.exp_q.size());
    end
    checks += rx_a.words + rx_b.words;
    failures += rx_a.errs + rx_b.errs;
    checks++;
    if (rx_a.seps < 50 || rx_b.seps < 50) begin
      failures++; $display("FAIL separators seen %0d %0d", rx_a.seps, rx_b.seps);
    end
    checks++;
    if (cnt_a != 0 || ovf_a || ovf_b) begin failures++; $display("FAIL idle state"); end
    // overflow
    rx_on = 0;
    read_req = 1;
    repeat (100) tick();
    read_req = 0;
    tick();
    checks++;
    if (!ovf_b || ovf_a) begin failures++; $display("FAIL overflow a=%0d b=%0d", ovf_a, ovf_b); end
    checks++;
    if (cnt_b != 7'd64) begin failures++; $display("FAIL full count %0d", cnt_b); end
    $display("words a=%0d b=%0d", rx_a.words, rx_b.words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
