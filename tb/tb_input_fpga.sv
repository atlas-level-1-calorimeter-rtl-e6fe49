// tb_input_fpga: self-checking test of input_fpga.
// Eight LVDS channels carry random 9-bit energies with odd parity; four
// je_demux instances (as in the main FPGA) decode the jet-element outputs.
// The path latency is found on the first ticks and then every jet element
// must equal em(i) + had(i+4) from a model. Checks: register read-back;
// a parity error zeroes the channel and counts in its counter, which clears
// on read; a /LOCK pulse counts a lock loss and sets the flag; masking;
// jet-element threshold; FCAL halving; 256-slice playback after a TTC start
// (lock check bypassed); DAQ readout of a 3-slice event, each 88-bit slice
// with odd parity and equal to the link data ({locked, 10 bits} per
// channel) of consecutive ticks.
module tb_input_fpga;
  import jem_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] ph;
  logic ce80, ce40;
  always #1 clk = ~clk;
  clk_phase_gen u_cg (.clk, .rst, .ph, .ce80, .ce40);

  logic [7:0][9:0] rx;
  logic [7:0]      lock_n;
  logic [7:0]      ttc;
  logic            read_req, daq_ser, daq_valid;
  logic [3:0]      fcal;
  regbus_t         rb;
  logic [15:0]     rdata;
  logic [3:0][4:0] je_main;
  logic [1:0][4:0] je_left;
  logic [4:0]      je_right;
  je_t  [3:0]      je;

  input_fpga #(.VERSION(16'h0102)) dut (
    .clk, .rst, .ph, .ce40, .rx_data(rx), .rx_lock_n(lock_n), .ttc, .read_req,
    .fcal_mask(fcal), .dll_locked(1'b1), .rb, .rdata, .je_main, .je_left, .je_right,
    .daq_ser, .daq_valid);
  for (genvar i = 0; i < 4; i++) begin : g_dmx
    je_demux u_d (.clk, .rst, .ph, .din(je_main[i]), .je(je[i]));
  end

  int checks = 0, failures = 0;
  int t = 0;
  logic [3:0][9:0] exp_hist [int];
  logic [87:0]     slice_hist [int];
  logic [8:0] thr = 0;
  logic [7:0] msk = 0;
  int lat = -1;
  int skip_until = 0;
  bit no_model = 0;
  // DAQ receiver, run on every tick
  logic [88:0] dw;
  int dnb = 0;
  logic [87:0] daq_words [$];
  bit daq_par_ok [$];

  function automatic logic [9:0] word(input logic [8:0] e, input bit bad);
    return {e, ~(^e) ^ bad};
  endfunction

  function automatic logic [3:0][9:0] model(input logic [7:0][9:0] d, input logic [7:0] ln);
    logic [3:0][9:0] r;
    int e [8];
    for (int c = 0; c < 8; c++)
      e[c] = (msk[c] || ln[c] || !(^d[c])) ? 0 : int'(d[c][9:1]);
    for (int i = 0; i < 4; i++) begin
      int s = e[i] + e[i+4];
      if (e[i] == 511 || e[i+4] == 511) r[i] = 10'h3FF;
      else begin
        if (s < int'(thr)) s = 0;
        r[i] = fcal[i] ? 10'(s / 2) : 10'(s);
      end
    end
    return r;
  endfunction

  // Inputs set before a tick are sampled at its ce40 edge; the model of what
  // they should produce is stored under that tick number.
  int tt = 0;
  always @(posedge clk) if (ce40) tt <= tt + 1;
  int tt_seen = 0;
  always @(negedge clk) begin
    if (tt != tt_seen) begin
      tt_seen = tt;
      if (daq_valid) begin
        dw = {dw[87:0], daq_ser};
        dnb++;
        if (dnb == 89) begin
          dnb = 0;
          daq_words.push_back(dw[88:1]);
          daq_par_ok.push_back(^dw);
        end
      end else dnb = 0;
    end
  end

  task automatic tick();
    logic [87:0] sl;
    if (!no_model) exp_hist[tt + 1] = model(rx, lock_n);
    for (int c = 0; c < 8; c++) sl[87 - 11*c -: 11] = {~lock_n[c], rx[c]};
    slice_hist[tt + 1] = sl;
    do @(negedge clk); while (!ce40);
    @(negedge clk);
    t = tt;
    if (lat >= 0 && t > skip_until && exp_hist.exists(t - lat)) begin
      checks++;
      if (je != exp_hist[t - lat]) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d je=%0d %0d %0d %0d exp %0d %0d %0d %0d", t, je[0], je[1], je[2], je[3],
          exp_hist[t - lat][0], exp_hist[t - lat][1], exp_hist[t - lat][2], exp_hist[t - lat][3]);
      end
    end
  endtask

  task automatic rand_rx(input int maxe);
    for (int c = 0; c < 8; c++) rx[c] = word(9'($urandom_range(0, maxe)), 0);
  endtask

  task automatic wr(input logic [6:0] a, input logic [15:0] v);
    @(negedge clk);
    rb = '{cs: 1'b1, wr: 1'b1, addr: a, wdata: v};
    @(negedge clk);
    rb = '0;
  endtask

  task automatic rd(input logic [6:0] a, output logic [15:0] v);
    @(negedge clk);
    rb = '{cs: 1'b1, wr: 1'b0, addr: a, wdata: '0};
    @(negedge clk);
    rb = '0;
    v = rdata;
  endtask

  task automatic expect_reg(input logic [6:0] a, input logic [15:0] e, input string nm);
    logic [15:0] v;
    rd(a, v);
    checks++;
    if (v != e) begin failures++; $display("FAIL %s: reg %h = %h exp %h", nm, a, v, e); end
  endtask

  initial begin
    #4000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v;
    logic [9:0] play [256][8];
    rx = '0; lock_n = '0; ttc = '0; read_req = 0; fcal = '0; rb = '0;
    for (int c = 0; c < 8; c++) rx[c] = word(0, 0);
    repeat (8) @(posedge clk);
    @(negedge clk);
    rst = 0;
    tick();
    expect_reg(7'h00, 16'h0102, "version");
    expect_reg(7'h04, 16'h0003, "status");
    wr(7'h10, 16'h00E4); expect_reg(7'h10, 16'h00E4, "phase em");
    wr(7'h10, 16'h0000);
    wr(7'h12, 16'h001B); expect_reg(7'h12, 16'h001B, "phase had");
    wr(7'h12, 16'h0000);
    // links come up after reset: clear the start-up flags and counters
    repeat (10) tick();
    wr(7'h02, 16'h0003);
    expect_reg(7'h20, 16'h0000, "flags after clear");
    // latency search
    for (int k = 0; k < 30; k++) begin
      rand_rx(200);
      tick();
      if (lat < 0 && k > 12)
        for (int l = 1; l <= 10; l++)
          if (lat < 0 && je == exp_hist[t - l] && exp_hist[t - l] != exp_hist[t - l - 1]) lat = l;
    end
    checks++;
    if (lat < 0) begin failures++; $display("FAIL no latency found"); end
    $display("input-to-jet-element latency %0d ticks", lat);
    for (int k = 0; k < 300; k++) begin rand_rx((k % 5 == 0) ? 511 : 255); tick(); end
    // threshold
    thr = 9'd100; wr(7'h06, 16'd100); skip_until = tt + 12;
    expect_reg(7'h06, 16'd100, "threshold");
    for (int k = 0; k < 100; k++) begin rand_rx(150); tick(); end
    // parity error on channel 2, then lock loss on channel 6
    expect_reg(7'h44, 16'd0, "pec before");
    rand_rx(255); rx[2][0] = ~rx[2][0]; tick();
    rand_rx(255); rx[2][0] = ~rx[2][0]; tick();
    for (int k = 0; k < 12; k++) begin rand_rx(255); tick(); end
    expect_reg(7'h24, 16'h0004, "parity flags");
    expect_reg(7'h44, 16'd2, "pec");
    expect_reg(7'h44, 16'd0, "pec cleared on read");
    lock_n[6] = 1; rand_rx(255); tick(); tick(); tick();
    expect_reg(7'h22, 16'h00BF, "lock status");
    lock_n[6] = 0;
    for (int k = 0; k < 12; k++) begin rand_rx(255); tick(); end
    expect_reg(7'h20, 16'h0040, "lock-loss flags");
    expect_reg(7'h3C, 16'd1, "lock-loss count");
    wr(7'h02, 16'h0003);
    expect_reg(7'h20, 16'h0000, "flags cleared");
    // masking and FCAL halving
    msk = 8'h21; wr(7'h08, 16'h0021);
    fcal = 4'b1010; skip_until = tt + 12;
    for (int k = 0; k < 100; k++) begin rand_rx(255); tick(); end
    msk = 0; wr(7'h08, 16'h0000); fcal = 0; thr = 0; wr(7'h06, 16'd0); skip_until = tt + 12;
    for (int k = 0; k < 20; k++) begin rand_rx(255); tick(); end
    // playback: links unlocked, memory content drives the jet elements
    wr(7'h02, 16'h0004);
    for (int s = 0; s < 256; s++)
      for (int c = 0; c < 8; c++) begin
        play[s][c] = word(9'($urandom_range(0, 300)), ($urandom_range(0, 40) == 0));
        wr(7'h50, {6'd0, play[s][c]});
      end
    lock_n = '1; skip_until = tt + 10000;
    for (int c = 0; c < 8; c++) rx[c] = word(9'd77, 0);
    tick(); tick();
    begin
      int pt;
      logic [3:0][9:0] e;
      no_model = 1;
      ttc[TTC_START_PLAY] = 1; tick(); ttc[TTC_START_PLAY] = 0;
      pt = t;
      // slice s leaves the memory at tick pt+1+s and then has the same
      // path as a link word sampled at that tick
      for (int s = 0; s < 256; s++) begin
        logic [7:0][9:0] d;
        for (int c = 0; c < 8; c++) d[c] = play[s][c];
        exp_hist[pt + 1 + s - 1] = model(d, 8'h00);
      end
      skip_until = 0;
      for (int k = 0; k < 270; k++) begin
        tick();
        if (t - lat >= pt && t - lat < pt + 256) begin
          e = exp_hist[t - lat];
          checks++;
          if (je != e) begin failures++; if (failures < 6) $display("FAIL playback slice %0d je=%0d %0d exp %0d %0d prev %0d %0d next %0d %0d", t - lat - pt, je[0], je[1], e[0], e[1], exp_hist[t-lat-1][0], exp_hist[t-lat-1][1], exp_hist[t-lat+1][0], exp_hist[t-lat+1][1]); end
        end
      end
    end
    no_model = 0;
    lock_n = '0;
    // DAQ readout: 3 slices, found in the link history as consecutive ticks
    wr(7'h02, 16'h0003);
    begin
      int first_t = -1, t_req, found;
      for (int k = 0; k < 60; k++) begin rand_rx(511); tick(); end
      t_req = tt;
      read_req = 1; tick(); tick(); tick(); read_req = 0;
      for (int k = 0; k < 400; k++) tick();
      checks++;
      if (daq_words.size() != 3) begin failures++; $display("FAIL daq slices %0d", daq_words.size()); end
      for (int n = 0; n < daq_words.size(); n++) begin
        checks++;
        if (!daq_par_ok[n]) begin failures++; $display("FAIL daq parity"); end
        found = -1;
        if (n == 0) begin
          for (int j = t_req - 60; j < t_req; j++) if (found < 0 && slice_hist[j] == daq_words[0]) found = j;
          first_t = found;
          $display("DAQ slice 0 = link data sampled %0d ticks before the first ReadRequest tick", t_req + 1 - found);
        end else if (first_t >= 0 && slice_hist[first_t + n] == daq_words[n]) found = first_t + n;
        checks++;
        if (found < 0) begin failures++; $display("FAIL daq slice %0d not found", n); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
