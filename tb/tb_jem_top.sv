// tb_jem_top: end-to-end test of the whole module, jem_top, at its default
// parameters (88 links, 11 input FPGAs, 48-tick readout latency, 256-deep
// buffers). It is also the full-size test.
//
// The testbench acts as the crate: it drives the 88 serial-link words
// (9-bit energy + odd parity, /LOCK), the TTC signals, and VME cycles
// through the CPLD (module at geographic address 5, later 0). A model of
// the input FPGAs and the energy path predicts the Et field of the energy
// word from the link data (jet elements = e.m. + hadronic, core 8 x 4, FCAL
// halving and duplication for JEM 0); the latency is found once.
//
// Mechanisms that must each happen at least once (counted, and a failure
// is counted for any that never happened):
//   vme        register cycles through CPLD, control FPGA and the buses
//   energy     energy words matching the model
//   saturation a saturated tower forcing Et to 4095
//   parity     a parity error zeroing a channel and counting in its FPGA
//   lockloss   a /LOCK pulse counted in the lock-loss counter
//   jet        jet multiplicities for an isolated jet against 8 thresholds
//   spy        spy memory capture after arming and a TTC start, read by VME
//   playback   256 slices played from an input FPGA memory
//   l1a        an L1A read out on the DAQ G-link (13 lanes, odd parity)
//   multislice a 3-slice DAQ event
//   roi        an RoI packet on the RoI G-link
//   bcres      BC-counter reset and offset seen in the BC-number stream
//   fcal       the FCAL mode of JEM 0
//   greset     a global reset from the control FPGA clearing the FPGAs
module tb_jem_top;
  import jem_pkg::*;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;

  logic [5:0]  geoadd;
  logic [23:1] vme_a;
  logic [15:0] vme_d_in, vme_d_out;
  logic        vme_d_oe, ds_n, write_n, dtack_n;
  logic        l1a, str, ttc_ready, dll_reset, clk_ok;
  logic [7:0]  brcst;
  logic [13:0] dll_locked;
  logic [10:0][7:0][9:0] rx;
  logic [10:0][7:0]      lock_n;
  logic [10:0][4:0]      fio_left_in, fio_right_out;
  logic [10:0][1:0][4:0] fio_right_in, fio_left_out;
  logic [24:0] jet_word, energy_word;
  logic [19:0] glink_daq, glink_roi;
  logic        daq_dav, roi_dav;
  logic [1:0]  glink_reset, glink_dfm;
  logic [13:0] cfg_din, cfg_cclk, fpga_reset;
  logic [5:0]  can;

  jem_top dut (
    .clk, .rst, .geoadd, .vme_a, .vme_d_in, .vme_d_out, .vme_d_oe, .vme_ds0_n(ds_n),
    .vme_write_n(write_n), .vme_dtack_n(dtack_n), .ttc_l1a(l1a), .ttc_brcst(brcst),
    .ttc_brcst_str(str), .ttc_ready, .dll_locked, .dll_reset, .clk_ok,
    .rx_data(rx), .rx_lock_n(lock_n), .fio_left_in, .fio_right_in, .fio_left_out,
    .fio_right_out, .jet_word, .energy_word, .glink_status(6'd0), .glink_daq,
    .glink_daq_dav(daq_dav), .glink_roi, .glink_roi_dav(roi_dav), .glink_reset,
    .glink_dfm, .cfg_din, .cfg_cclk, .fpga_reset, .can_node_addr(can));

  int checks = 0, failures = 0;
  typedef enum int {M_VME, M_ENERGY, M_SAT, M_PARITY, M_LOCKLOSS, M_JET, M_SPY, M_PLAY,
                    M_L1A, M_MULTI, M_ROI, M_BCRES, M_FCAL, M_GRESET, M_N} mech_e;
  int mech [M_N];
  string mname [M_N] = '{"vme", "energy", "saturation", "parity", "lockloss", "jet", "spy",
                         "playback", "l1a", "multislice", "roi", "bcres", "fcal", "greset"};

  // Bunch-tick counter: the phase generator inside the top starts with
  // reset, so the testbench keeps its own copy.
  logic [1:0] ph = 0;
  wire ce40 = (ph == 2'd0);
  always @(posedge clk) ph <= rst ? 2'd0 : ph + 2'd1;
  int tt = 0;
  always @(posedge clk) if (ce40 && !rst) tt <= tt + 1;

  function automatic logic [9:0] word(input int e, input bit bad);
    logic [8:0] v = 9'(e);
    return {v, ~(^v) ^ bad};
  endfunction
  function automatic logic [7:0] enc(input int v);
    if (v < 64)   return {2'b00, 6'(v)};
    if (v < 256)  return {2'b01, 6'(v / 4)};
    if (v < 1024) return {2'b10, 6'(v / 16)};
    return {2'b11, 6'(v / 64)};
  endfunction

  // Et model from the link inputs (input FPGA threshold 0, ET_THR 0, no masks).
  function automatic int et_model();
    int env [11][7];
    int et = 0;
    bit fc = (geoadd[3:0] == 4'd0) || (geoadd[3:0] == 4'd8) || (geoadd[3:0] == 4'd7) || (geoadd[3:0] == 4'd15);
    int fe = (geoadd[3:0] == 4'd7 || geoadd[3:0] == 4'd15) ? 3 : 0;
    sat_elem = 0;
    for (int p = 0; p < 11; p++) begin
      env[p][0] = 0; env[p][5] = 0; env[p][6] = 0;
      for (int e = 0; e < 4; e++) begin
        int em, had, s;
        em  = (lock_n[p][e]   || !(^rx[p][e]))   ? 0 : int'(rx[p][e][9:1]);
        had = (lock_n[p][e+4] || !(^rx[p][e+4])) ? 0 : int'(rx[p][e+4][9:1]);
        if (em == 511 || had == 511) s = 1023;
        else begin s = em + had; if (fc && e == fe) s = s / 2; end
        env[p][1+e] = s;
      end
    end
    if (fc) for (int p = 2; p < 11; p += 2) env[p][1+fe] = env[p-1][1+fe];
    for (int p = 1; p <= 8; p++)
      for (int e = 1; e <= 4; e++) begin
        if (env[p][e] == 1023) begin et = 99999; sat_elem = 1; end
        else et += env[p][e];
      end
    return (et > 4095) ? 4095 : et;
  endfunction

  int et_hist [int];
  bit sat_hist [int];
  bit sat_elem;
  logic [24:0] ew_hist [int];
  int lat = -1, skip_until = 0;

  task automatic tick();
    et_hist[tt + 1] = et_model();
    sat_hist[tt + 1] = sat_elem;
    do @(negedge clk); while (!ce40);
    @(negedge clk);
    ew_hist[tt] = energy_word;
    if (lat >= 0 && tt > skip_until && et_hist.exists(tt - lat)) begin
      int e = et_hist[tt - lat];
      checks++;
      if (energy_word[23:16] != enc(e) || energy_word[15:0] != (sat_hist[tt - lat] ? 16'hFFFF : 16'h0000) || !(^energy_word)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d energy word %h, Et model %0d", tt, energy_word, e);
      end else begin
        mech[M_ENERGY]++;
        if (e == 4095) mech[M_SAT]++;
        if (geoadd[3:0] == 4'd0 && e != 0) mech[M_FCAL]++;
      end
    end
  endtask

  // VME cycle through the CPLD; sub-base 0 CPLD, 1 control, 2 ROC, 3 main,
  // 4..14 input FPGAs.
  task automatic vme(input logic [3:0] sub, input logic [6:0] addr, input bit wr,
                     input logic [15:0] wd, output logic [15:0] rd);
    bit ok = 0;
    @(negedge clk);
    vme_a = {1'b1, geoadd[3:0], 1'b0, sub, 7'd0, addr[6:1]};
    vme_d_in = wd; write_n = !wr;
    @(negedge clk);
    ds_n = 0;
    for (int k = 0; k < 100 && !ok; k++) begin
      @(negedge clk);
      if (!dtack_n) ok = 1;
    end
    rd = vme_d_out;
    ds_n = 1;
    for (int k = 0; k < 20 && !dtack_n; k++) @(negedge clk);
    repeat (2) @(negedge clk);
    checks++;
    if (!ok) begin failures++; $display("FAIL VME no DTACK sub=%0d addr=%h", sub, addr); end
    else mech[M_VME]++;
  endtask
  task automatic vw(input logic [3:0] sub, input logic [6:0] addr, input logic [15:0] v);
    logic [15:0] r;
    vme(sub, addr, 1, v, r);
  endtask
  task automatic vexp(input logic [3:0] sub, input logic [6:0] addr, input logic [15:0] e, input string nm);
    logic [15:0] r;
    vme(sub, addr, 0, '0, r);
    checks++;
    if (r != e) begin failures++; $display("FAIL %s: sub %0d reg %h = %h exp %h", nm, sub, addr, r, e); end
  endtask

  task automatic bcast(input int bitn);
    brcst = 8'(1 << bitn); str = 1; tick(); str = 0; brcst = '0;
  endtask

  task automatic rand_rx(input int maxe);
    for (int p = 0; p < 11; p++)
      for (int c = 0; c < 8; c++) rx[p][c] = word($urandom_range(0, maxe), 0);
  endtask
  task automatic zero_rx();
    for (int p = 0; p < 11; p++)
      for (int c = 0; c < 8; c++) rx[p][c] = word(0, 0);
  endtask

  initial begin
    #40000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] r;
    geoadd = 6'h05; vme_a = '0; vme_d_in = '0; ds_n = 1; write_n = 1;
    l1a = 0; str = 0; brcst = '0; ttc_ready = 1; dll_locked = '1;
    lock_n = '0; fio_left_in = '0; fio_right_in = '0;
    for (int m = 0; m < M_N; m++) mech[m] = 0;
    zero_rx();
    repeat (8) @(posedge clk);
    @(negedge clk);
    rst = 0;
    repeat (12) tick();
    // identification and start-up clearing of the link flags
    vexp(0, 7'h00, 16'h4A45, "module id");
    vexp(3, 7'h00, 16'h0001, "main version");
    for (int i = 0; i < 11; i++) vw(4'(4 + i), 7'h02, 16'h0003);
    for (int i = 0; i < 11; i++) vexp(4'(4 + i), 7'h20, 16'h0000, "link flags");
    // energy path latency and random traffic
    for (int k = 0; k < 40; k++) begin
      rand_rx(40);
      tick();
    end
    for (int l = 1; l <= 24 && lat < 0; l++) begin
      bit ok;
      ok = 1;
      for (int j = 0; j < 12; j++)
        if (ew_hist[tt - j][23:16] != enc(et_hist[tt - j - l])) ok = 0;
      if (ok) lat = l;
    end
    checks++;
    if (lat < 0) begin failures++; $display("FAIL no energy latency"); end
    $display("link input to energy word: %0d ticks", lat);
    for (int k = 0; k < 300; k++) begin
      rand_rx(40);
      if (k % 50 == 7) rx[$urandom_range(1, 8)][$urandom_range(0, 7)] = word(511, 0);
      tick();
    end
    // parity error on FPGA B (phi 2) channel 1
    rand_rx(40); rx[2][1][0] = ~rx[2][1][0]; tick();
    for (int k = 0; k < 20; k++) begin rand_rx(40); tick(); end
    vme(6, 7'h42, 0, '0, r);
    checks++;
    if (r != 16'd1) begin failures++; $display("FAIL parity count %0d", r); end else mech[M_PARITY]++;
    // lock loss on FPGA G (phi 7) channel 5
    skip_until = tt + lat + 8;
    lock_n[7][5] = 1; rand_rx(40); tick(); tick(); tick();
    lock_n[7][5] = 0;
    skip_until = tt + lat + 8;
    for (int k = 0; k < 20; k++) begin rand_rx(40); tick(); end
    vme(11, 7'h3A, 0, '0, r);
    checks++;
    if (r != 16'd1) begin failures++; $display("FAIL lock-loss count %0d", r); end else mech[M_LOCKLOSS]++;
    // isolated jet at phi 3, eta 1: 200 GeV against thresholds 10, 70, ... 430
    for (int k = 0; k < 8; k++) vw(3, 7'(8'h20 + 2*k), 16'(10 + 60 * k));
    zero_rx(); rx[3][1] = word(200, 0);
    repeat (lat + 6) tick();
    checks++;
    if (jet_word != {1'b1, 24'h000249}) begin failures++; $display("FAIL jet word %h", jet_word); end
    else mech[M_JET]++;
    // spy memory
    vw(3, 7'h02, 16'h0001);
    for (int k = 0; k < 10; k++) begin rand_rx(40); tick(); end
    bcast(3);
    begin
      int t0, found;
      t0 = tt; found = -1;
      for (int k = 0; k < 280; k++) begin rand_rx(40); tick(); end
      vw(3, 7'h02, 16'h0004);
      begin
        logic [24:0] got [12];
        for (int n = 0; n < 12; n++) begin
          logic [15:0] a, b, c;
          vme(3, 7'h70, 0, '0, a); vme(3, 7'h72, 0, '0, b); vme(3, 7'h74, 0, '0, c);
          got[n] = {c[8:0], b[7:0], a[7:0]};
        end
        // the 12 words read must be the energy words of 12 consecutive
        // ticks starting at the TTC start
        for (int j = t0 - 3; j <= t0 + 3 && found < 0; j++) begin
          bit ok;
          ok = 1;
          for (int n = 0; n < 12; n++) if (ew_hist[j + n] != got[n]) ok = 0;
          if (ok) found = j;
        end
        checks++;
        if (found < 0) begin failures++; $display("FAIL spy words %h %h %h", got[0], got[1], got[2]); end
        else mech[M_SPY]++;
      end
    end
    // playback from FPGA A (phi 1): em channel 0 = 100 in all 256 slices
    zero_rx();
    repeat (lat + 4) tick();
    // the TTC start reaches all 11 input FPGAs, so all memories are loaded
    for (int i = 0; i < 11; i++) begin
      vw(4'(4 + i), 7'h02, 16'h0004);
      for (int s = 0; s < 256; s++)
        for (int c = 0; c < 8; c++) vw(4'(4 + i), 7'h50, {6'd0, word((i == 1 && c == 0) ? 100 : 0, 0)});
    end
    skip_until = tt + 1000000;
    bcast(2);
    begin
      int n = 0;
      for (int k = 0; k < 300; k++) begin
        tick();
        if (energy_word[23:16] == enc(100)) n++;
      end
      checks++;
      if (n != 256) begin failures++; $display("FAIL playback: %0d ticks with Et 100", n); end
      else mech[M_PLAY]++;
    end
    skip_until = tt + lat + 4;
    // readout: BC offset 9, latency 5, 3 slices, RoI latency 5
    vw(2, 7'h16, 16'd9); vw(2, 7'h10, 16'd5); vw(2, 7'h12, 16'd3); vw(2, 7'h14, 16'd5);
    vw(2, 7'h18, 16'h0003);
    bcast(0);
    for (int k = 0; k < 60; k++) begin rand_rx(40); tick(); end
    fork
      begin l1a = 1; tick(); l1a = 0; end
      begin
        logic [88:0] dw [13];
        logic [48:0] rw [3];
        int nb = 0, nw = 0, rn = 0, bad = 0;
        bit rgot = 0;
        for (int k = 0; k < 600; k++) begin
          tick();
          if (daq_dav) begin
            for (int l = 0; l < 13; l++) dw[l] = {dw[l][87:0], glink_daq[l]};
            nb++;
            if (nb == 89) begin
              nb = 0; nw++;
              for (int l = 0; l < 13; l++) if (!(^dw[l])) begin bad++; $display("  lane %0d parity", l); end
              $display("  BC %0d", dw[12][88:77]);
              // BC number of the first slice: the counter was reset to 9
              // about 61 ticks before the L1A; with LATENCY 5 and the
              // 48-tick pipeline the data read are from about tick 18
              if (dw[12][88:77] < 12'd20 || dw[12][88:77] > 12'd34) bad++;
            end
          end
          if (roi_dav && !rgot) begin
            for (int l = 0; l < 3; l++) rw[l] = {rw[l][47:0], glink_roi[l]};
            rn++;
            if (rn == 49) begin
              rgot = 1;
              for (int l = 0; l < 3; l++) if (!(^rw[l])) bad++;
            end
          end
        end
        checks++;
        if (bad != 0 || nw != 3) begin failures++; $display("FAIL readout: %0d slices, %0d bad", nw, bad); end
        else begin mech[M_L1A]++; mech[M_MULTI]++; mech[M_BCRES]++; end
        checks++;
        if (!rgot) begin failures++; $display("FAIL no RoI packet"); end else mech[M_ROI]++;
      end
    join
    // FCAL mode: the module moves to slot 0
    geoadd = 6'h00;
    skip_until = tt + lat + 4;
    for (int k = 0; k < 200; k++) begin rand_rx(40); tick(); end
    // global reset from the control FPGA clears the FPGA registers
    vw(4, 7'h06, 16'd7);
    vexp(4, 7'h06, 16'd7, "input threshold");
    skip_until = tt + 1000000;
    vw(1, 7'h02, 16'h0001);
    repeat (4) tick();
    vme(4, 7'h06, 0, '0, r);
    checks++;
    if (r != 16'd0) begin failures++; $display("FAIL global reset"); end else mech[M_GRESET]++;
    for (int m = 0; m < M_N; m++) begin
      $display("mechanism %-10s happened %0d times", mname[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism %s never happened", mname[m]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
