// tb_main_fpga: self-checking test of main_fpga.
// 77 je_mux instances drive the backplane links from an 11 x 7 jet-element
// environment held in the testbench. An independent model computes the
// energy word (thresholded Et over the 8 x 4 core, Ex/Ey with the split
// 6-bit multiplications, quad-linear codes, odd parity). Checks:
//  - register read-back;
//  - energy-word latency found once and then exact for random environments,
//    with and without FCAL routing;
//  - jet multiplicities for isolated jets against 8 thresholds, the jet
//    threshold register and parity of the jet word;
//  - spy memories capture both words after arming and a TTC start;
//  - a DAQ slice holds {jet word, energy word} of one tick;
//  - the RoI packet has odd parity per lane and per RoI and shows the jet.
module tb_main_fpga;
  import jem_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] ph;
  logic ce80, ce40;
  always #1 clk = ~clk;
  clk_phase_gen u_cg (.clk, .rst, .ph, .ce80, .ce40);

  je_t [10:0][6:0]       src;
  logic [10:0][3:0][4:0] je_local;
  logic [10:0][4:0]      je_left;
  logic [10:0][1:0][4:0] je_right;
  logic       fcal_en, read_req, roi_req, daq_ser, daq_valid, roi_valid;
  logic [2:0] fcal_eta;
  logic [7:0] ttc;
  regbus_t    rb;
  logic [15:0] rdata;
  logic [24:0] jet_word, energy_word;
  logic [1:0]  roi_ser;

  for (genvar p = 0; p < 11; p++) begin : g_p
    je_mux u_l (.clk, .rst, .ph, .je(src[p][0]), .dout(je_left[p]));
    for (genvar e = 0; e < 4; e++) begin : g_e
      je_mux u_m (.clk, .rst, .ph, .je(src[p][1+e]), .dout(je_local[p][e]));
    end
    for (genvar e = 0; e < 2; e++) begin : g_r
      je_mux u_r (.clk, .rst, .ph, .je(src[p][5+e]), .dout(je_right[p][e]));
    end
  end

  main_fpga #(.VERSION(16'h0401)) dut (
    .clk, .rst, .ph, .ce40, .je_local, .je_left, .je_right, .fcal_en, .fcal_eta,
    .ttc, .read_req, .roi_req, .dll_locked(1'b1), .rb, .rdata, .jet_word, .energy_word,
    .daq_ser, .daq_valid, .roi_ser, .roi_valid);

  int checks = 0, failures = 0;
  int et_thr = 0;
  logic [7:0][11:0] cx, cy;
  logic [24:0] e_hist [int];
  logic [49:0] w_hist [int];
  int lat = -1, skip_until = 0;

  function automatic int proj(input int s, input int c);
    if (s >= 4095) return 4095;
    return ((s / 64) * c) / 64 + ((s % 64) * c) / 4096;
  endfunction
  function automatic logic [7:0] enc(input int v);
    if (v < 64)   return {2'b00, 6'(v)};
    if (v < 256)  return {2'b01, 6'(v / 4)};
    if (v < 1024) return {2'b10, 6'(v / 16)};
    return {2'b11, 6'(v / 64)};
  endfunction
  function automatic logic [24:0] emodel();
    je_t [10:0][6:0] env = src;
    int et = 0, ex = 0, ey = 0;
    logic [23:0] w;
    if (fcal_en)
      for (int p = 2; p < 11; p += 2) env[p][fcal_eta] = src[p-1][fcal_eta];
    for (int p = 0; p < 8; p++) begin
      int row = 0;
      for (int e = 0; e < 4; e++) begin
        je_t v = env[p+1][e+1];
        if (v == 10'h3FF) begin et = 99999; row = 99999; end
        else begin
          if (int'(v) > et_thr) et += int'(v);
          row += int'(v);
        end
      end
      if (row > 4095) row = 4095;
      ex += proj(row, int'(cx[p]));
      ey += proj(row, int'(cy[p]));
    end
    if (et > 4095) et = 4095;
    if (ex > 4095) ex = 4095;
    if (ey > 4095) ey = 4095;
    w = {enc(et), enc(ey), enc(ex)};
    return {~(^w), w};
  endfunction

  int tt = 0;
  always @(posedge clk) if (ce40) tt <= tt + 1;

  task automatic tick();
    e_hist[tt + 1] = emodel();
    do @(negedge clk); while (!ce40);
    @(negedge clk);
    w_hist[tt] = {jet_word, energy_word};
    if (lat >= 0 && tt > skip_until && e_hist.exists(tt - lat)) begin
      checks++;
      if (energy_word != e_hist[tt - lat]) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d energy %h exp %h", tt, energy_word, e_hist[tt - lat]);
      end
    end
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

  task automatic rand_env(input int maxe);
    for (int p = 0; p < 11; p++)
      for (int e = 0; e < 7; e++)
        src[p][e] = ($urandom_range(0, 200) == 0) ? JE_MAX : 10'($urandom_range(0, maxe));
  endtask

  // jet word for one isolated element, 8 thresholds 10, 70, ... 430
  task automatic jet_case(input int v, input int jthr, input string nm);
    logic [23:0] exp_m;
    src = '0;
    src[3][2] = 10'(v);
    for (int k = 0; k < 8; k++) exp_m[3*k +: 3] = (v > jthr && v > 10 + 60 * k) ? 3'd1 : 3'd0;
    repeat (14) tick();
    checks++;
    if (jet_word[23:0] != exp_m || !(^jet_word)) begin
      failures++; $display("FAIL jet %s v=%0d: word %h exp %h", nm, v, jet_word, exp_m);
    end
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
    src = '0; fcal_en = 0; fcal_eta = 0; ttc = '0; read_req = 0; roi_req = 0; rb = '0;
    cx = '0; cy = '0;
    repeat (8) @(posedge clk);
    @(negedge clk);
    rst = 0;
    tick();
    expect_reg(7'h00, 16'h0401, "version");
    for (int p = 0; p < 8; p++) begin
      cx[p] = 12'($rtoi(4095.0 * $cos((p + 0.5) * 3.14159265 / 16.0)));
      cy[p] = 12'($rtoi(4095.0 * $sin((p + 0.5) * 3.14159265 / 16.0)));
      wr(7'(8'h50 + 4*p), {4'd0, cx[p]});
      wr(7'(8'h52 + 4*p), {4'd0, cy[p]});
    end
    expect_reg(7'h5C, {4'd0, cx[3]}, "mult x");
    expect_reg(7'h6E, {4'd0, cy[7]}, "mult y");
    for (int k = 0; k < 8; k++) wr(7'(8'h20 + 2*k), {2'b00, 10'(10 + 60 * k)});
    expect_reg(7'h26, 16'(10 + 60 * 3), "jet def");
    et_thr = 5; wr(7'h10, 16'd5);
    expect_reg(7'h10, 16'd5, "et thr");
    // energy latency
    for (int k = 0; k < 40; k++) begin
      rand_env(60);
      tick();
      if (lat < 0 && k > 20)
        for (int l = 1; l <= 16; l++)
          if (lat < 0 && energy_word == e_hist[tt - l] && e_hist[tt - l] != e_hist[tt - l - 1]) lat = l;
    end
    checks++;
    if (lat < 0) begin failures++; $display("FAIL no energy latency"); end
    $display("energy word latency %0d ticks from link input", lat);
    for (int k = 0; k < 300; k++) begin rand_env((k % 3 == 0) ? 1023 : 120); tick(); end
    fcal_en = 1; fcal_eta = 3'd1; skip_until = tt + 20;
    for (int k = 0; k < 200; k++) begin rand_env(200); tick(); end
    fcal_eta = 3'd4; skip_until = tt + 20;
    for (int k = 0; k < 200; k++) begin rand_env(200); tick(); end
    fcal_en = 0; skip_until = tt + 20;
    // jets
    jet_case(0, 0, "empty");
    jet_case(45, 0, "low");
    jet_case(200, 0, "mid");
    jet_case(1000, 0, "high");
    wr(7'h12, 16'd300);
    jet_case(200, 300, "below jet threshold");
    jet_case(400, 300, "above jet threshold");
    wr(7'h12, 16'd0);
    // spy memories
    rand_env(60);
    wr(7'h02, 16'h0001);
    expect_reg(7'h04, 16'h0003, "spy armed");
    begin
      int t0, found;
      logic [24:0] got;
      for (int k = 0; k < 20; k++) begin rand_env(60); tick(); end
      ttc[TTC_START_SPY] = 1; rand_env(60); tick(); ttc[TTC_START_SPY] = 0;
      t0 = tt;
      for (int k = 0; k < 300; k++) begin rand_env(60); tick(); end
      expect_reg(7'h04, 16'h0001, "spy done");
      wr(7'h02, 16'h0004);
      found = -1;
      for (int n = 0; n < 40; n++) begin
        logic [15:0] a, b, c;
        rd(7'h70, a); rd(7'h72, b); rd(7'h74, c);
        got = {c[8:0], b[7:0], a[7:0]};
        if (n == 0) begin
          for (int j = t0 - 2; j < t0 + 4; j++) if (found < 0 && w_hist[j][24:0] == got) found = j;
          $display("spy word 0 = output after tick %0d (start sampled at tick %0d)", found, t0);
          checks++;
          if (found < 0) begin failures++; $display("FAIL energy spy word 0 %h", got); end
        end else if (found >= 0) begin
          checks++;
          if (w_hist[found + n][24:0] != got) begin failures++; $display("FAIL energy spy word %0d", n); end
        end
      end
      for (int n = 0; n < 40; n++) begin
        logic [15:0] a, b;
        rd(7'h76, a); rd(7'h78, b);
        got = {b[12:0], a[11:0]};
        if (found >= 0) begin
          checks++;
          if (w_hist[found + n][49:25] != got) begin failures++; $display("FAIL jet spy word %0d", n); end
        end
      end
    end
    // DAQ and RoI readout of an event with one jet
    src = '0; src[3][2] = 10'd500;
    repeat (60) tick();
    fork
      begin
        read_req = 1; roi_req = 1; tick(); read_req = 0; roi_req = 0;
      end
      begin
        logic [88:0] dw;
        logic [48:0] r0, r1;
        int nb = 0, rb_n = 0;
        bit dgot = 0, rgot = 0;
        for (int k = 0; k < 1000; k++) begin
          @(negedge clk);
          if (ce40) begin
            @(negedge clk);
            if (daq_valid && !dgot) begin
              dw = {dw[87:0], daq_ser}; nb++;
              if (nb == 89) dgot = 1;
            end
            if (roi_valid && !rgot) begin
              r0 = {r0[47:0], roi_ser[0]}; r1 = {r1[47:0], roi_ser[1]}; rb_n++;
              if (rb_n == 49) rgot = 1;
            end
          end
        end
        checks++;
        if (!dgot || !(^dw) || dw[88:39] != {jet_word, energy_word} || dw[38:1] != '0) begin
          failures++; $display("FAIL daq slice %h (now %h %h)", dw, jet_word, energy_word);
        end
        checks++;
        if (!rgot || !(^r0) || !(^r1)) begin failures++; $display("FAIL roi parity"); end
        begin
          int nz = 0;
          for (int r = 0; r < 4; r++) begin
            checks += 2;
            if (!(^r0[48 - 12*r -: 12])) begin failures++; $display("FAIL roi %0d parity", r); end
            if (!(^r1[48 - 12*r -: 12])) begin failures++; $display("FAIL roi %0d parity", r + 4); end
            if (r0[48 - 12*r -: 8] != 0) nz++;
            if (r1[48 - 12*r -: 8] != 0) nz++;
          end
          checks++;
          if (nz != 1) begin failures++; $display("FAIL %0d RoIs with jets, expected 1", nz); end
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
