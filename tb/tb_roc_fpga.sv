// tb_roc_fpga: self-checking test of roc_fpga.
// Checks: register write/read-back; the bunch counter loads BC_OFFSET on
// BcntRes and wraps after 3563; after an L1A the ReadRequest is high for
// the programmed number of slices (1..5, 0 taken as 1 and >5 as 5) starting
// LATENCY ticks later, and the RoI request is a single tick ROI_LATENCY
// ticks later; the BC-number stream on G-link bit 12 carries, for every
// slice of the event, the BC number of the first slice read (sent MSB first,
// 76 zero bits, odd parity); the DAQ and RoI serial lines pass through and
// the data-valid flags follow the enables.
module tb_roc_fpga;
  import jem_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] ph;
  logic ce80, ce40;
  always #1 clk = ~clk;
  clk_phase_gen u_cg (.clk, .rst, .ph, .ce80, .ce40);

  logic [7:0]  ttc;
  logic [11:0] daq_ser, daq_val, bcid;
  logic [1:0]  roi_ser, glink_reset, glink_dfm;
  logic        roi_val, read_req, roi_req, daq_dav, roi_dav;
  logic [5:0]  gstat;
  regbus_t     rb;
  logic [15:0] rdata;
  logic [19:0] glink_daq, glink_roi;

  roc_fpga #(.VERSION(16'h0301)) dut (
    .clk, .rst, .ce40, .ttc, .daq_ser_in(daq_ser), .daq_valid_in(daq_val),
    .roi_ser_in(roi_ser), .roi_valid_in(roi_val), .glink_status(gstat), .rb, .rdata,
    .read_req, .roi_req, .bcid, .glink_daq, .glink_daq_dav(daq_dav), .glink_roi,
    .glink_roi_dav(roi_dav), .glink_reset, .glink_dfm);

  int checks = 0, failures = 0;
  int t = 0;
  int bc_hist [int];
  // BC-stream receiver
  int  nbits = 0, words = 0, wbad = 0;
  logic [88:0] w;
  int  exp_bc = -1;

  // Tick counter and BC-stream receiver run on every bunch tick, including
  // those that pass during register accesses.
  int tt = 0, tt_seen = 0;
  always @(posedge clk) if (ce40) tt <= tt + 1;
  always @(negedge clk) begin
    if (tt != tt_seen) begin
      tt_seen = tt;
      bc_hist[tt] = int'(bcid);
      if (daq_dav) begin
        w = {w[87:0], glink_daq[12]};
        nbits++;
        if (nbits == 89) begin
          nbits = 0; words++;
          if (!(^w) || w[75:1] != '0 || w[76] != 1'b0 || exp_bc < 0 || int'(w[88:77]) != exp_bc) begin
            wbad++;
            $display("FAIL bc word %h exp bc %0d", w, exp_bc);
          end
        end
      end else nbits = 0;
    end
  end

  task automatic tick();
    do @(negedge clk); while (!ce40);
    @(negedge clk);
    t = tt;
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

  initial begin
    #2000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v;
    int lat, ns, roi_lat, t0, first, cnt, roi_t, roi_n;
    ttc = '0; daq_ser = '0; daq_val = '1; roi_ser = '0; roi_val = 1; gstat = 6'h2A; rb = '0;
    repeat (8) @(posedge clk);
    @(negedge clk);
    rst = 0;
    tick();
    rd(7'h00, v); checks++; if (v != 16'h0301) begin failures++; $display("FAIL version"); end
    rd(7'h04, v); checks++; if (v != 16'h002A) begin failures++; $display("FAIL status"); end
    rd(7'h12, v); checks++; if (v != 16'h0001) begin failures++; $display("FAIL slice reset value"); end
    wr(7'h02, 16'h0002); wr(7'h18, 16'h000B);
    rd(7'h02, v); checks++; if (v != 16'h0002 || glink_reset != 2'b10) begin failures++; $display("FAIL ctl"); end
    rd(7'h18, v); checks++; if (v != 16'h000B || glink_dfm != 2'b10) begin failures++; $display("FAIL glink ctl"); end
    wr(7'h02, 16'h0000); wr(7'h18, 16'h0003);
    // bunch counter
    wr(7'h16, 16'd7);
    ttc[TTC_BCNTRES] = 1; tick(); ttc[TTC_BCNTRES] = 0;
    checks++; if (bcid != 12'd7) begin failures++; $display("FAIL bc load %0d", bcid); end
    for (int k = 0; k < 3560; k++) tick();
    checks++; if (bcid != 12'd3) begin failures++; $display("FAIL bc wrap %0d", bcid); end
    // L1A handling
    for (int n = 0; n < 12; n++) begin
      lat = $urandom_range(0, 31); ns = (n < 2) ? 7 - n : $urandom_range(0, 7); roi_lat = $urandom_range(0, 31);
      wr(7'h10, 16'(lat)); wr(7'h12, 16'(ns)); wr(7'h14, 16'(roi_lat));
      rd(7'h10, v); checks++; if (v != 16'(lat)) begin failures++; $display("FAIL latency reg"); end
      repeat (3) tick();
      ttc[TTC_L1A] = 1; tick(); ttc[TTC_L1A] = 0;
      t0 = t;
      first = -1; cnt = 0; roi_t = -1; roi_n = 0;
      for (int k = 0; k < 40; k++) begin
        if (k == 0) begin
          if (read_req) begin first = t; cnt++; end
          if (roi_req) begin roi_t = t; roi_n++; end
        end
        tick();
        if (read_req) begin if (first < 0) first = t; cnt++; end
        if (roi_req) begin if (roi_t < 0) roi_t = t; roi_n++; end
        if (first >= 0 && exp_bc < 0) exp_bc = bc_hist[first - 48];
      end
      // with the window starting at t0 the first ReadRequest tick is t0+lat
      checks++;
      if (first != t0 + lat || cnt != ((ns == 0) ? 1 : (ns > 5) ? 5 : ns)) begin
        failures++; $display("FAIL readreq lat=%0d ns=%0d first=%0d (t0=%0d) cnt=%0d", lat, ns, first, t0, cnt);
      end
      checks++;
      if (roi_t != t0 + roi_lat || roi_n != 1) begin failures++; $display("FAIL roi req lat=%0d at %0d n=%0d", roi_lat, roi_t - t0, roi_n); end
      for (int k = 0; k < 500 && (daq_dav || nbits != 0 || k < 60); k++) tick();
      checks++;
      if (words != cnt || wbad != 0) begin failures++; $display("FAIL bc stream words=%0d exp %0d bad=%0d", words, cnt, wbad); end
      words = 0; wbad = 0; exp_bc = -1;
    end
    // pass-through and data-valid enables
    daq_ser = 12'hA5C; roi_ser = 2'b01;
    @(negedge clk);
    checks++;
    if (glink_daq[11:0] != 12'hA5C || glink_roi[1:0] != 2'b01) begin failures++; $display("FAIL pass-through"); end
    checks++;
    if (daq_dav || roi_dav) begin failures++; $display("FAIL dav while idle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
