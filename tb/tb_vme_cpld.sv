// tb_vme_cpld: self-checking test of vme_cpld.
// A VME master task drives A23..A1, D, WRITE* and DS0* and waits for DTACK*
// (timeout 60 clocks means no response). A register-file stub stands in for
// the FPGAs behind the CPLD: it stores writes seen on the request port and
// answers reads combinationally. Checks: module ID, revision and version;
// cfg_mask/reset registers; writes and read-back to each of the 14 FPGA
// sub-bases with random data and addresses; sub-base 15 reads 0; no answer
// for another slot or with A18 set; DTACK no sooner than ACK_CYCLES clocks;
// the 16-bit configuration word is shifted out MSB first on the masked
// DIN/CCLK lines only; the CAN node address follows the geographic address.
module tb_vme_cpld;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;

  logic [23:1] a;
  logic [15:0] d_in, d_out, req_wdata, req_rdata;
  logic        d_oe, ds_n, write_n, dtack_n, req_valid, req_wr;
  logic [5:0]  geoadd, can;
  logic [3:0]  req_sub;
  logic [6:0]  req_addr;
  logic [13:0] cfg_din, cfg_cclk, fpga_reset;

  vme_cpld #(.SERIAL(8'h12), .REVISION(8'h03), .VERSION(16'h0105)) dut (
    .clk, .rst, .vme_a(a), .vme_d_in(d_in), .vme_d_out(d_out), .vme_d_oe(d_oe),
    .vme_ds0_n(ds_n), .vme_write_n(write_n), .vme_dtack_n(dtack_n), .geoadd,
    .ttc_clk_ok(1'b1), .req_valid, .req_wr, .req_sub, .req_addr, .req_wdata, .req_rdata,
    .cfg_din, .cfg_cclk, .fpga_reset, .can_node_addr(can));

  logic [15:0] regs [16][64];
  int n_req = 0;
  always_ff @(posedge clk) begin
    if (req_valid) begin
      n_req <= n_req + 1;
      if (req_wr) regs[req_sub][req_addr[6:1]] <= req_wdata;
    end
  end
  assign req_rdata = regs[req_sub][req_addr[6:1]];

  int checks = 0, failures = 0;

  task automatic vme(input logic [3:0] slot, input logic a18, input logic [3:0] sub,
                     input logic [6:0] addr, input bit wr, input logic [15:0] wd,
                     output logic [15:0] rd, output bit ok, output int lat);
    @(negedge clk);
    a = {1'b1, slot, a18, sub, 7'd0, addr[6:1]};
    d_in = wd; write_n = !wr;
    @(negedge clk);
    ds_n = 0;
    ok = 0; lat = 0;
    for (int k = 0; k < 60 && !ok; k++) begin
      @(negedge clk);
      lat++;
      if (!dtack_n) ok = 1;
    end
    rd = d_out;
    if (ok && !wr) begin
      checks++;
      if (!d_oe) begin failures++; $display("FAIL data not driven on read"); end
    end
    ds_n = 1;
    for (int k = 0; k < 20 && !dtack_n; k++) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  task automatic expect_rd(input logic [3:0] sub, input logic [6:0] addr, input logic [15:0] exp, input string nm);
    logic [15:0] r; bit ok; int lat;
    vme(geoadd[3:0], 0, sub, addr, 0, '0, r, ok, lat);
    checks++;
    if (!ok || r != exp) begin failures++; $display("FAIL %s: ok=%0d got %h exp %h", nm, ok, r, exp); end
    checks++;
    if (lat < 6) begin failures++; $display("FAIL %s: DTACK after %0d clocks", nm, lat); end
  endtask

  task automatic do_wr(input logic [3:0] sub, input logic [6:0] addr, input logic [15:0] v);
    logic [15:0] r; bit ok; int lat;
    vme(geoadd[3:0], 0, sub, addr, 1, v, r, ok, lat);
    checks++;
    if (!ok) begin failures++; $display("FAIL write no DTACK sub=%0d", sub); end
  endtask

  initial begin
    #400000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] r, word, got; bit ok; int lat, nb;
    logic [6:0] ad;
    logic [15:0] v;
    for (int s = 0; s < 16; s++) for (int k = 0; k < 64; k++) regs[s][k] = '0;
    a = '0; d_in = '0; ds_n = 1; write_n = 1; geoadd = 6'h25;
    repeat (8) @(posedge clk);
    @(negedge clk);
    rst = 0;
    checks++;
    if (can != 6'h25) begin failures++; $display("FAIL can node address"); end
    expect_rd(0, 7'h00, 16'h4A45, "module id");
    expect_rd(0, 7'h02, 16'h0312, "revision/serial");
    expect_rd(0, 7'h04, 16'h0105, "version");
    do_wr(0, 7'h12, 16'h2A5A);
    expect_rd(0, 7'h12, 16'h2A5A, "reset reg");
    checks++;
    if (fpga_reset != 14'h2A5A) begin failures++; $display("FAIL fpga_reset"); end
    do_wr(0, 7'h12, 16'h0000);
    // sub-devices
    for (int n = 0; n < 60; n++) begin
      logic [3:0] sub = 4'($urandom_range(1, 14));
      ad = {6'($urandom()), 1'b0};
      v = 16'($urandom());
      do_wr(sub, ad, v);
      expect_rd(sub, ad, v, "sub-device");
      checks++;
      if (regs[sub][ad[6:1]] != v) begin failures++; $display("FAIL request routing"); end
    end
    expect_rd(15, 7'h00, 16'h0000, "sub 15");
    // no response cases
    nb = n_req;
    vme(4'h3, 0, 2, 7'h00, 0, '0, r, ok, lat);
    checks++;
    if (ok) begin failures++; $display("FAIL answered another slot"); end
    vme(geoadd[3:0], 1, 2, 7'h00, 1, 16'h1111, r, ok, lat);
    checks++;
    if (ok || n_req != nb) begin failures++; $display("FAIL answered with A18 set"); end
    // configuration serialiser on lines 3 and 9
    do_wr(0, 7'h10, 16'h0208);
    expect_rd(0, 7'h10, 16'h0208, "cfg mask");
    word = 16'hC3A5;
    got = '0; nb = 0;
    fork
      do_wr(0, 7'h14, word);
      begin
        logic prev = 0;
        for (int k = 0; k < 200; k++) begin
          @(negedge clk);
          if (cfg_cclk[3] && !prev) begin got = {got[14:0], cfg_din[3]}; nb++; end
          prev = cfg_cclk[3];
          checks++;
          if (cfg_cclk[2] || cfg_din[2] || cfg_cclk[3] != cfg_cclk[9] || cfg_din[3] != cfg_din[9]) begin
            failures++; $display("FAIL cfg masking"); break;
          end
        end
      end
    join
    checks++;
    if (nb != 16 || got != word) begin failures++; $display("FAIL cfg serial %0d bits got %h", nb, got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
