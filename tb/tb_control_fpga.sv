// tb_control_fpga: self-checking test of control_fpga.
// Register requests are issued as the VME CPLD issues them (one-clock
// request strobe). Stub devices 2..14 register read data one clock after
// their chip select, like the real FPGAs. Checks: a request reaches only the
// addressed device, with its address and data; read data come back on the
// request port two clocks after the strobe; own registers (version, DLL
// status, TTCrx register); software TTC pulses and the global reset appear
// on the TTC lines for exactly one bunch tick; L1A and the broadcast bits
// reach their lines only with the strobe; DLL reset and lock summary.
module tb_control_fpga;
  import jem_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] ph;
  logic ce80, ce40;
  always #1 clk = ~clk;
  clk_phase_gen u_cg (.clk, .rst, .ph, .ce80, .ce40);

  logic        req_valid, req_wr, l1a, str, ready, xl, dl, ol, dll_reset, all_locked;
  logic [3:0]  req_sub;
  logic [6:0]  req_addr;
  logic [15:0] req_wdata, req_rdata;
  logic [7:0]  brcst, ttc_bus;
  regbus_t [14:0] rb;
  logic [14:0][15:0] dev_rdata;

  control_fpga #(.VERSION(16'h0207)) dut (
    .clk, .rst, .ce40, .req_valid, .req_wr, .req_sub, .req_addr, .req_wdata, .req_rdata,
    .rb, .dev_rdata, .ttc_l1a(l1a), .ttc_brcst(brcst), .ttc_brcst_str(str), .ttc_ready(ready),
    .ttc_bus, .dll_xtal_locked(xl), .dll_deskew_locked(dl), .dll_others_locked(ol),
    .dll_reset, .all_locked);

  logic [15:0] regs [15][64];
  int cs_count [15];
  for (genvar d = 0; d < 15; d++) begin : g_dev
    always_ff @(posedge clk) begin
      if (rb[d].cs) begin
        cs_count[d] <= cs_count[d] + 1;
        if (rb[d].wr) regs[d][rb[d].addr[6:1]] <= rb[d].wdata;
        else          dev_rdata[d] <= regs[d][rb[d].addr[6:1]];
      end
    end
  end

  int checks = 0, failures = 0;

  task automatic req(input logic [3:0] sub, input logic [6:0] addr, input bit wr,
                     input logic [15:0] wd, output logic [15:0] rd);
    @(negedge clk);
    req_valid = 1; req_wr = wr; req_sub = sub; req_addr = addr; req_wdata = wd;
    @(negedge clk);
    req_valid = 0;
    repeat (2) @(negedge clk);
    rd = req_rdata;
    repeat (2) @(negedge clk);
  endtask

  task automatic tick();
    do @(negedge clk); while (!ce40);
    @(negedge clk);
  endtask

  // Watch the TTC lines for a number of ticks and count ticks each line is high.
  task automatic watch(input int n, output int cnt [8]);
    for (int b = 0; b < 8; b++) cnt[b] = 0;
    repeat (n) begin
      tick();
      for (int b = 0; b < 8; b++) cnt[b] += int'(ttc_bus[b]);
    end
  endtask

  initial begin
    #400000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] r, v;
    logic [6:0] ad;
    int cnt [8], prev_cs [15];
    for (int d = 0; d < 15; d++) begin
      cs_count[d] = 0; dev_rdata[d] = '0;
      for (int k = 0; k < 64; k++) regs[d][k] = '0;
    end
    req_valid = 0; req_wr = 0; req_sub = 0; req_addr = 0; req_wdata = 0;
    l1a = 0; brcst = 0; str = 0; ready = 0; xl = 1; dl = 0; ol = 1;
    repeat (8) @(posedge clk);
    @(negedge clk);
    rst = 0;
    tick();
    checks++;
    if (!dll_reset || all_locked) begin failures++; $display("FAIL dll summary 1"); end
    ready = 1; dl = 1;
    @(negedge clk);
    checks++;
    if (dll_reset || !all_locked) begin failures++; $display("FAIL dll summary 2"); end
    // routing to devices
    for (int n = 0; n < 80; n++) begin
      logic [3:0] sub;
      sub = 4'(2 + n % 13);
      ad = {6'($urandom()), 1'b0};
      v = 16'($urandom());
      for (int d = 0; d < 15; d++) prev_cs[d] = cs_count[d];
      req(sub, ad, 1, v, r);
      req(sub, ad, 0, '0, r);
      checks++;
      if (r != v) begin failures++; $display("FAIL readback sub=%0d got %h exp %h", sub, r, v); end
      for (int d = 0; d < 15; d++) begin
        checks++;
        if (cs_count[d] - prev_cs[d] != ((d == int'(sub)) ? 2 : 0)) begin
          failures++; $display("FAIL chip select d=%0d sub=%0d", d, sub);
        end
      end
    end
    // own registers
    req(1, 7'h00, 0, '0, r);
    checks++; if (r != 16'h0207) begin failures++; $display("FAIL version %h", r); end
    req(1, 7'h04, 0, '0, r);
    checks++; if (r != 16'h0003) begin failures++; $display("FAIL status %h", r); end
    req(1, 7'h20, 1, 16'h00C5, r);
    req(1, 7'h20, 0, '0, r);
    checks++; if (r != 16'h00C5) begin failures++; $display("FAIL ttcrx reg %h", r); end
    // software TTC pulses and global reset
    begin
      int tot [8];
      for (int b = 0; b < 8; b++) tot[b] = 0;
      for (int b = 0; b < 6; b++) begin
        @(negedge clk);
        req_valid = 1; req_wr = 1; req_sub = 1;
        req_addr = (b == 5) ? 7'h02 : 7'h10;
        req_wdata = (b == 5) ? 16'h0001 : 16'(1 << b);
        @(negedge clk);
        req_valid = 0;
        watch(4, cnt);
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (cnt[k] != ((k == b) ? 1 : 0)) begin failures++; $display("FAIL sw pulse %0d line %0d count %0d", b, k, cnt[k]); end
        end
      end
    end
    // TTCrx signals
    l1a = 1; tick(); l1a = 0;
    checks++; if (!ttc_bus[TTC_L1A]) begin failures++; $display("FAIL l1a"); end
    watch(2, cnt);
    checks++; if (cnt[TTC_L1A] != 0) begin failures++; $display("FAIL l1a too long"); end
    brcst = 8'b0001_1101; str = 0; tick();
    watch(2, cnt);
    checks++; if (cnt[1] + cnt[2] + cnt[3] + cnt[4] != 0) begin failures++; $display("FAIL brcst without strobe"); end
    str = 1; tick(); str = 0;
    for (int b = 0; b < 8; b++) cnt[b] = int'(ttc_bus[b]);
    checks++;
    if (cnt[TTC_BCNTRES] != 1 || cnt[TTC_START_PLAY] != 1 || cnt[TTC_START_SPY] != 1 || cnt[TTC_STOP_PLAY] != 1 || cnt[TTC_GRESET] != 0) begin
      failures++; $display("FAIL brcst decode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
