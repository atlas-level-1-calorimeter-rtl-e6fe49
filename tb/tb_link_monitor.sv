// tb_link_monitor: self-checking test of link_monitor.
// A cycle-level model in this file mirrors the rules: the energy passes only
// with good odd parity, /LOCK low and the channel unmasked; parity errors
// while locked and leading edges of /LOCK are counted (saturating) and set
// sticky flags; the four clear inputs act at once. Random words with 5 %
// bad parity, random lock-loss episodes, masking and clears are applied for
// 3000 ticks, and the counter saturation is forced at the end.
module tb_link_monitor;
  logic clk = 0, rst = 1;
  logic [1:0] ph;
  logic ce80, ce40;
  always #1 clk = ~clk;
  clk_phase_gen u_cg (.clk, .rst, .ph, .ce80, .ce40);

  logic [9:0] din;
  logic       lock_n, mask, c_llc, c_llf, c_pec, c_pef;
  logic [8:0] energy;
  logic       pef, llf;
  logic [7:0] pec;
  logic [3:0] llc;
  link_monitor dut (.clk, .rst, .ce40, .din, .lock_n, .mask,
                    .clr_ll_cnt(c_llc), .clr_ll_flag(c_llf), .clr_pe_cnt(c_pec), .clr_pe_flag(c_pef),
                    .energy, .par_err_flag(pef), .ll_flag(llf), .pec, .llc);

  int checks = 0, failures = 0;
  int m_e = 0, m_pec = 0, m_llc = 0;
  bit m_pef = 0, m_llf = 0, m_lockd = 0;
  int n_pe = 0, n_ll = 0;

  task automatic tick();
    bit pok = ^din;
    do @(negedge clk); while (!ce40);
    @(negedge clk);
    m_e = (mask || lock_n || !pok) ? 0 : int'(din[9:1]);
    if (!lock_n && !pok) begin m_pef = 1; if (m_pec < 255) m_pec++; n_pe++; end
    if (lock_n && !m_lockd) begin m_llf = 1; if (m_llc < 15) m_llc++; n_ll++; end
    m_lockd = lock_n;
    checks++;
    if (int'(energy) != m_e || int'(pec) != m_pec || int'(llc) != m_llc || pef != m_pef || llf != m_llf) begin
      failures++;
      if (failures < 10)
        $display("FAIL e=%0d/%0d pec=%0d/%0d llc=%0d/%0d pef=%b/%b llf=%b/%b",
                 energy, m_e, pec, m_pec, llc, m_llc, pef, m_pef, llf, m_llf);
    end
  endtask

  task automatic clears(input bit a, b, c, d);
    c_llc = a; c_llf = b; c_pec = c; c_pef = d;
    @(negedge clk);
    c_llc = 0; c_llf = 0; c_pec = 0; c_pef = 0;
    if (a) m_llc = 0;
    if (b) m_llf = 0;
    if (c) m_pec = 0;
    if (d) m_pef = 0;
  endtask

  function automatic logic [9:0] word(input bit bad);
    logic [8:0] e = 9'($urandom());
    return {e, ~(^e) ^ bad};
  endfunction

  initial begin
    #400000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 10'h001; lock_n = 0; mask = 0;
    c_llc = 0; c_llf = 0; c_pec = 0; c_pef = 0;
    repeat (8) @(posedge clk);
    @(negedge clk);
    rst = 0;
    tick();
    for (int k = 0; k < 3000; k++) begin
      din = word($urandom_range(0, 19) == 0);
      if ($urandom_range(0, 49) == 0) lock_n = ~lock_n;
      mask = ($urandom_range(0, 29) == 0);
      tick();
      if ($urandom_range(0, 99) == 0)
        clears($urandom_range(0, 1), $urandom_range(0, 1), $urandom_range(0, 1), $urandom_range(0, 1));
    end
    // saturation of both counters
    lock_n = 0;
    clears(1, 1, 1, 1);
    for (int k = 0; k < 300; k++) begin din = word(1); tick(); end
    for (int k = 0; k < 20; k++) begin lock_n = 1; din = word(0); tick(); lock_n = 0; tick(); end
    checks++;
    if (pec != 8'hFF || llc != 4'hF) begin failures++; $display("FAIL saturation pec=%0d llc=%0d", pec, llc); end
    checks++;
    if (n_pe < 50 || n_ll < 20) begin failures++; $display("FAIL too few events %0d %0d", n_pe, n_ll); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
