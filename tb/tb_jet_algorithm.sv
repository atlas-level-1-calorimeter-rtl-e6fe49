// tb_jet_algorithm: self-checking test of jet_algorithm (and jet_subregion).
//
// A behavioural model in this file recomputes cluster sums, local maxima,
// RoI choice, threshold bits and multiplicities for each environment.
// Directed cases: one isolated jet, a tie between two equal clusters, two
// saturated clusters in one subregion (lowest eta/phi wins), eight jets
// (multiplicity limited to 7), cluster-size definitions 2x2/3x3/4x4; then
// random environments. The latency of 4 bunch ticks is checked once.
module tb_jet_algorithm;
  import jem_pkg::*;

  logic clk = 0, rst = 1;
  logic [1:0] ph;
  logic ce80, ce40;
  always #1 clk = ~clk;
  clk_phase_gen u_cg (.clk, .rst, .ph, .ce80, .ce40);

  je_t      [N_PHI_ENV-1:0][N_ETA_ENV-1:0] je;
  jet_def_t [7:0]                          jet_def;
  logic     [7:0][2:0]                     mult;
  logic     [7:0][10:0]                    roi;

  jet_algorithm dut (.clk, .rst, .ce40, .je, .jet_def, .mult, .roi);

  int checks = 0, failures = 0;

  // ---- reference model ----
  function automatic int csum(input int p0, input int e0, input int n);
    int s = 0;
    for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) s += int'(je[p0+i][e0+j]);
    return s;
  endfunction
  function automatic int cv(input int s); return (s > 1023) ? 1023 : s; endfunction

  function automatic bit is_max(input int p, input int e);
    int c = csum(p, e, 2);
    if (c > 1023) return 1;
    for (int dp = -1; dp <= 1; dp++)
      for (int de = -1; de <= 1; de++) begin
        int n;
        if (dp == 0 && de == 0) continue;
        n = cv(csum(p+dp, e+de, 2));
        if (de < 0 || (de == 0 && dp < 0)) begin if (!(cv(c) > n)) return 0; end
        else if (cv(c) < n) return 0;
      end
    return 1;
  endfunction

  function automatic bit passes(input int s, input int thr);
    return (s > 1023) || (s > thr);
  endfunction

  task automatic model(output logic [7:0][2:0] m_exp, output logic [7:0][10:0] r_exp);
    int cnt[8];
    for (int t = 0; t < 8; t++) cnt[t] = 0;
    for (int s = 0; s < 8; s++) begin
      int pb = 1 + 2 * (s % 4), eb = 1 + 2 * (s / 4);
      bit found = 0;
      int pos = 0;
      for (int k = 0; k < 4 && !found; k++)
        if (is_max(pb + k % 2, eb + k / 2)) begin found = 1; pos = k; end
      r_exp[s] = '0;
      if (found) begin
        int p = pb + pos % 2, e = eb + pos / 2;
        logic [7:0] tb;
        for (int t = 0; t < 8; t++) begin
          int thr = int'(jet_def[t].thr);
          case (jet_def[t].size)
            CL_2X2: tb[t] = passes(csum(p, e, 2), thr);
            CL_3X3: tb[t] = passes(csum(p-1, e-1, 3), thr) || passes(csum(p, e-1, 3), thr) ||
                            passes(csum(p-1, e, 3), thr)   || passes(csum(p, e, 3), thr);
            default: tb[t] = passes(csum(p-1, e-1, 4), thr);
          endcase
          if (tb[t]) cnt[t]++;
        end
        r_exp[s] = {tb, logic'(csum(p, e, 2) > 1023), 2'(pos)};
      end
    end
    for (int t = 0; t < 8; t++) m_exp[t] = (cnt[t] > 7) ? 3'd7 : 3'(cnt[t]);
  endtask

  task automatic tick(input int n);
    // each call lets n active bunch clock edges pass; returns at a negedge
    repeat (n) begin
      do @(negedge clk); while (!ce40);
      @(negedge clk);
    end
  endtask

  task automatic run_check(input string name);
    logic [7:0][2:0]  m_exp;
    logic [7:0][10:0] r_exp;
    model(m_exp, r_exp);
    tick(6);
    
    checks++;
    if (mult !== m_exp || roi !== r_exp) begin
      failures++;
      $display("FAIL %s: mult=%h exp=%h roi=%h exp=%h", name, mult, m_exp, roi, r_exp);
    end
  endtask

  int lat_seen;

  initial begin
    #200000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    je = '0;
    for (int t = 0; t < 8; t++) begin
      jet_def[t].size = clsize_e'(t % 3);
      jet_def[t].thr  = 10'(20 + 40 * t);
    end
    repeat (8) @(posedge clk);
    @(negedge clk);
    rst = 0;
    tick(6);
    run_check("empty");

    // latency: a single jet appears after exactly 4 bunch ticks
    tick(1);
    je[4][3] = 10'd300;
    lat_seen = 0;
    for (int k = 1; k <= 6; k++) begin
      tick(1);
      if (roi != '0 && lat_seen == 0) lat_seen = k;
    end
    checks++;
    if (lat_seen != 4) begin failures++; $display("FAIL latency %0d", lat_seen); end
    run_check("isolated jet");

    // tie of two equal neighbouring 2x2 clusters
    je = '0; je[3][2] = 10'd100; je[5][2] = 10'd100;
    run_check("tie");

    // two saturated clusters in the same subregion
    je = '0; je[1][1] = 10'd1000; je[1][2] = 10'd500; je[2][2] = 10'd1000;
    run_check("saturation");

    // eight well separated jets -> multiplicity 7
    je = '0;
    for (int s = 0; s < 8; s++) je[2 + 2 * (s % 4)][2 + 2 * (s / 4)] = 10'(100 + 50 * s);
    run_check("eight jets");
    checks++;
    if (mult[0] != 3'd7) begin failures++; $display("FAIL multiplicity cap %0d", mult[0]); end

    // random environments, sparse and dense
    for (int n = 0; n < 300; n++) begin
      for (int p = 0; p < N_PHI_ENV; p++)
        for (int e = 0; e < N_ETA_ENV; e++)
          je[p][e] = ($urandom_range(0, 3) == 0) ? 10'($urandom_range(0, (n % 2) ? 1023 : 200)) : 10'd0;
      for (int t = 0; t < 8; t++) begin
        jet_def[t].size = clsize_e'($urandom_range(0, 3));
        jet_def[t].thr  = 10'($urandom_range(0, 1023));
      end
      run_check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
