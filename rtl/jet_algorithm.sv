// jet_algorithm: jet finding and counting on the 11 x 7 jet-element
// environment of one JEM.
//
// Stage 1 forms all cluster sums: 60 (10 phi x 6 eta) 2x2, 45 (9 x 5) 3x3
// and 32 (8 x 4) 4x4 sums. Sums are limited to the 10-bit range of the
// jet thresholds; a sum that overflows is set to 1023 and flagged saturated
// (a saturated input element by itself does not set the flag).
// Stage 2 finds local maxima among the 32 central 2x2 clusters (origins phi
// 1..8, eta 1..4): a candidate must be greater than its neighbours at lower
// eta (or same eta and lower phi) and not smaller than the others, so that
// two equal clusters give one maximum; a saturated 2x2 cluster is always a
// local maximum. Stage 3 chooses one RoI per 2x2 subregion and tests it
// against the eight jet definitions (jet_subregion). Stage 4 counts, for each
// definition, the subregions that passed, limited to 7.
// The cluster counts, the saturation rules and the multiplicity limit follow
// the document; the 10-bit sum range and the tie-break rule are this
// design's choice. Arithmetic is parallel, on de-multiplexed elements.
//
// Subregion s covers RoI origins phi 1+2*(s%4) .. 2+2*(s%4), eta 1+2*(s/4)
// .. 2+2*(s/4). roi[s] = {8 threshold bits, saturation, position}.
// Timing: four registers on ce40, so mult and roi appear 4 bunch ticks after
// the elements.
module jet_algorithm
  import jem_pkg::*;
(
  input  logic                                clk,
  input  logic                                rst,
  input  logic                                ce40,
  input  je_t      [N_PHI_ENV-1:0][N_ETA_ENV-1:0] je,
  input  jet_def_t [N_THR-1:0]                jet_def,
  output logic     [N_THR-1:0][2:0]           mult,
  output logic     [7:0][ROI_W-1:0]           roi
);
  localparam int P2 = N_PHI_ENV - 1, E2 = N_ETA_ENV - 1;   // 10 x 6
  localparam int P3 = N_PHI_ENV - 2, E3 = N_ETA_ENV - 2;   //  9 x 5
  localparam int P4 = N_PHI_ENV - 3, E4 = N_ETA_ENV - 3;   //  8 x 4

  function automatic clus_t limit(input logic [14:0] s);
    clus_t c;
    c.sat = (s > 15'd1023);
    c.v   = c.sat ? 10'h3FF : s[9:0];
    return c;
  endfunction

  function automatic logic [14:0] box(input je_t [N_PHI_ENV-1:0][N_ETA_ENV-1:0] a,
                                      input int p0, input int e0, input int n);
    logic [14:0] s;
    s = '0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        s = s + 15'(a[p0+i][e0+j]);
    return s;
  endfunction

  // Stage 1: cluster sums.
  clus_t [P2-1:0][E2-1:0] c22;
  clus_t [P3-1:0][E3-1:0] c33;
  clus_t [P4-1:0][E4-1:0] c44;

  always_ff @(posedge clk) begin
    if (rst) begin
      c22 <= '0;
      c33 <= '0;
      c44 <= '0;
    end else if (ce40) begin
      for (int p = 0; p < P2; p++)
        for (int e = 0; e < E2; e++) c22[p][e] <= limit(box(je, p, e, 2));
      for (int p = 0; p < P3; p++)
        for (int e = 0; e < E3; e++) c33[p][e] <= limit(box(je, p, e, 3));
      for (int p = 0; p < P4; p++)
        for (int e = 0; e < E4; e++) c44[p][e] <= limit(box(je, p, e, 4));
    end
  end

  // Stage 2: local maxima of the central 8 x 4 2x2 clusters.
  logic  [P4-1:0][E4-1:0] lmax_c, lmax;
  clus_t [P2-1:0][E2-1:0] c22_q;
  clus_t [P3-1:0][E3-1:0] c33_q;
  clus_t [P4-1:0][E4-1:0] c44_q;

  always_comb begin
    for (int p = 0; p < P4; p++) begin
      for (int e = 0; e < E4; e++) begin
        clus_t c;
        logic  m;
        c = c22[p+1][e+1];
        m = 1'b1;
        for (int dp = -1; dp <= 1; dp++) begin
          for (int de = -1; de <= 1; de++) begin
            clus_t n;
            n = c22[p+1+dp][e+1+de];
            if (de < 0 || (de == 0 && dp < 0)) begin
              if (!(c.v > n.v)) m = 1'b0;
            end else if (de > 0 || dp > 0) begin
              if (c.v < n.v) m = 1'b0;
            end
          end
        end
        lmax_c[p][e] = c.sat || m;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      lmax  <= '0;
      c22_q <= '0;
      c33_q <= '0;
      c44_q <= '0;
    end else if (ce40) begin
      lmax  <= lmax_c;
      c22_q <= c22;
      c33_q <= c33;
      c44_q <= c44;
    end
  end

  // Stage 3: one RoI per subregion.
  logic [7:0][ROI_W-1:0] roi_c, roi_q;

  for (genvar s = 0; s < 8; s++) begin : g_sub
    localparam int PB = 2 * (s % 4);      // RoI origin - 1 in phi
    localparam int EB = 2 * (s / 4);      // RoI origin - 1 in eta
    logic  [3:0]      lm;
    clus_t [3:0]      s22;
    clus_t [2:0][2:0] s33;
    clus_t [1:0][1:0] s44;
    always_comb begin
      for (int k = 0; k < 4; k++) begin
        lm[k]  = lmax[PB + k % 2][EB + k / 2];
        s22[k] = c22_q[PB + 1 + k % 2][EB + 1 + k / 2];
      end
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) s33[i][j] = c33_q[PB + i][EB + j];
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++) s44[i][j] = c44_q[PB + i][EB + j];
    end
    jet_subregion u_sub (
      .lmax(lm), .c22(s22), .c33(s33), .c44(s44), .jet_def, .roi(roi_c[s])
    );
  end

  // Stage 4: multiplicities.
  always_ff @(posedge clk) begin
    if (rst) begin
      roi_q <= '0;
      roi   <= '0;
      mult  <= '0;
    end else if (ce40) begin
      roi_q <= roi_c;
      roi   <= roi_q;
      for (int t = 0; t < N_THR; t++) begin
        logic [3:0] n;
        n = '0;
        for (int s = 0; s < 8; s++) n = n + 4'(roi_q[s][3 + t]);
        mult[t] <= (n > 4'd7) ? 3'd7 : n[2:0];
      end
    end
  end
endmodule
