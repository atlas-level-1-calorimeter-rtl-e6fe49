// miss_et: missing-energy vector (Ex, Ey) of the 8 x 4 core jet elements.
//
// To keep the logic small the four jet elements of each phi row are summed
// first. Each of the 8 row sums (12 bits) is then projected on x and y by
// multiplying with |cos phi| and |sin phi| of that row. As in the document,
// a 12-bit sum is split into its 6 most and 6 least significant bits, each
// half goes through its own fixed-coefficient multiplier, and the two
// truncated products are added; the result may be 1 LSB below the exact
// product. The coefficients are 12-bit unsigned fractions (value/4096) from
// the VME MULT registers; signs of the quadrant are left to the merger
// (this design's choice). Two saturating 8-input, 3-stage adder trees give
// the 12-bit Ex and Ey. A saturated input element saturates its row sum, and
// a saturated row sum saturates both projections.
//
// Timing: input register, row sum, multiplier and three adder stages, all
// on ce40: ex/ey appear 6 bunch ticks after the elements, like et_sum.
module miss_et
  import jem_pkg::*;
#(
  parameter int N_PHI = 8,
  parameter int N_ETA = 4
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          ce40,
  input  je_t   [N_PHI-1:0][N_ETA-1:0]  je,
  input  logic  [N_PHI-1:0][11:0]       coef_x,
  input  logic  [N_PHI-1:0][11:0]       coef_y,
  output esum_t                         ex,
  output esum_t                         ey
);
  je_t   [N_PHI-1:0][N_ETA-1:0] je_q;
  esum_t rowsum [N_PHI];
  esum_t px [N_PHI], py [N_PHI];
  esum_t ax1 [4], ay1 [4], ax2 [2], ay2 [2];

  function automatic esum_t project(input esum_t s, input logic [11:0] c);
    logic [17:0] ph, pl;
    logic [12:0] r;
    if (s == E_MAX) return E_MAX;
    ph = s[11:6] * c;                 // hi word, weight 64
    pl = s[5:0]  * c;                 // lo word
    r  = {1'b0, ph[17:6]} + {7'd0, pl[17:12]};
    return r[12] ? E_MAX : r[11:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      je_q <= '0;
      for (int p = 0; p < N_PHI; p++) begin
        rowsum[p] <= '0;
        px[p] <= '0;
        py[p] <= '0;
      end
      for (int i = 0; i < 4; i++) begin ax1[i] <= '0; ay1[i] <= '0; end
      for (int i = 0; i < 2; i++) begin ax2[i] <= '0; ay2[i] <= '0; end
      ex <= '0;
      ey <= '0;
    end else if (ce40) begin
      je_q <= je;
      for (int p = 0; p < N_PHI; p++) begin
        esum_t s;
        s = '0;
        for (int e = 0; e < N_ETA; e++)
          s = sat_add12(s, (je_q[p][e] == JE_MAX) ? E_MAX : {2'b00, je_q[p][e]});
        rowsum[p] <= s;
        px[p] <= project(rowsum[p], coef_x[p]);
        py[p] <= project(rowsum[p], coef_y[p]);
      end
      for (int i = 0; i < 4; i++) begin
        ax1[i] <= sat_add12(px[2*i], px[2*i+1]);
        ay1[i] <= sat_add12(py[2*i], py[2*i+1]);
      end
      for (int i = 0; i < 2; i++) begin
        ax2[i] <= sat_add12(ax1[2*i], ax1[2*i+1]);
        ay2[i] <= sat_add12(ay1[2*i], ay1[2*i+1]);
      end
      ex <= sat_add12(ax2[0], ax2[1]);
      ey <= sat_add12(ay2[0], ay2[1]);
    end
  end
endmodule
