// jet_subregion: RoI choice and threshold tests for one 2x2 subregion.
//
// The core of 8 phi x 4 eta RoI candidates is divided into eight 2x2
// subregions, each holding at most one local maximum in normal conditions.
// Candidates are numbered pos = {eta offset, phi offset}. If several are
// local maxima (which only happens through saturation) the one at the
// lowest eta, then the lowest phi, is taken, i.e. the lowest pos. For the
// chosen RoI its 2x2 cluster, its four 3x3 clusters and its 4x4 cluster are
// tested against the eight jet definitions: a 2x2 or 4x4 definition needs
// its one cluster above the threshold, a 3x3 definition at least one of the
// four. Saturated clusters pass every threshold. With no local maximum all
// outputs are zero. These rules follow the document; "above" means strictly
// greater (this design's choice).
//
// Inputs: c33[i][j] is the 3x3 cluster whose origin is (phi base - 1 + i,
// eta base - 1 + j); c44 likewise with (phi base - 1 + i, eta base - 1 + j).
// Output roi = {8 threshold bits, saturation bit, 2 position bits}.
// Purely combinational.
module jet_subregion
  import jem_pkg::*;
(
  input  logic     [3:0]      lmax,
  input  clus_t    [3:0]      c22,
  input  clus_t    [2:0][2:0] c33,
  input  clus_t    [1:0][1:0] c44,
  input  jet_def_t [7:0]      jet_def,
  output logic     [10:0]     roi
);
  function automatic logic pass(input clus_t c, input logic [9:0] thr);
    return c.sat || (c.v > thr);
  endfunction

  always_comb begin
    logic [1:0] pos;
    logic       found;
    logic [7:0] thr_bits;
    int dp, de;
    pos   = 2'd0;
    found = 1'b0;
    for (int k = 3; k >= 0; k--) begin
      if (lmax[k]) begin
        pos   = 2'(k);
        found = 1'b1;
      end
    end
    dp = int'(pos[0]);
    de = int'(pos[1]);
    thr_bits = '0;
    for (int t = 0; t < 8; t++) begin
      case (jet_def[t].size)
        CL_2X2: thr_bits[t] = pass(c22[pos], jet_def[t].thr);
        CL_3X3: thr_bits[t] = pass(c33[dp][de],     jet_def[t].thr) ||
                              pass(c33[dp+1][de],   jet_def[t].thr) ||
                              pass(c33[dp][de+1],   jet_def[t].thr) ||
                              pass(c33[dp+1][de+1], jet_def[t].thr);
        default: thr_bits[t] = pass(c44[dp][de], jet_def[t].thr);
      endcase
    end
    if (found) roi = {thr_bits, c22[pos].sat, pos};
    else       roi = '0;
  end
endmodule
