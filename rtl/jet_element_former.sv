// jet_element_former: builds the jet elements of one input processor.
//
// For each of N eta bins the 9-bit electromagnetic and hadronic energies are
// added into a 10-bit jet element. If either input is at its maximum (511,
// "saturated") the element is set to 1023. Elements below the VME
// programmable threshold are zeroed. Elements of FCAL channels (fcal_mask,
// derived from the module's geographic address) are divided by two, because
// the double-width FCAL cell is shared between two jet elements; a saturated
// FCAL element stays saturated (this design's choice). The order add,
// saturate, threshold, halve follows the document's list of requirements.
//
// Timing: registered on ce40, one bunch tick latency.
module jet_element_former
  import jem_pkg::*;
#(
  parameter int N = 4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                ce40,
  input  logic [N-1:0][8:0]   em,
  input  logic [N-1:0][8:0]   had,
  input  logic [8:0]          threshold,
  input  logic [N-1:0]        fcal_mask,
  output je_t  [N-1:0]        je
);
  je_t [N-1:0] je_c;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      je_t s;
      s = {1'b0, em[i]} + {1'b0, had[i]};
      if (em[i] == 9'h1FF || had[i] == 9'h1FF) je_c[i] = JE_MAX;
      else begin
        if (s < {1'b0, threshold}) s = '0;
        je_c[i] = fcal_mask[i] ? (s >> 1) : s;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst)       je <= '0;
    else if (ce40) je <= je_c;
  end
endmodule
