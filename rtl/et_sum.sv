// et_sum: total transverse energy of the 32 core jet elements.
//
// Each jet element is zeroed unless it exceeds the VME-programmed Et
// threshold (ET_THR), which applies to this path only. The 32 values are then
// added in a 5-stage binary tree at 12-bit range. Any overflow in the tree,
// or any saturated (1023) input element, forces the result to 4095 GeV, the
// 12-bit full scale. All of this follows the document.
//
// Timing: one register for the threshold stage and one per adder stage, all
// on ce40: et appears 6 bunch ticks after the elements.
module et_sum
  import jem_pkg::*;
#(
  parameter int N = 32
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           ce40,
  input  je_t  [N-1:0]   je,
  input  je_t            threshold,
  output esum_t          et
);
  localparam int STAGES = $clog2(N);

  esum_t lvl [STAGES+1][N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s <= STAGES; s++)
        for (int i = 0; i < N; i++) lvl[s][i] <= '0;
    end else if (ce40) begin
      for (int i = 0; i < N; i++) begin
        if (je[i] == JE_MAX)          lvl[0][i] <= E_MAX;
        else if (je[i] > threshold)   lvl[0][i] <= {2'b00, je[i]};
        else                          lvl[0][i] <= '0;
      end
      for (int s = 1; s <= STAGES; s++)
        for (int i = 0; i < (N >> s); i++)
          lvl[s][i] <= sat_add12(lvl[s-1][2*i], lvl[s-1][2*i+1]);
    end
  end

  assign et = lvl[STAGES][0];
endmodule
