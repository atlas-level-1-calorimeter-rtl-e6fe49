// clk_phase_gen: bunch-clock phase counter and clock enables.
//
// The JEM derives four phases of the 40 MHz bunch clock (0, 90, 180, 270
// degrees) and a 2x bunch clock with on-chip DLLs. Here the design runs on a
// single clock at four times the bunch clock, and this block counts its
// edges: ph = 0..3 names the phase of the current edge. ce40 is high on the
// phase-0 edge (the bunch clock edge), ce80 on the phase-0 and phase-2
// edges. Replacing the DLL phases by a 4x clock is this design's choice.
// Reset puts the counter at phase 0.
module clk_phase_gen (
  input  logic       clk,
  input  logic       rst,
  output logic [1:0] ph,
  output logic       ce80,
  output logic       ce40
);
  always_ff @(posedge clk) begin
    if (rst) ph <= 2'd0;
    else     ph <= ph + 2'd1;
  end
  assign ce40 = (ph == 2'd0);
  assign ce80 = ~ph[0];
endmodule
