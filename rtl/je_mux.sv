// je_mux: sends one 10-bit jet element as two 5-bit words per bunch tick.
//
// The element is held at the bunch clock edge; its five least significant
// bits are driven in the first half of the tick and the five most
// significant bits in the second half, from an output flip-flop clocked at
// twice the bunch clock. LSBs first follows the document.
//
// Timing: clk is 4x the bunch clock; ph = 0 is the bunch clock edge. The
// element present at a ph = 0 edge is on dout (low half) from that edge and
// (high half) from the following ph = 2 edge.
module je_mux
  import jem_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] ph,
  input  je_t        je,
  output logic [4:0] dout
);
  je_t hold;
  always_ff @(posedge clk) begin
    if (rst) begin
      hold <= '0;
      dout <= '0;
    end else if (ph == 2'd0) begin
      hold <= je;
      dout <= je[4:0];
    end else if (ph == 2'd2) begin
      dout <= hold[9:5];
    end
  end
endmodule
