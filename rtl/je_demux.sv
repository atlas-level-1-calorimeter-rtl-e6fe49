// je_demux: receives a 5-bit jet element stream and rebuilds the element.
//
// The stream is latched in an input flip-flop at twice the bunch clock. The
// low half (sent first) is kept and joined with the high half into the
// 10-bit element. Pairs with je_mux.
//
// Timing: clk is 4x the bunch clock. The input flip-flop samples on the
// ph = 2 and ph = 0 edges; je is updated on the ph = 2 edge and is stable
// across the next bunch clock edge. A word leaving je_mux at a ph = 0 edge
// appears on je six 4x-clock edges later.
module je_demux
  import jem_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] ph,
  input  logic [4:0] din,
  output je_t        je
);
  logic [4:0] iff_q, lo;
  always_ff @(posedge clk) begin
    if (rst) begin
      iff_q <= '0;
      lo    <= '0;
      je    <= '0;
    end else if (ph == 2'd2) begin
      iff_q <= din;
      je    <= {iff_q, lo};
    end else if (ph == 2'd0) begin
      iff_q <= din;
      lo    <= iff_q;
    end
  end
endmodule
