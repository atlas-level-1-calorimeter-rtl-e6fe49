// energy_encoder: packs Et, Ex and Ey into the 25-bit energy result word.
//
// Only 8 backplane bits are available per energy value, so each 12-bit
// value is compressed with the fixed quad-linear code of the document:
// 0-63 kept as is (scale bits 00), 64-255 divided by 4 (01), 256-1023 by
// 16 (10), 1024-4095 by 64 (11); the 2 scale bits head the 6-bit mantissa.
// Word layout (this design's choice, matching the spy ports): bits 7..0 Ex,
// 15..8 Ey, 23..16 Et, 24 odd parity over the word.
//
// Timing: output flip-flop on ce40, one bunch tick.
module energy_encoder
  import jem_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ce40,
  input  esum_t       et,
  input  esum_t       ex,
  input  esum_t       ey,
  output logic [24:0] word
);
  logic [23:0] d;
  assign d = {quad_lin(et), quad_lin(ey), quad_lin(ex)};
  always_ff @(posedge clk) begin
    if (rst)       word <= '0;
    else if (ce40) word <= {odd_par(128'(d)), d};
  end
endmodule
