// spy_mem: 256-slice spy memory for diagnostics.
//
// On a start command (a TTC broadcast, gated by the owner) the memory
// captures DEPTH consecutive slices of 'din', one per bunch tick. VME reads
// it through a single port: 'dout' shows the word at the read address, and
// each 'rd' pulse (a VME read of the port) advances the address; 'clr_rd'
// returns it to zero. This follows the document's spy memories.
//
// Timing: capture on ce40, starting with the tick after 'start'. 'busy' is
// high while capturing.
module spy_mem #(
  parameter int DEPTH = 256,
  parameter int W     = 25
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ce40,
  input  logic         start,
  input  logic [W-1:0] din,
  input  logic         rd,
  input  logic         clr_rd,
  output logic [W-1:0] dout,
  output logic         busy
);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wa, ra;

  always_ff @(posedge clk) begin
    if (ce40 && busy) mem[wa] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wa   <= '0;
      ra   <= '0;
      busy <= 1'b0;
    end else begin
      if (ce40) begin
        if (start && !busy) begin
          busy <= 1'b1;
          wa   <= '0;
        end else if (busy) begin
          wa <= wa + 1'b1;
          if (wa == AW'(DEPTH - 1)) busy <= 1'b0;
        end
      end
      if (clr_rd)  ra <= '0;
      else if (rd) ra <= ra + 1'b1;
    end
  end

  assign dout = mem[ra];
endmodule
