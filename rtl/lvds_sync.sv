// lvds_sync: re-times one deserialiser channel onto the bunch clock.
//
// The 10-bit word from an LVDS deserialiser arrives with an arbitrary phase
// relative to the bunch clock. It is taken into an input flip-flop, then
// latched by a first column of flip-flops at one of four programmable
// phases (0/90/180/270 degrees, CLK_PHASE register code 00..11), then by a
// second column on the 0-degree bunch clock edge, and optionally by a third
// column that adds one full bunch tick (DELAY_REG). This three-column scheme
// follows the document's baseline synchroniser. The /LOCK link-error signal
// is not re-phased: it is latched on the bunch clock edge and delayed to
// line up with the data.
//
// Timing: clk is 4x the bunch clock; ph is the phase of the current edge and
// ce40 marks the bunch clock edge (ph == 0). The input flip-flop samples on
// every 4x edge in place of the deserialiser strobe (this design's choice).
// dout changes only on bunch clock edges; latency is 1 to 2 bunch ticks, plus
// one if extra_delay is set.
module lvds_sync #(
  parameter int W = 10
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [1:0]   ph,
  input  logic         ce40,
  input  logic [W-1:0] din,
  input  logic         lock_n,
  input  logic [1:0]   phase_sel,
  input  logic         extra_delay,
  output logic [W-1:0] dout,
  output logic         lock_n_sync
);
  logic [W-1:0] ifd, col1, col2, col3;
  logic         lock1, lock2;

  always_ff @(posedge clk) begin
    if (rst) begin
      ifd  <= '0;
      col1 <= '0;
      col2 <= '0;
      col3 <= '0;
      lock1 <= 1'b1;
      lock2 <= 1'b1;
    end else begin
      ifd <= din;
      if (ph == phase_sel) col1 <= ifd;
      if (ce40) begin
        col2  <= col1;
        col3  <= col2;
        lock1 <= lock_n;
        lock2 <= lock1;
      end
    end
  end

  assign dout        = extra_delay ? col3 : col2;
  assign lock_n_sync = lock2;
endmodule
