// playback_mem: test-pattern memory of one input processor.
//
// Holds DEPTH slices of NCH words of W bits (256 x 8 x 10 in the document).
// VME loads it through a single data port: each write stores one word and
// advances the write address, channel first, then slice (order is this
// design's choice); clr_addr returns the address to zero. A TTC "start
// playback" command makes the memory play DEPTH consecutive slices, one per
// bunch tick, which the input processor injects into the data path right
// after the synchroniser in place of the link data. A "stop" command ends
// playback early. Reading back is not supported, as in the document.
//
// Timing: clk is 4x the bunch clock, start/stop are sampled with ce40.
// 'active' and 'dout' are registered together: slice k is on dout during
// the (k+1)-th bunch tick after start.
module playback_mem #(
  parameter int DEPTH = 256,
  parameter int NCH   = 8,
  parameter int W     = 10
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce40,
  input  logic                 wr,
  input  logic [W-1:0]         wdata,
  input  logic                 clr_addr,
  input  logic                 start,
  input  logic                 stop,
  output logic                 active,
  output logic [NCH-1:0][W-1:0] dout
);
  localparam int AW = $clog2(DEPTH);
  localparam int CW = (NCH > 1) ? $clog2(NCH) : 1;

  logic [NCH-1:0][W-1:0] mem [DEPTH];
  logic [AW-1:0] wa_slice, ra;
  logic [CW-1:0] wa_ch;
  logic          running;

  always_ff @(posedge clk) begin
    if (wr) mem[wa_slice][wa_ch] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wa_slice <= '0;
      wa_ch    <= '0;
      ra       <= '0;
      running  <= 1'b0;
      active   <= 1'b0;
      dout     <= '0;
    end else begin
      if (clr_addr) begin
        wa_slice <= '0;
        wa_ch    <= '0;
      end else if (wr) begin
        if (wa_ch == CW'(NCH - 1)) begin
          wa_ch    <= '0;
          wa_slice <= wa_slice + 1'b1;
        end else begin
          wa_ch <= wa_ch + 1'b1;
        end
      end
      if (ce40) begin
        if (stop) begin
          running <= 1'b0;
          active  <= 1'b0;
        end else if (start) begin
          running <= 1'b1;
          ra      <= '0;
          active  <= 1'b0;
        end else if (running) begin
          dout   <= mem[ra];
          active <= 1'b1;
          ra     <= ra + 1'b1;
          if (ra == AW'(DEPTH - 1)) running <= 1'b0;
        end else begin
          active <= 1'b0;
        end
      end
    end
  end
endmodule
