// link_monitor: error checks on one synchronised input channel.
//
// Each bunch tick the 10-bit word (bits 9..1 energy, bit 0 odd parity, as
// sent by the pre-processor) is checked: the energy is passed on only if the
// parity is good, the link is locked (/LOCK low) and the channel is not
// masked off by the VME MASK register; otherwise it is zeroed. Parity
// errors while locked are counted in a saturating 8-bit counter; losses of
// lock are counted on the leading edge of /LOCK in a saturating 4-bit
// counter. Each kind of error also sets a sticky flag. These widths and the
// zeroing rules follow the document. Counters and flags have separate clear
// inputs so that a VME read can clear a counter alone (this design's choice;
// the document clears counters on readout and by a control register).
//
// Timing: clk is 4x the bunch clock, work happens when ce40 is high; energy
// is registered (one bunch tick latency). Clears act on any clock edge.
module link_monitor #(
  parameter int PEC_W = 8,
  parameter int LLC_W = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ce40,
  input  logic [9:0]       din,
  input  logic             lock_n,
  input  logic             mask,
  input  logic             clr_ll_cnt,
  input  logic             clr_ll_flag,
  input  logic             clr_pe_cnt,
  input  logic             clr_pe_flag,
  output logic [8:0]       energy,
  output logic             par_err_flag,
  output logic             ll_flag,
  output logic [PEC_W-1:0] pec,
  output logic [LLC_W-1:0] llc
);
  logic par_ok, lock_n_d, par_err, lock_lost;

  assign par_ok    = ^din;                 // odd parity over all 10 bits
  assign par_err   = !lock_n && !par_ok;
  assign lock_lost = lock_n && !lock_n_d;  // leading edge of /LOCK

  always_ff @(posedge clk) begin
    if (rst) begin
      energy       <= '0;
      lock_n_d     <= 1'b0;
      pec          <= '0;
      llc          <= '0;
      par_err_flag <= 1'b0;
      ll_flag      <= 1'b0;
    end else begin
      if (ce40) begin
        lock_n_d <= lock_n;
        energy   <= (mask || lock_n || !par_ok) ? 9'd0 : din[9:1];
        if (par_err && pec != '1) pec <= pec + 1'b1;
        if (par_err) par_err_flag <= 1'b1;
        if (lock_lost && llc != '1) llc <= llc + 1'b1;
        if (lock_lost) ll_flag <= 1'b1;
      end
      if (clr_pe_cnt)  pec          <= '0;
      if (clr_pe_flag) par_err_flag <= 1'b0;
      if (clr_ll_cnt)  llc          <= '0;
      if (clr_ll_flag) ll_flag      <= 1'b0;
    end
  end
endmodule
