// control_fpga: board control of the JEM.
//
// VME bridge: the VME CPLD hands over every module access whose sub-base
// address is 1..14. The control FPGA registers it and drives a register bus
// with one chip select per device (1 itself, 2 ROC, 3 main processor, 4..14
// input processors V, A..H, W, Z); one clock later it takes the selected
// device's read data and returns it. The document's 11-bit ring through the
// input processors is replaced by this point-to-point bus (its protocol is
// not given).
//
// TTC: the signals decoded by the TTCrx are turned into 8 control lines for
// the processors, each held for one bunch tick: 0 L1A, 1 BcntRes (broadcast
// bit 0), 2 start playback (broadcast bit 2), 3 start spy (bit 3), 4 stop
// playback (bit 4), 5 global reset. Software can issue the same commands
// through TTC_REG (a pulse register, bits 0-7 go straight onto the lines),
// and CONTROL_REG bit 0 raises the global reset line. The line coding is
// this design's choice.
//
// Clocks: the DLLs are held in reset while the TTCrx is not ready;
// STATUS_REG shows the lock of the crystal and deskew DLLs and all_locked
// is the AND of all DLL lock lines on the board.
//
// Registers (byte address): 00 VERSION, 02 CONTROL, 04 STATUS, 10 TTC_REG,
// 20 TTCrx (8 bits, stored for the TTCrx set-up).
// Timing: clk is 4x the bunch clock; read data reach the CPLD 3 clocks
// after the request.
module control_fpga
  import jem_pkg::*;
#(
  parameter int          NDEV    = 15,
  parameter logic [15:0] VERSION = 16'h0001
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  ce40,
  // from the VME CPLD
  input  logic                  req_valid,
  input  logic                  req_wr,
  input  logic [3:0]            req_sub,
  input  logic [6:0]            req_addr,
  input  logic [15:0]           req_wdata,
  output logic [15:0]           req_rdata,
  // register bus to the devices
  output regbus_t [NDEV-1:0]    rb,
  input  logic [NDEV-1:0][15:0] dev_rdata,
  // TTCrx
  input  logic                  ttc_l1a,
  input  logic [7:0]            ttc_brcst,
  input  logic                  ttc_brcst_str,
  input  logic                  ttc_ready,
  output logic [7:0]            ttc_bus,
  // clocks
  input  logic                  dll_xtal_locked,
  input  logic                  dll_deskew_locked,
  input  logic                  dll_others_locked,
  output logic                  dll_reset,
  output logic                  all_locked
);
  localparam logic [3:0] SELF = 4'd1;

  regbus_t   req_q;
  logic [3:0] sub_q, sub_qq;
  logic [15:0] self_rdata;
  logic [7:0]  ttcrx_reg, ttc_pend;
  logic        greset_pend;

  // Request register and chip selects.
  always_ff @(posedge clk) begin
    if (rst) begin
      req_q  <= '0;
      sub_q  <= '0;
      sub_qq <= '0;
    end else begin
      req_q.cs    <= req_valid;
      req_q.wr    <= req_wr;
      req_q.addr  <= req_addr;
      req_q.wdata <= req_wdata;
      sub_q       <= req_sub;
      sub_qq      <= sub_q;
    end
  end

  always_comb begin
    for (int d = 0; d < NDEV; d++) begin
      rb[d]    = req_q;
      rb[d].cs = req_q.cs && (sub_q == 4'(d)) && (d >= 2);
    end
  end

  // Own registers.
  logic self_wr, self_rd;
  assign self_wr = req_q.cs && req_q.wr && sub_q == SELF;
  assign self_rd = req_q.cs && !req_q.wr && sub_q == SELF;

  always_ff @(posedge clk) begin
    if (rst) begin
      ttcrx_reg   <= '0;
      ttc_pend    <= '0;
      greset_pend <= 1'b0;
      self_rdata  <= '0;
    end else begin
      if (ce40) begin
        ttc_pend    <= '0;
        greset_pend <= 1'b0;
      end
      if (self_wr) begin
        case (req_q.addr)
          7'h02: if (req_q.wdata[0]) greset_pend <= 1'b1;
          7'h10: ttc_pend  <= ttc_pend | req_q.wdata[7:0];
          7'h20: ttcrx_reg <= req_q.wdata[7:0];
          default: ;
        endcase
      end
      if (self_rd) begin
        case (req_q.addr)
          7'h00: self_rdata <= VERSION;
          7'h04: self_rdata <= {14'd0, dll_deskew_locked, dll_xtal_locked};
          7'h20: self_rdata <= {8'd0, ttcrx_reg};
          default: self_rdata <= '0;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) req_rdata <= '0;
    else if (sub_qq == SELF) req_rdata <= self_rdata;
    else if (int'(sub_qq) < NDEV) req_rdata <= dev_rdata[sub_qq];
    else req_rdata <= '0;
  end

  // TTC decoding onto the control lines.
  always_ff @(posedge clk) begin
    if (rst) ttc_bus <= '0;
    else if (ce40) begin
      ttc_bus <= ttc_pend;
      ttc_bus[TTC_L1A]        <= ttc_l1a || ttc_pend[TTC_L1A];
      ttc_bus[TTC_BCNTRES]    <= (ttc_brcst_str && ttc_brcst[0]) || ttc_pend[TTC_BCNTRES];
      ttc_bus[TTC_START_PLAY] <= (ttc_brcst_str && ttc_brcst[2]) || ttc_pend[TTC_START_PLAY];
      ttc_bus[TTC_START_SPY]  <= (ttc_brcst_str && ttc_brcst[3]) || ttc_pend[TTC_START_SPY];
      ttc_bus[TTC_STOP_PLAY]  <= (ttc_brcst_str && ttc_brcst[4]) || ttc_pend[TTC_STOP_PLAY];
      ttc_bus[TTC_GRESET]     <= greset_pend || ttc_pend[TTC_GRESET];
    end
  end

  assign dll_reset  = !ttc_ready;
  assign all_locked = dll_xtal_locked && dll_deskew_locked && dll_others_locked;
endmodule
