// roc_fpga: read-out controller of the JEM.
//
// On each Level-1 accept (TTC L1A line) the ROC waits LATENCY_REG bunch
// ticks and then raises ReadRequest for SLICE_REG consecutive ticks (1 to 5;
// 0 is taken as 1 and values above 5 as 5), which makes every readout
// sequencer on the module move that many slices into its derandomiser. The
// RoI request is raised for one tick after ROI_REG ticks. The ROC keeps
// the bunch-crossing counter (0..3563, loaded with BC_OFFSET_REG on
// BcntRes) and reads it out through two sequencers of its own, one beside
// the DAQ streams and one beside the RoI stream; both repeat the first
// slice's number for all slices of an event. It then forms the two 20-bit
// G-link words: DAQ bits 0-10 input processors V, A..H, W, Z, bit 11 main
// processor, bit 12 BC number; RoI bits 0-1 RoI data, bit 2 BC number;
// other bits 0. DAV is high when the stream valid flags are all high and
// the link is enabled in GLINK_CONTROL_REG, so it drops on each separator
// bit. The bit map and the DAV rule are this design's choice.
//
// Registers (byte address): 00 VERSION, 02 CONTROL (G-link chip resets),
// 04 GLINK_STATUS, 10 LATENCY_REG, 12 SLICE_REG, 14 ROI_REG, 16
// BC_OFFSET_REG, 18 GLINK_CONTROL_REG (enable slice, enable RoI, double
// frame slice, double frame RoI).
//
// Timing: clk is 4x the bunch clock; all control runs on ce40. ReadRequest
// rises LATENCY_REG + 1 ticks after the L1A tick.
module roc_fpga
  import jem_pkg::*;
#(
  parameter int          PIPE_DEPTH = 48,
  parameter logic [15:0] VERSION    = 16'h0001
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ce40,
  input  logic [7:0]        ttc,
  input  logic [11:0]       daq_ser_in,
  input  logic [11:0]       daq_valid_in,
  input  logic [1:0]        roi_ser_in,
  input  logic              roi_valid_in,
  input  logic [5:0]        glink_status,
  input  regbus_t           rb,
  output logic [15:0]       rdata,
  output logic              read_req,
  output logic              roi_req,
  output logic [11:0]       bcid,
  output logic [19:0]       glink_daq,
  output logic              glink_daq_dav,
  output logic [19:0]       glink_roi,
  output logic              glink_roi_dav,
  output logic [1:0]        glink_reset,
  output logic [1:0]        glink_dfm
);
  logic [4:0] latency_reg, roi_reg, bc_offset;
  logic [2:0] slice_reg;
  logic [3:0] glink_ctl;
  logic [1:0] ctl_reg;
  logic       wr, rd;

  assign wr = rb.cs && rb.wr;
  assign rd = rb.cs && !rb.wr;

  always_ff @(posedge clk) begin
    if (rst) begin
      latency_reg <= '0;
      roi_reg     <= '0;
      bc_offset   <= '0;
      slice_reg   <= 3'd1;
      glink_ctl   <= '0;
      ctl_reg     <= '0;
    end else if (wr) begin
      case (rb.addr)
        7'h02: ctl_reg     <= rb.wdata[1:0];
        7'h10: latency_reg <= rb.wdata[4:0];
        7'h12: slice_reg   <= rb.wdata[2:0];
        7'h14: roi_reg     <= rb.wdata[4:0];
        7'h16: bc_offset   <= rb.wdata[4:0];
        7'h18: glink_ctl   <= rb.wdata[3:0];
        default: ;
      endcase
    end
  end
  assign glink_reset = ctl_reg;
  assign glink_dfm   = glink_ctl[3:2];

  // L1A delay line and ReadRequest generation.
  logic [31:0] l1a_sr;
  logic [2:0]  nslice, slice_cnt;
  logic        l1a_del, roi_del;

  assign nslice  = (slice_reg == 3'd0) ? 3'd1 : (slice_reg > 3'd5) ? 3'd5 : slice_reg;
  assign l1a_del = (latency_reg == 5'd0) ? ttc[TTC_L1A] : l1a_sr[latency_reg - 5'd1];
  assign roi_del = (roi_reg == 5'd0)     ? ttc[TTC_L1A] : l1a_sr[roi_reg - 5'd1];

  always_ff @(posedge clk) begin
    if (rst) begin
      l1a_sr    <= '0;
      slice_cnt <= '0;
      read_req  <= 1'b0;
      roi_req   <= 1'b0;
    end else if (ce40) begin
      l1a_sr <= {l1a_sr[30:0], ttc[TTC_L1A]};
      if (l1a_del) begin
        read_req  <= 1'b1;
        slice_cnt <= nslice - 3'd1;
      end else if (slice_cnt != 3'd0) begin
        read_req  <= 1'b1;
        slice_cnt <= slice_cnt - 3'd1;
      end else begin
        read_req <= 1'b0;
      end
      roi_req <= roi_del;
    end
  end

  // Bunch-crossing counter.
  always_ff @(posedge clk) begin
    if (rst) bcid <= '0;
    else if (ce40) begin
      if (ttc[TTC_BCNTRES])       bcid <= {7'd0, bc_offset};
      else if (bcid == 12'd3563)  bcid <= '0;
      else                        bcid <= bcid + 12'd1;
    end
  end

  logic bc_daq_ser, bc_daq_valid;
  logic [1:0] bc_roi_ser;
  logic bc_roi_valid;

  readout_sequencer #(.W(SLICE_W), .LANES(1), .PIPE_DEPTH(PIPE_DEPTH),
                      .HOLD_FIRST(1'b1)) u_ros_bc (
    .clk, .rst, .ce40, .din({bcid, 76'd0}), .read_req,
    .ser(bc_daq_ser), .valid(bc_daq_valid), .fifo_count(), .overflow()
  );
  // RoI side: the BC number padded to the 2 x 48-bit RoI packet, sent on
  // the first lane only.
  readout_sequencer #(.W(96), .LANES(2), .PIPE_DEPTH(PIPE_DEPTH),
                      .HOLD_FIRST(1'b1)) u_ros_bc_roi (
    .clk, .rst, .ce40, .din({48'd0, bcid, 36'd0}), .read_req(roi_req),
    .ser(bc_roi_ser), .valid(bc_roi_valid), .fifo_count(), .overflow()
  );

  always_comb begin
    glink_daq        = '0;
    glink_daq[11:0]  = daq_ser_in;
    glink_daq[12]    = bc_daq_ser;
    glink_daq_dav    = glink_ctl[0] && (&daq_valid_in) && bc_daq_valid;
    glink_roi        = '0;
    glink_roi[1:0]   = roi_ser_in;
    glink_roi[2]     = bc_roi_ser[0];
    glink_roi_dav    = glink_ctl[1] && roi_valid_in && bc_roi_valid;
  end

  always_ff @(posedge clk) begin
    if (rst) rdata <= '0;
    else if (rd) begin
      case (rb.addr)
        7'h00: rdata <= VERSION;
        7'h02: rdata <= {14'd0, ctl_reg};
        7'h04: rdata <= {10'd0, glink_status};
        7'h10: rdata <= {11'd0, latency_reg};
        7'h12: rdata <= {13'd0, slice_reg};
        7'h14: rdata <= {11'd0, roi_reg};
        7'h16: rdata <= {11'd0, bc_offset};
        7'h18: rdata <= {12'd0, glink_ctl};
        default: rdata <= '0;
      endcase
    end
  end
endmodule
