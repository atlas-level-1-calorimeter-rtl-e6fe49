// jem_top: the Jet/Energy Module (JEM) of the ATLAS Level-1 calorimeter
// trigger.
//
// A JEM covers 8 phi x 4 eta jet elements of trigger space. Eleven input
// processors (phi rows V, A..H, W, Z; V, W, Z carry the neighbouring
// quadrants' overlap rows) turn 88 serial links into jet elements and send
// them at twice the bunch clock to the main processor and, for the eta
// overlap, to the neighbouring JEMs. The main processor runs the jet
// algorithm on the 11 x 7 environment and the energy algorithms on the 8 x 4
// core and drives two 25-bit result words to the merger modules. The ROC
// times the DAQ and RoI readout from the Level-1 accept and drives the two
// G-link words. The VME CPLD and control FPGA give VME access to all
// registers and fan out the TTC commands.
//
// Off-board and analog parts are outside this module and appear as ports:
// the LVDS deserialisers (rx_*), the TTCrx (ttc_*), the G-link transmitters
// (glink_*), the DLL lock lines, the neighbour JEMs' fan-in/fan-out links
// (fio_*) and the configuration lines.
//
// The JEM number is GEOADD[3:0]. JEMs 0 and 8 treat core eta bin 0, JEMs 7
// and 15 core eta bin 3, as the FCAL column: input processors halve it and
// the main processor copies it to the unconnected phi neighbour (which side
// is "outermost" is this design's choice).
//
// Clock: one clock at 4x the bunch clock (see clk_phase_gen). rst is
// synchronous; the TTC global-reset line also resets the processors.
module jem_top
  import jem_pkg::*;
(
  input  logic                                 clk,
  input  logic                                 rst,
  input  logic [5:0]                           geoadd,
  // reduced VME
  input  logic [23:1]                          vme_a,
  input  logic [15:0]                          vme_d_in,
  output logic [15:0]                          vme_d_out,
  output logic                                 vme_d_oe,
  input  logic                                 vme_ds0_n,
  input  logic                                 vme_write_n,
  output logic                                 vme_dtack_n,
  // TTCrx
  input  logic                                 ttc_l1a,
  input  logic [7:0]                           ttc_brcst,
  input  logic                                 ttc_brcst_str,
  input  logic                                 ttc_ready,
  // DLL lock lines: 0 crystal, 1 deskew, 2 main, 3..13 input processors
  input  logic [13:0]                          dll_locked,
  output logic                                 dll_reset,
  output logic                                 clk_ok,
  // deserialisers, per input processor: em 1..4, had 1..4
  input  logic [N_INPUT-1:0][7:0][9:0]         rx_data,
  input  logic [N_INPUT-1:0][7:0]              rx_lock_n,
  // jet elements shared with the neighbour JEMs
  input  logic [N_INPUT-1:0][4:0]              fio_left_in,
  input  logic [N_INPUT-1:0][1:0][4:0]         fio_right_in,
  output logic [N_INPUT-1:0][1:0][4:0]         fio_left_out,
  output logic [N_INPUT-1:0][4:0]              fio_right_out,
  // merger outputs
  output logic [24:0]                          jet_word,
  output logic [24:0]                          energy_word,
  // G-links
  input  logic [5:0]                           glink_status,
  output logic [19:0]                          glink_daq,
  output logic                                 glink_daq_dav,
  output logic [19:0]                          glink_roi,
  output logic                                 glink_roi_dav,
  output logic [1:0]                           glink_reset,
  output logic [1:0]                           glink_dfm,
  // configuration
  output logic [13:0]                          cfg_din,
  output logic [13:0]                          cfg_cclk,
  output logic [13:0]                          fpga_reset,
  output logic [5:0]                           can_node_addr
);
  localparam int NDEV = 15;

  logic [1:0] ph;
  logic       ce80, ce40;
  clk_phase_gen u_clk (.clk, .rst, .ph, .ce80, .ce40);

  // VME.
  logic        req_valid, req_wr;
  logic [3:0]  req_sub;
  logic [6:0]  req_addr;
  logic [15:0] req_wdata, req_rdata;

  vme_cpld u_cpld (
    .clk, .rst, .vme_a, .vme_d_in, .vme_d_out, .vme_d_oe, .vme_ds0_n,
    .vme_write_n, .vme_dtack_n, .geoadd, .ttc_clk_ok(ttc_ready),
    .req_valid, .req_wr, .req_sub, .req_addr, .req_wdata, .req_rdata,
    .cfg_din, .cfg_cclk, .fpga_reset, .can_node_addr
  );

  regbus_t [NDEV-1:0]    rb;
  logic [NDEV-1:0][15:0] dev_rdata;
  logic [7:0]            ttc_bus;

  control_fpga #(.NDEV(NDEV)) u_ctrl (
    .clk, .rst, .ce40,
    .req_valid, .req_wr, .req_sub, .req_addr, .req_wdata, .req_rdata,
    .rb, .dev_rdata,
    .ttc_l1a, .ttc_brcst, .ttc_brcst_str, .ttc_ready, .ttc_bus,
    .dll_xtal_locked(dll_locked[0]), .dll_deskew_locked(dll_locked[1]),
    .dll_others_locked(&dll_locked[13:2]),
    .dll_reset, .all_locked(clk_ok)
  );
  assign dev_rdata[0] = '0;
  assign dev_rdata[1] = '0;

  logic prst;
  assign prst = rst || ttc_bus[TTC_GRESET];

  // FCAL column from the JEM number.
  logic [3:0] jem_num, fcal_mask;
  logic       fcal_en;
  logic [2:0] fcal_eta;
  assign jem_num   = geoadd[3:0];
  assign fcal_en   = (jem_num == 4'd0) || (jem_num == 4'd8) ||
                     (jem_num == 4'd7) || (jem_num == 4'd15);
  assign fcal_eta  = (jem_num == 4'd7 || jem_num == 4'd15) ? 3'd4 : 3'd1;
  assign fcal_mask = !fcal_en ? 4'b0000 : (fcal_eta == 3'd4) ? 4'b1000 : 4'b0001;

  // Input processors.
  logic                        read_req, roi_req;
  logic [N_INPUT-1:0][3:0][4:0] je_local;
  logic [N_INPUT-1:0]          daq_ser_in, daq_valid_in;

  for (genvar i = 0; i < N_INPUT; i++) begin : g_in
    input_fpga u_in (
      .clk, .rst(prst), .ph, .ce40,
      .rx_data(rx_data[i]), .rx_lock_n(rx_lock_n[i]),
      .ttc(ttc_bus), .read_req, .fcal_mask,
      .dll_locked(dll_locked[3+i]),
      .rb(rb[4+i]), .rdata(dev_rdata[4+i]),
      .je_main(je_local[i]), .je_left(fio_left_out[i]), .je_right(fio_right_out[i]),
      .daq_ser(daq_ser_in[i]), .daq_valid(daq_valid_in[i])
    );
  end

  // Main processor.
  logic       main_daq_ser, main_daq_valid, roi_valid;
  logic [1:0] roi_ser;

  main_fpga u_main (
    .clk, .rst(prst), .ph, .ce40,
    .je_local, .je_left(fio_left_in), .je_right(fio_right_in),
    .fcal_en, .fcal_eta,
    .ttc(ttc_bus), .read_req, .roi_req,
    .dll_locked(dll_locked[2]),
    .rb(rb[3]), .rdata(dev_rdata[3]),
    .jet_word, .energy_word,
    .daq_ser(main_daq_ser), .daq_valid(main_daq_valid),
    .roi_ser, .roi_valid
  );

  // Read-out controller.
  roc_fpga u_roc (
    .clk, .rst(prst), .ce40, .ttc(ttc_bus),
    .daq_ser_in({main_daq_ser, daq_ser_in}),
    .daq_valid_in({main_daq_valid, daq_valid_in}),
    .roi_ser_in(roi_ser), .roi_valid_in(roi_valid),
    .glink_status,
    .rb(rb[2]), .rdata(dev_rdata[2]),
    .read_req, .roi_req, .bcid(),
    .glink_daq, .glink_daq_dav, .glink_roi, .glink_roi_dav,
    .glink_reset, .glink_dfm
  );
endmodule
