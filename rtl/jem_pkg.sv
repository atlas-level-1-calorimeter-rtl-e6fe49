// jem_pkg: constants, types and small functions shared by the Jet/Energy
// Module (JEM) logic.
//
// The JEM works on "jet elements": the em + had transverse energy of a
// 0.2 x 0.2 (phi x eta) cell, 10 bits with 1 GeV per LSB, where the largest
// code (1023) means "saturated". Energy sums are 12 bits and saturate at
// 4095. The environment seen by the main processor is 11 phi x 7 eta jet
// elements around a core of 8 phi x 4 eta.
//
// Environment indexing used throughout: phi 0 = overlap row V, 1..8 = core
// rows A..H, 9..10 = overlap rows W, Z; eta 0 = column from the left
// neighbour, 1..4 = core, 5..6 = columns from the right neighbour. This
// placement of V/W/Z is this design's choice.
//
// Clocking: the whole design runs on one clock at four times the bunch
// clock (160 MHz). Its four edges per bunch tick are the 0/90/180/270 degree
// phases used by the input synchroniser; 80 MHz and 40 MHz registers use the
// clock enables made by clk_phase_gen.
package jem_pkg;

  localparam int JE_W      = 10;          // jet element width
  localparam int E_W       = 12;          // energy sum width
  localparam int N_PHI_ENV = 11;
  localparam int N_ETA_ENV = 7;
  localparam int N_PHI     = 8;           // core
  localparam int N_ETA     = 4;           // core
  localparam int N_THR     = 8;           // jet definitions
  localparam int N_INPUT   = 11;          // input FPGAs V, A..H, W, Z
  localparam int SLICE_W   = 88;          // DAQ slice word without parity
  localparam int ROI_W     = 11;          // 2 position + 1 saturation + 8 thresholds

  localparam logic [JE_W-1:0] JE_MAX = '1;
  localparam logic [E_W-1:0]  E_MAX  = '1;

  typedef logic [JE_W-1:0] je_t;
  typedef logic [E_W-1:0]  esum_t;

  // Cluster size code of a jet definition.
  typedef enum logic [1:0] {
    CL_2X2 = 2'b00,
    CL_3X3 = 2'b01,
    CL_4X4 = 2'b10,
    CL_4X4B = 2'b11
  } clsize_e;

  // Jet definition register: 2-bit cluster size + 10-bit threshold.
  typedef struct packed {
    clsize_e     size;
    logic [9:0]  thr;
  } jet_def_t;

  // A jet cluster sum, limited to 10 bits, with its overflow flag.
  typedef struct packed {
    logic        sat;
    logic [9:0]  v;
  } clus_t;

  // Encoded TTC control lines fanned out by the control FPGA.
  localparam int TTC_L1A        = 0;
  localparam int TTC_BCNTRES    = 1;
  localparam int TTC_START_PLAY = 2;
  localparam int TTC_START_SPY  = 3;
  localparam int TTC_STOP_PLAY  = 4;
  localparam int TTC_GRESET     = 5;

  // On-board register bus from the control FPGA to one processor chip.
  typedef struct packed {
    logic        cs;      // chip select, one cycle per access
    logic        wr;      // 1 = write, 0 = read
    logic [6:0]  addr;    // byte address (bit 0 always 0)
    logic [15:0] wdata;
  } regbus_t;

  // Odd parity: the bit that makes the total number of ones odd.
  function automatic logic odd_par(input logic [127:0] v);
    return ~(^v);
  endfunction

  // Saturating add of two unsigned values into E_W bits.
  function automatic esum_t sat_add12(input esum_t a, input esum_t b);
    logic [E_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return (s[E_W] || a == E_MAX || b == E_MAX) ? E_MAX : s[E_W-1:0];
  endfunction

  // Quad-linear compression of a 12-bit energy to 2 scale bits + 6 bits.
  function automatic logic [7:0] quad_lin(input esum_t e);
    if (e < 12'd64)        return {2'b00, e[5:0]};
    else if (e < 12'd256)  return {2'b01, e[7:2]};
    else if (e < 12'd1024) return {2'b10, e[9:4]};
    else                   return {2'b11, e[11:6]};
  endfunction

endpackage
