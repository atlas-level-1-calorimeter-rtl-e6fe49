// main_fpga: main processor of the JEM.
//
// It receives 77 jet elements as 5-bit words at twice the bunch clock: 44
// from the module's own 11 input processors (phi rows V, A..H, W, Z, eta
// 1..4), 11 from the left neighbour (eta 0) and 22 from the right neighbour
// (eta 5, 6), and rebuilds them (je_demux). On FCAL modules the FCAL column
// is completed by copying each connected element to its unconnected phi
// neighbour (rows 2, 4, .., 10 copy rows 1, 3, .., 9; this pairing is this
// design's choice). The elements then feed two parallel paths:
//  * jet path: elements not above JET_THR are zeroed and the 11 x 7
//    environment goes to jet_algorithm, giving 8 3-bit multiplicities
//    (jet word = {odd parity, mult7..mult0}) and 8 RoI words;
//  * energy path: the 32 core elements go to et_sum and miss_et; Et, Ex, Ey
//    are compressed into the 25-bit energy word (energy_encoder).
// Both result words leave on output flip-flops. They are captured by two
// spy memories, and form the DAQ slice ({jet word, energy word, 38 fill
// bits}), read out by one readout sequencer; the RoI words (each with its
// own odd parity bit, 12 bits) are read out on a 2-bit stream by a second
// sequencer on the RoI request.
//
// Registers (byte address): 00 VERSION, 02 CONTROL (pulses: bit0 arm spy,
// bit2 reset spy read counters), 04 STATUS (bit0 DLL lock), 10 ET_THR, 12
// JET_THR, 20-2E JET_DEF_0..7 ({size[1:0], threshold[9:0]}), 50-6E
// MULT_A_X, MULT_A_Y .. MULT_H_Y (phi rows A..H), 70 EX_PORT, 72 EY_PORT, 74
// ET_PORT (Et + parity; reading it advances the energy spy address), 76
// J1_PORT (mult 0-3), 78 J2_PORT (mult 4-7 + parity; advances the jet spy
// address). The address of JET_THR and the spy-port address stepping are
// this design's reading of the register map. A TTC start-spy command
// starts capture if the spy was armed.
//
// Timing: clk is 4x the bunch clock. Counted from the bunch-clock edge at
// which the sending FPGAs' multiplexers take a jet element, the jet word
// appears 7 and the energy word 9 bunch ticks later (5 and 7 ticks after
// the environment register of this FPGA).
module main_fpga
  import jem_pkg::*;
#(
  parameter int          PIPE_DEPTH = 48,
  parameter logic [15:0] VERSION    = 16'h0001
) (
  input  logic                             clk,
  input  logic                             rst,
  input  logic [1:0]                       ph,
  input  logic                             ce40,
  input  logic [N_PHI_ENV-1:0][3:0][4:0]   je_local,
  input  logic [N_PHI_ENV-1:0][4:0]        je_left,
  input  logic [N_PHI_ENV-1:0][1:0][4:0]   je_right,
  input  logic                             fcal_en,
  input  logic [2:0]                       fcal_eta,
  input  logic [7:0]                       ttc,
  input  logic                             read_req,
  input  logic                             roi_req,
  input  logic                             dll_locked,
  input  regbus_t                          rb,
  output logic [15:0]                      rdata,
  output logic [24:0]                      jet_word,
  output logic [24:0]                      energy_word,
  output logic                             daq_ser,
  output logic                             daq_valid,
  output logic [1:0]                       roi_ser,
  output logic                             roi_valid
);
  // Registers.
  je_t                  et_thr, jet_thr;
  jet_def_t [7:0]       jet_def;
  logic [7:0][11:0]     mult_x, mult_y;
  logic                 wr, rd, spy_armed;
  logic                 rd_et_port, rd_j2_port, clr_spy_rd, arm_spy;

  assign wr = rb.cs && rb.wr;
  assign rd = rb.cs && !rb.wr;
  assign arm_spy    = wr && rb.addr == 7'h02 && rb.wdata[0];
  assign clr_spy_rd = wr && rb.addr == 7'h02 && rb.wdata[2];
  assign rd_et_port = rd && rb.addr == 7'h74;
  assign rd_j2_port = rd && rb.addr == 7'h78;

  always_ff @(posedge clk) begin
    if (rst) begin
      et_thr  <= '0;
      jet_thr <= '0;
      jet_def <= '0;
      mult_x  <= '0;
      mult_y  <= '0;
    end else if (wr) begin
      if (rb.addr == 7'h10) et_thr  <= rb.wdata[9:0];
      if (rb.addr == 7'h12) jet_thr <= rb.wdata[9:0];
      for (int k = 0; k < 8; k++) begin
        if (rb.addr == 7'(8'h20 + 2*k)) jet_def[k] <= rb.wdata[11:0];
        if (rb.addr == 7'(8'h50 + 4*k)) mult_x[k]  <= rb.wdata[11:0];
        if (rb.addr == 7'(8'h52 + 4*k)) mult_y[k]  <= rb.wdata[11:0];
      end
    end
  end

  // Input de-multiplexing into the 11 x 7 environment.
  je_t [N_PHI_ENV-1:0][N_ETA_ENV-1:0] env_rx, env;
  for (genvar p = 0; p < N_PHI_ENV; p++) begin : g_phi
    je_demux u_l (.clk, .rst, .ph, .din(je_left[p]), .je(env_rx[p][0]));
    for (genvar e = 0; e < 4; e++) begin : g_loc
      je_demux u_d (.clk, .rst, .ph, .din(je_local[p][e]), .je(env_rx[p][1+e]));
    end
    for (genvar e = 0; e < 2; e++) begin : g_r
      je_demux u_r (.clk, .rst, .ph, .din(je_right[p][e]), .je(env_rx[p][5+e]));
    end
  end

  // FCAL routing and the input register of both paths.
  je_t [N_PHI_ENV-1:0][N_ETA_ENV-1:0] env_c, jet_env;
  je_t [N_PHI-1:0][N_ETA-1:0]         core;
  always_comb begin
    env_c = env_rx;
    if (fcal_en)
      for (int p = 2; p < N_PHI_ENV; p += 2)
        for (int e = 0; e < N_ETA_ENV; e++)
          if (3'(e) == fcal_eta) env_c[p][e] = env_rx[p-1][e];
  end

  always_ff @(posedge clk) begin
    if (rst)       env <= '0;
    else if (ce40) env <= env_c;
  end

  always_comb begin
    for (int p = 0; p < N_PHI_ENV; p++)
      for (int e = 0; e < N_ETA_ENV; e++)
        jet_env[p][e] = (env[p][e] > jet_thr) ? env[p][e] : '0;
    for (int p = 0; p < N_PHI; p++)
      for (int e = 0; e < N_ETA; e++)
        core[p][e] = env[p+1][e+1];
  end

  // Jet path.
  logic [N_THR-1:0][2:0]  mult;
  logic [7:0][ROI_W-1:0]  roi;
  jet_algorithm u_jet (.clk, .rst, .ce40, .je(jet_env), .jet_def, .mult, .roi);

  always_ff @(posedge clk) begin
    if (rst)       jet_word <= '0;
    else if (ce40) jet_word <= {odd_par(128'(mult)), mult};
  end

  // Energy path.
  esum_t et, ex, ey;
  et_sum #(.N(32)) u_et (.clk, .rst, .ce40, .je(core), .threshold(et_thr), .et);
  miss_et u_miss (.clk, .rst, .ce40, .je(core), .coef_x(mult_x), .coef_y(mult_y),
                  .ex, .ey);
  energy_encoder u_enc (.clk, .rst, .ce40, .et, .ex, .ey, .word(energy_word));

  // Spy memories.
  logic        spy_start;
  logic [24:0] spy_jet, spy_en;
  logic        spy_busy_j, spy_busy_e;

  always_ff @(posedge clk) begin
    if (rst) spy_armed <= 1'b0;
    else if (arm_spy) spy_armed <= 1'b1;
    else if (ce40 && ttc[TTC_START_SPY]) spy_armed <= 1'b0;
  end
  assign spy_start = ttc[TTC_START_SPY] && spy_armed;

  spy_mem #(.DEPTH(256), .W(25)) u_spy_jet (
    .clk, .rst, .ce40, .start(spy_start), .din(jet_word),
    .rd(rd_j2_port), .clr_rd(clr_spy_rd), .dout(spy_jet), .busy(spy_busy_j)
  );
  spy_mem #(.DEPTH(256), .W(25)) u_spy_en (
    .clk, .rst, .ce40, .start(spy_start), .din(energy_word),
    .rd(rd_et_port), .clr_rd(clr_spy_rd), .dout(spy_en), .busy(spy_busy_e)
  );

  // DAQ and RoI readout.
  logic [SLICE_W-1:0] slice;
  assign slice = {jet_word, energy_word, 38'd0};
  readout_sequencer #(.W(SLICE_W), .LANES(1), .PIPE_DEPTH(PIPE_DEPTH)) u_ros_daq (
    .clk, .rst, .ce40, .din(slice), .read_req,
    .ser(daq_ser), .valid(daq_valid), .fifo_count(), .overflow()
  );

  logic [95:0] roi_word;
  always_comb begin
    for (int r = 0; r < 8; r++) begin
      // lane 0 carries RoIs 0..3, lane 1 RoIs 4..7, lowest RoI sent first
      roi_word[(r / 4) * 48 + (3 - r % 4) * 12 +: 12] = {roi[r], odd_par(128'(roi[r]))};
    end
  end
  readout_sequencer #(.W(96), .LANES(2), .PIPE_DEPTH(PIPE_DEPTH)) u_ros_roi (
    .clk, .rst, .ce40, .din(roi_word), .read_req(roi_req),
    .ser(roi_ser), .valid(roi_valid), .fifo_count(), .overflow()
  );

  // Register read-back.
  always_ff @(posedge clk) begin
    if (rst) rdata <= '0;
    else if (rd) begin
      rdata <= '0;
      case (rb.addr)
        7'h00: rdata <= VERSION;
        7'h04: rdata <= {13'd0, spy_busy_e | spy_busy_j, spy_armed, dll_locked};
        7'h10: rdata <= {6'd0, et_thr};
        7'h12: rdata <= {6'd0, jet_thr};
        7'h70: rdata <= {8'd0, spy_en[7:0]};
        7'h72: rdata <= {8'd0, spy_en[15:8]};
        7'h74: rdata <= {7'd0, spy_en[24:16]};
        7'h76: rdata <= {4'd0, spy_jet[11:0]};
        7'h78: rdata <= {3'd0, spy_jet[24:12]};
        default: begin
          for (int k = 0; k < 8; k++) begin
            if (rb.addr == 7'(8'h20 + 2*k)) rdata <= {4'd0, jet_def[k]};
            if (rb.addr == 7'(8'h50 + 4*k)) rdata <= {4'd0, mult_x[k]};
            if (rb.addr == 7'(8'h52 + 4*k)) rdata <= {4'd0, mult_y[k]};
          end
        end
      endcase
    end
  end
endmodule
